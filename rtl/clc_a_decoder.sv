// clc_a_decoder: CLC Adaptive (CLC-A) decoder.
//
// The Adaptive Control FSM drives the Sub-Decoder. A START pulse begins the
// decoding of enc_word: the first correction step always runs; the Syndrome
// Analyzer inside the Sub-Decoder asks for a second step (EXTEND) only when
// more than one line is faulty and one of them holds a double error. So most
// words take one step, like the standard CLC decoder, and only the words that
// gain from it take the second step of the extended decoder.
//
// Interface: clk, rst (synchronous, active high), start, enc_word in; ready and
// dec_word out. enc_word is read in the cycle after START is sampled (the
// DEC_PT1 cycle), so hold it from START until READY. ready is high for one
// cycle; dec_word holds the result from then until the next decode.
// Latency: START sampled at edge k, READY high after edge k+2 (one step) or
// k+3 (two steps). extended reports, alongside ready, whether two steps ran.
module clc_a_decoder
  import clc_pkg::*;
#(
  parameter int unsigned LINES = DEF_LINES
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [cw_width(LINES)-1:0]   enc_word,
  output logic                         ready,
  output logic [LINE_D*LINES-1:0]      dec_word,
  output logic                         extended
);

  logic      en, extend;
  ac_state_t state;
  logic      pt2_seen;

  clc_adaptive_control u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .extend(extend),
    .en    (en),
    .ready (ready),
    .state (state)
  );

  clc_sub_decoder #(.LINES(LINES)) u_sub (
    .clk     (clk),
    .rst     (rst),
    .en      (en),
    .enc_word(enc_word),
    .extend  (extend),
    .word_q  (),
    .dec_word(dec_word)
  );

  // Remembers whether the current decode went through DEC_PT2.
  always_ff @(posedge clk) begin
    if (rst)                      pt2_seen <= 1'b0;
    else if (state == ST_DEC_PT1) pt2_seen <= 1'b0;
    else if (state == ST_DEC_PT2) pt2_seen <= 1'b1;
  end

  assign extended = pt2_seen;

endmodule
