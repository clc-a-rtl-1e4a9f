// clc_a_top: CLC(32,65) with the adaptive CLC-A decoder, wired as the error
// coverage experiment of the design: encode, inject errors, decode, compare.
//
// A start pulse with data_in, n_err and seed runs one trial:
//   1. the encoder turns data_in into the 65-bit codeword (combinational,
//      from the register that holds data_in for the trial);
//   2. the error injector builds a clustered mask of n_err bit flips, which
//      is XORed into the codeword, as a memory hit by a multiple cell upset
//      would return it;
//   3. the CLC-A decoder corrects the word in one or two steps;
//   4. the comparator checks the decoded data against data_in.
// done pulses for one cycle with data_out, corrected (data_out == data_in)
// and extended (the decoder took its second step) valid; they hold until the
// next trial. start is ignored while a trial runs (busy=1).
// codeword and stored_word show the clean and the corrupted codeword.
// The sequencing around the blocks is this design's own; the blocks and the
// four phases follow the CLC-A experiment.
// Ports: clk, rst (synchronous, active high) and the signals above.
module clc_a_top
  import clc_pkg::*;
#(
  parameter int unsigned LINES   = DEF_LINES,
  parameter int unsigned MAX_ERR = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [LINE_D*LINES-1:0]     data_in,
  input  logic [3:0]                  n_err,
  input  logic [31:0]                 seed,
  output logic                        busy,
  output logic                        done,
  output logic [LINE_D*LINES-1:0]     data_out,
  output logic                        corrected,
  output logic                        extended,
  output logic [cw_width(LINES)-1:0]  codeword,
  output logic [cw_width(LINES)-1:0]  stored_word
);

  localparam int unsigned DW  = LINE_D * LINES;
  localparam int unsigned CWW = cw_width(LINES);

  typedef enum logic [1:0] {T_IDLE, T_INJECT, T_DECODE} trial_t;
  trial_t state;

  logic [DW-1:0]  data_q;
  logic [CWW-1:0] mask;
  logic           inj_start, inj_busy, inj_valid;
  logic           dec_start, dec_ready, dec_extended;
  logic [DW-1:0]  dec_word;

  clc_encoder #(.LINES(LINES)) u_enc (
    .data    (data_q),
    .codeword(codeword)
  );

  assign inj_start = (state == T_IDLE) && start;

  clc_error_injector #(.LINES(LINES), .MAX_ERR(MAX_ERR)) u_inj (
    .clk  (clk),
    .rst  (rst),
    .start(inj_start),
    .n_err(n_err),
    .seed (seed),
    .busy (inj_busy),
    .valid(inj_valid),
    .mask (mask)
  );

  clc_a_decoder #(.LINES(LINES)) u_dec (
    .clk     (clk),
    .rst     (rst),
    .start   (dec_start),
    .enc_word(stored_word),
    .ready   (dec_ready),
    .dec_word(dec_word),
    .extended(dec_extended)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= T_IDLE;
      data_q      <= '0;
      stored_word <= '0;
      dec_start   <= 1'b0;
      done        <= 1'b0;
      data_out    <= '0;
      corrected   <= 1'b0;
      extended    <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          data_q <= data_in;
          state  <= T_INJECT;
        end
        T_INJECT: if (inj_valid) begin
          stored_word <= codeword ^ mask;
          dec_start   <= 1'b1;
          state       <= T_DECODE;
        end
        T_DECODE: if (dec_ready) begin
          data_out  <= dec_word;
          corrected <= (dec_word == data_q);
          extended  <= dec_extended;
          done      <= 1'b1;
          state     <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = (state != T_IDLE);

  // The injector is only started from T_IDLE and finishes before decoding.
  a_inj_idle: assert property (@(posedge clk) disable iff (rst)
    state == T_DECODE |-> !inj_busy);

endmodule
