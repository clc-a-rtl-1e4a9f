// clc_sub_decoder: one CLC correction step per enabled clock, with the
// Syndrome Analyzer built in.
//
// Each cycle with en=1 the codeword is corrected once and stored in word_q.
// The first enabled cycle after a cycle with en=0 corrects enc_word (first
// step, DEC_PT1); an enabled cycle that directly follows another one corrects
// word_q again (second step, DEC_PT2), so that the errors repaired in the first
// step no longer hide the position of the errors that are left.
//
// A correction step applies the CLC correction table to every line at once,
// using the line's Hamming syndrome SC (nonzero or not), its line parity
// syndrome SPr and the column parity syndrome SPc (any column set or not):
//   SC SPr SPc
//   1  1   0   odd error, Hamming: flip the bit the Hamming syndrome names
//   1  1   1   odd error, Hamming or parity (see below)
//   1  0   1   even error, parity: flip the line bits whose column is set
//   0  1   1   triple error, parity: as above
//   other      no error, or error detected only: no change
// Column parities cannot tell lines apart, so parity correction is used only
// when this line is the only line with an error. For the 1-1-1 case the table
// allows either method; this design uses parity when the line is the only
// faulty one and flipping the columns set in SPc would explain both the
// line's Hamming syndrome and its line parity syndrome (a triple error in the
// line), and Hamming otherwise, so that a single error next to flipped Pc
// bits is still repaired by Hamming. That rule, and the refusal of parity
// correction while other lines are faulty, are this design's reading of the
// table. The Pc row itself is never corrected.
//
// extend comes from the Syndrome Analyzer on the word being corrected in the
// current cycle and is meaningful in the first step.
// Ports: clk, rst (synchronous, active high), en, enc_word in; extend,
// word_q (corrected codeword) and dec_word (its data bits) out. The result of
// a step is visible the cycle after the enabled cycle.
module clc_sub_decoder
  import clc_pkg::*;
#(
  parameter int unsigned LINES = DEF_LINES
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic [cw_width(LINES)-1:0]   enc_word,
  output logic                         extend,
  output logic [cw_width(LINES)-1:0]   word_q,
  output logic [LINE_D*LINES-1:0]      dec_word
);

  localparam int unsigned DW  = LINE_D * LINES;
  localparam int unsigned CB  = DW;
  localparam int unsigned PRB = DW + LINE_C * LINES;
  localparam int unsigned CWW = cw_width(LINES);

  logic                       en_q;       // previous cycle was a correction step
  logic [CWW-1:0]             src;        // word corrected in this cycle
  logic [CWW-1:0]             corrected;
  logic [LINES-1:0][LINE_C-1:0] sc;
  logic [LINES-1:0]           spr;
  line_t                      spc;
  logic [LINES-1:0]           line_err;

  assign src = en_q ? word_q : enc_word;

  clc_syndrome_calc #(.LINES(LINES)) u_syn (
    .codeword(src),
    .sc      (sc),
    .spr     (spr),
    .spc     (spc)
  );

  clc_syndrome_analyzer #(.LINES(LINES)) u_ana (
    .sc      (sc),
    .spr     (spr),
    .line_err(line_err),
    .extend  (extend)
  );

  // Correction table, applied to all lines in parallel.
  line_t            lv, flip, ham_mask;
  logic             sole, hvalid, spc_any, par_fits;
  logic [LINE_C-1:0] spc_ham;      // Hamming syndrome a flip of the SPc columns gives
  logic [3:0]       hcol;
  logic [LINES-1:0] others;

  always_comb begin
    corrected = src;
    spc_any   = (spc != '0);
    spc_ham   = spc[LINE_D +: LINE_C] ^ ham_check(spc[LINE_D-1:0]);
    for (int l = 0; l < LINES; l++) begin
      lv       = {src[PRB + l], src[CB + LINE_C*l +: LINE_C], src[LINE_D*l +: LINE_D]};
      others   = line_err;
      others[l] = 1'b0;
      sole     = line_err[l] && (others == '0);
      par_fits = (spc_ham == sc[l]) && (^spc == spr[l]);
      hcol     = ham_column(sc[l], hvalid);
      ham_mask = hvalid ? (line_t'(1) << hcol) : '0;
      unique case ({sc[l] != '0, spr[l], spc_any})
        3'b110:         flip = ham_mask;
        3'b111:         flip = (sole && par_fits) ? spc : ham_mask;
        3'b101, 3'b011: flip = sole ? spc : '0;
        default:        flip = '0;
      endcase
      lv = lv ^ flip;
      corrected[LINE_D*l +: LINE_D]        = lv[LINE_D-1:0];
      corrected[CB + LINE_C*l +: LINE_C]   = lv[LINE_D +: LINE_C];
      corrected[PRB + l]                   = lv[COLS-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q   <= 1'b0;
      word_q <= '0;
    end else begin
      en_q <= en;
      if (en) word_q <= corrected;
    end
  end

  assign dec_word = word_q[DW-1:0];

endmodule
