// clc_syndrome_calc: syndromes of a (possibly corrupted) CLC codeword.
//
// Every redundant bit is recomputed from the received bits and XORed with its
// stored value (syndrome = stored ^ recomputed), as the code prescribes:
//   sc[l]  4-bit Hamming syndrome of line l (stored C ^ C recomputed from D),
//          read as a binary number it is the Hamming position of a single
//          error in the line;
//   spr[l] line parity syndrome: XOR of all 13 received bits of line l;
//   spc[j] column parity syndrome: Pc[j] XOR the received bit j of every line.
// Combinational. Ports: codeword in; sc, spr, spc out.
module clc_syndrome_calc
  import clc_pkg::*;
#(
  parameter int unsigned LINES = DEF_LINES
) (
  input  logic [cw_width(LINES)-1:0]     codeword,
  output logic [LINES-1:0][LINE_C-1:0]   sc,
  output logic [LINES-1:0]               spr,
  output line_t                          spc
);

  localparam int unsigned DW  = LINE_D * LINES;
  localparam int unsigned CB  = DW;                    // first C bit
  localparam int unsigned PRB = DW + LINE_C * LINES;   // first Pr bit
  localparam int unsigned PCB = PRB + LINES;           // first Pc bit

  line_t lv;

  always_comb begin
    spc = codeword[PCB +: COLS];
    for (int l = 0; l < LINES; l++) begin
      lv = {codeword[PRB + l], codeword[CB + LINE_C*l +: LINE_C], codeword[LINE_D*l +: LINE_D]};
      sc[l]  = lv[LINE_D +: LINE_C] ^ ham_check(lv[LINE_D-1:0]);
      spr[l] = ^lv;
      spc    = spc ^ lv;
    end
  end

endmodule
