// clc_encoder: Column Line Code encoder, CLC(32,65) by default.
//
// The data word is cut into LINES lines of 8 bits. For every line it forms
// four Hamming check bits C (the Hamming(12,8) equations of clc_pkg::ham_check)
// and one line parity Pr, the XOR of the line's 8 D and 4 C bits. The last row
// holds 13 column parities: Pc0..Pc7 are the XOR of each D column over all
// lines, Pc8..Pc11 the XOR of each C column and Pc12 the XOR of all Pr bits.
// These equations are the code's own; the flat bit order of the codeword is
// this design's choice and is described in clc_pkg.
//
// Purely combinational: codeword follows data in the same cycle.
// Ports: data [8*LINES-1:0] in, codeword [13*LINES+12:0] out.
module clc_encoder
  import clc_pkg::*;
#(
  parameter int unsigned LINES = DEF_LINES
) (
  input  logic [LINE_D*LINES-1:0]   data,
  output logic [cw_width(LINES)-1:0] codeword
);

  localparam int unsigned DW = LINE_D * LINES;

  logic [LINE_C*LINES-1:0] c_bits;
  logic [LINES-1:0]        pr_bits;
  line_t                   pc_row;
  line_t [LINES-1:0]       lines;

  always_comb begin
    pc_row = '0;
    for (int l = 0; l < LINES; l++) begin
      c_bits[LINE_C*l +: LINE_C] = ham_check(data[LINE_D*l +: LINE_D]);
      pr_bits[l] = ^data[LINE_D*l +: LINE_D] ^ ^c_bits[LINE_C*l +: LINE_C];
      lines[l]   = {pr_bits[l], c_bits[LINE_C*l +: LINE_C], data[LINE_D*l +: LINE_D]};
      pc_row     = pc_row ^ lines[l];
    end
  end

  assign codeword = {pc_row, pr_bits, c_bits, data};

  // The layout must add up to the codeword width.
  if (DW + LINE_C * LINES + LINES + COLS != cw_width(LINES)) begin : g_bad_layout
    $error("clc_encoder: inconsistent codeword layout");
  end

endmodule
