// clc_syndrome_analyzer: decides whether a second correction step is worth it.
//
// A line shows an error when its Hamming syndrome is nonzero or its line
// parity syndrome is set. It shows a double (even) error when the Hamming
// syndrome is nonzero while the line parity syndrome is clear. A double error
// can only be repaired with the column parities, which point at columns, not
// lines, so it must be the only faulty line. EXTEND is therefore raised when
// more than one line shows an error and at least one of them shows a double
// error: the first step then repairs the single errors of the other lines and
// a second step can repair the double error.
//
// Combinational. Ports: sc, spr in (from clc_syndrome_calc); line_err (one
// flag per faulty line) and extend out.
module clc_syndrome_analyzer
  import clc_pkg::*;
#(
  parameter int unsigned LINES = DEF_LINES
) (
  input  logic [LINES-1:0][LINE_C-1:0] sc,
  input  logic [LINES-1:0]             spr,
  output logic [LINES-1:0]             line_err,
  output logic                         extend
);

  logic [LINES-1:0] dbl;

  always_comb begin
    for (int l = 0; l < LINES; l++) begin
      line_err[l] = (sc[l] != '0) || spr[l];
      dbl[l]      = (sc[l] != '0) && !spr[l];
    end
  end

  // More than one bit of line_err set, and at least one double-error line.
  assign extend = ((line_err & (line_err - 1'b1)) != '0) && (dbl != '0);

endmodule
