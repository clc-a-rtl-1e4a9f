// clc_tb_pkg: reference model and helpers shared by the CLC testbenches.
//
// The reference encoder is written from the Hamming code's definition, not
// from the check equations: the 8 data bits of a line sit at Hamming positions
// 3,5,6,7,9,10,11,12 and check bit k is the XOR of all positions whose index
// has bit k set. Line parity and column parities follow the code's layout.
// Codeword bit order (as in the RTL): D[8L-1:0], C[4L-1:0], Pr[L-1:0], Pc[12:0].
package clc_tb_pkg;

  localparam int LINES = 4;
  localparam int CWW   = 13 * LINES + 13;
  localparam int DW    = 8 * LINES;

  // Hamming position of line column c (0..7 D, 8..11 C).
  function automatic int ham_pos(int c);
    int dpos[8] = '{3, 5, 6, 7, 9, 10, 11, 12};
    int cpos[4] = '{1, 2, 4, 8};
    return (c < 8) ? dpos[c] : cpos[c - 8];
  endfunction

  // Codeword bit of row r (LINES = Pc row), column c.
  function automatic int cell_bit(int r, int c, int lines = LINES);
    int dw = 8 * lines;
    if (r == lines) return dw + 4 * lines + lines + c;
    if (c < 8)      return 8 * r + c;
    if (c < 12)     return dw + 4 * r + (c - 8);
    return dw + 4 * lines + r;
  endfunction

  function automatic logic [CWW-1:0] ref_encode(logic [DW-1:0] d);
    logic [CWW-1:0] w = '0;
    logic [12:0]    pc = '0;
    for (int l = 0; l < LINES; l++) begin
      logic [12:0] line = '0;
      for (int c = 0; c < 8; c++) line[c] = d[8*l + c];
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < 8; c++)
          if (ham_pos(c) & (1 << k)) line[8 + k] ^= line[c];
      line[12] = ^line[11:0];
      for (int c = 0; c < 13; c++) w[cell_bit(l, c)] = line[c];
      pc ^= line;
    end
    for (int c = 0; c < 13; c++) w[cell_bit(LINES, c)] = pc[c];
    return w;
  endfunction

endpackage
