// clc_pkg: shared constants, types and functions of the Column Line Code (CLC).
//
// A CLC codeword is a 2D array. Each of the LINES data lines holds 8 data bits
// D, 4 Hamming check bits C and one line parity bit Pr (13 columns). Below the
// lines sits one row of 13 column parity bits Pc: Pc0..Pc7 over the D columns,
// Pc8..Pc11 over the C columns and Pc12 over the Pr column. With 4 lines this
// is CLC(32,65); with 2 lines it is CLC(16,39).
//
// Flat codeword layout (this design's choice, the code itself does not fix a
// bit order): bits [8L-1:0] are D, then 4L bits of C, then L bits of Pr, then
// the 13 Pc bits at the top. Inside a line, the 13-bit "line vector" used by
// the decoder has D in [7:0], C in [11:8] and Pr in [12], so that column j of
// every line lines up with Pc[j].
//
// The per-line Hamming code is the usual Hamming(12,8) with check bits in
// positions 1, 2, 4 and 8 and data bits D0..D7 in positions 3, 5, 6, 7, 9, 10,
// 11 and 12; the four check equations are exactly those of the CLC encoder.
package clc_pkg;

  localparam int unsigned LINE_D    = 8;   // data bits per line
  localparam int unsigned LINE_C    = 4;   // Hamming check bits per line
  localparam int unsigned COLS      = LINE_D + LINE_C + 1;  // 13 columns
  localparam int unsigned DEF_LINES = 4;   // CLC(32,65)

  typedef logic [COLS-1:0] line_t;   // one line or the Pc row

  // States of the CLC-A Adaptive Control.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,  // waiting for START, EN=0, READY=0
    ST_DEC_PT1 = 2'd1,  // first correction step, EN=1
    ST_DEC_PT2 = 2'd2,  // second correction step, EN=1
    ST_FINISH  = 2'd3   // result ready for one cycle, EN=0, READY=1
  } ac_state_t;

  // Codeword width for a given number of lines: 13 per line plus the Pc row.
  function automatic int unsigned cw_width(int unsigned lines);
    return COLS * lines + COLS;
  endfunction

  // Hamming check bits of one line's 8 data bits.
  function automatic logic [LINE_C-1:0] ham_check(logic [LINE_D-1:0] d);
    logic [LINE_C-1:0] c;
    c[0] = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    c[1] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    c[2] = d[1] ^ d[2] ^ d[3] ^ d[7];
    c[3] = d[4] ^ d[5] ^ d[6] ^ d[7];
    return c;
  endfunction

  // Column (0..11) of the line bit a nonzero Hamming syndrome points at.
  // valid is 0 for the syndromes 13..15, which name no bit of the line.
  function automatic logic [3:0] ham_column(logic [LINE_C-1:0] s, output logic valid);
    valid = 1'b1;
    case (s)
      4'd1:    return 4'd8;   // C0
      4'd2:    return 4'd9;   // C1
      4'd3:    return 4'd0;   // D0
      4'd4:    return 4'd10;  // C2
      4'd5:    return 4'd1;   // D1
      4'd6:    return 4'd2;   // D2
      4'd7:    return 4'd3;   // D3
      4'd8:    return 4'd11;  // C3
      4'd9:    return 4'd4;   // D4
      4'd10:   return 4'd5;   // D5
      4'd11:   return 4'd6;   // D6
      4'd12:   return 4'd7;   // D7
      default: begin
        valid = 1'b0;
        return 4'd0;
      end
    endcase
  endfunction

endpackage
