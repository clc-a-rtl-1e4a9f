// clc_error_injector: random clustered bit-flip patterns for a CLC codeword.
//
// It emulates a multiple cell upset in a memory that stores the codeword as
// its 2D array (LINES lines of 13 cells and the Pc row below them): it builds
// a mask with n_err distinct bits set, every bit after the first a neighbour
// (horizontal, vertical or diagonal, one cell apart) of a bit already set.
// XOR the mask into the codeword to inject the errors.
//
// How: START loads the xorshift32 generator with seed, clears the mask and
// picks a random first cell. Every further cycle the walk steps to a random
// one of the eight neighbouring cells (a step off the array is dropped and
// retried the next cycle); a cell not yet in the mask is added to it. When
// the mask holds n_err bits, valid pulses for one cycle and the mask is held
// until the next START. n_err above MAX_ERR is treated as MAX_ERR; n_err=0
// gives an empty mask at once. The random walk, its neighbourhood and the
// generator are this design's choices; only the error counts (1 to 8) and
// the adjacency of the flips come from the CLC-A coverage experiment.
// Ports: clk, rst (synchronous, active high), start, n_err, seed in; busy,
// valid, mask out. Latency: at least n_err cycles after START.
module clc_error_injector
  import clc_pkg::*;
#(
  parameter int unsigned LINES   = DEF_LINES,
  parameter int unsigned MAX_ERR = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [3:0]                  n_err,
  input  logic [31:0]                 seed,
  output logic                        busy,
  output logic                        valid,
  output logic [cw_width(LINES)-1:0]  mask
);

  localparam int unsigned CWW  = cw_width(LINES);
  localparam int unsigned ROWS = LINES + 1;
  localparam int unsigned DW   = LINE_D * LINES;
  localparam int unsigned PRB  = DW + LINE_C * LINES;
  localparam int unsigned PCB  = PRB + LINES;

  // Codeword bit of the cell in row r, column c of the 2D array.
  function automatic int unsigned cell_bit(int unsigned r, int unsigned c);
    if (r == LINES)       return PCB + c;
    else if (c < LINE_D)  return LINE_D * r + c;
    else if (c < COLS - 1) return DW + LINE_C * r + (c - LINE_D);
    else                  return PRB + r;
  endfunction

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  logic [31:0] rnd, rnd_n;
  logic [3:0]  target, count;
  logic [3:0]  row, col;         // current cell of the walk
  logic        first;            // next cycle picks the first cell

  // Neighbour step proposed in this cycle.
  int          nr, nc;
  logic        in_grid;
  logic [$clog2(CWW)-1:0] nbit;

  always_comb begin
    rnd_n = xorshift32(rnd);
    if (first) begin
      nr = int'({16'b0, rnd_n[15:0]} % ROWS);
      nc = int'({16'b0, rnd_n[31:16]} % COLS);
    end else begin
      unique case (rnd_n[2:0])
        3'd0: begin nr = int'(row) - 1; nc = int'(col) - 1; end
        3'd1: begin nr = int'(row) - 1; nc = int'(col);     end
        3'd2: begin nr = int'(row) - 1; nc = int'(col) + 1; end
        3'd3: begin nr = int'(row);     nc = int'(col) - 1; end
        3'd4: begin nr = int'(row);     nc = int'(col) + 1; end
        3'd5: begin nr = int'(row) + 1; nc = int'(col) - 1; end
        3'd6: begin nr = int'(row) + 1; nc = int'(col);     end
        default: begin nr = int'(row) + 1; nc = int'(col) + 1; end
      endcase
    end
    in_grid = (nr >= 0) && (nr < int'(ROWS)) && (nc >= 0) && (nc < int'(COLS));
    nbit    = in_grid ? $bits(nbit)'(cell_bit(unsigned'(nr), unsigned'(nc))) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rnd    <= 32'h1;
      busy   <= 1'b0;
      valid  <= 1'b0;
      mask   <= '0;
      target <= '0;
      count  <= '0;
      row    <= '0;
      col    <= '0;
      first  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        rnd    <= (seed == '0) ? 32'h1 : seed;
        mask   <= '0;
        count  <= '0;
        target <= (n_err > 4'(MAX_ERR)) ? 4'(MAX_ERR) : n_err;
        first  <= 1'b1;
        busy   <= (n_err != '0);
        valid  <= (n_err == '0);
      end else if (busy) begin
        rnd <= rnd_n;
        if (in_grid) begin
          first <= 1'b0;
          row   <= 4'(nr);
          col   <= 4'(nc);
          if (!mask[nbit]) begin
            mask[nbit] <= 1'b1;
            count      <= count + 1'b1;
            if (count + 1'b1 == target) begin
              busy  <= 1'b0;
              valid <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
