// tb_clc_error_injector: for n_err = 0..8 and many seeds, checks that the mask
// holds exactly n_err set bits (MAX_ERR for n_err above it), that the set
// cells form one connected cluster in the 2D array under 8-neighbour
// adjacency, that valid pulses for exactly one cycle and the mask then holds,
// and that different seeds give different masks.
module tb_clc_error_injector;
  import clc_tb_pkg::*;

  logic clk = 0, rst, start, busy, valid;
  logic [3:0]     n_err;
  logic [31:0]    seed;
  logic [CWW-1:0] mask;
  int checks = 0, failures = 0;

  clc_error_injector dut (.clk(clk), .rst(rst), .start(start), .n_err(n_err),
                          .seed(seed), .busy(busy), .valid(valid), .mask(mask));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Number of cells reachable from the first set cell (flood fill).
  function automatic int cluster_size(logic [CWW-1:0] m);
    bit seen[LINES+1][13];
    bit grew;
    int cnt;
    bit found;
    found = 0;
    for (int r = 0; r <= LINES; r++)
      for (int c = 0; c < 13; c++) seen[r][c] = 0;
    for (int r = 0; r <= LINES && !found; r++)
      for (int c = 0; c < 13 && !found; c++)
        if (m[cell_bit(r, c)]) begin seen[r][c] = 1; found = 1; end
    do begin
      grew = 0;
      for (int r = 0; r <= LINES; r++)
        for (int c = 0; c < 13; c++)
          if (m[cell_bit(r, c)] && !seen[r][c])
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++)
                if (r + dr >= 0 && r + dr <= LINES && c + dc >= 0 && c + dc < 13 &&
                    seen[r + dr][c + dc] && !seen[r][c]) begin
                  seen[r][c] = 1;
                  grew = 1;
                end
    end while (grew);
    cnt = 0;
    for (int r = 0; r <= LINES; r++)
      for (int c = 0; c < 13; c++) cnt += seen[r][c];
    return cnt;
  endfunction

  task automatic gen(int n, logic [31:0] s, output int cycles);
    n_err = 4'(n);
    seed = s;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (!valid && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, expn;
    logic [CWW-1:0] held, prev;
    rst = 1; start = 0; n_err = 0; seed = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    prev = '0;
    for (int n = 0; n <= 10; n++) begin
      expn = (n > 8) ? 8 : n;
      for (int t = 0; t < 200; t++) begin
        gen(n, $urandom(), cyc);
        check($sformatf("n=%0d valid within bound (%0d)", n, cyc), valid && cyc < 1000);
        check($sformatf("n=%0d popcount=%0d", n, $countones(mask)), $countones(mask) == expn);
        if (expn > 0)
          check($sformatf("n=%0d cluster connected mask=%h", n, mask), cluster_size(mask) == expn);
        held = mask;
        @(posedge clk); #1;
        check("valid is a pulse and mask holds", !valid && !busy && mask == held);
      end
      if (n >= 3) begin
        check($sformatf("n=%0d masks vary", n), held != prev);
        prev = held;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
