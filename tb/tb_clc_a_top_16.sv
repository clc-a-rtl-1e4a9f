// tb_clc_a_top_16: the same encode / inject / decode / compare flow for the
// 16-bit code CLC(16,39) (two lines), built by setting LINES=2. Checks that
// the codeword is 39 bits wide, that every word with 0, 1 or 2 adjacent
// errors decodes to the input data, that the stored word carries exactly
// n_err flips, and that the second correction step runs at least once.
module tb_clc_a_top_16;
  import clc_pkg::*;

  localparam int unsigned L   = 2;
  localparam int unsigned DWL = LINE_D * L;
  localparam int unsigned CWL = cw_width(L);

  logic clk = 0, rst, start, busy, done, corrected, extended;
  logic [DWL-1:0] data_in, data_out;
  logic [3:0]     n_err;
  logic [31:0]    seed;
  logic [CWL-1:0] codeword, stored_word;
  int checks = 0, failures = 0;

  clc_a_top #(.LINES(L)) dut (.clk(clk), .rst(rst), .start(start), .data_in(data_in),
    .n_err(n_err), .seed(seed), .busy(busy), .done(done), .data_out(data_out),
    .corrected(corrected), .extended(extended), .codeword(codeword),
    .stored_word(stored_word));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, ok, two;
    rst = 1; start = 0; data_in = '0; n_err = 0; seed = 0; two = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    check("codeword width 39", CWL == 39);
    for (int n = 0; n <= 8; n++) begin
      ok = 0;
      for (int t = 0; t < 2000; t++) begin
        data_in = DWL'($urandom());
        n_err = 4'(n);
        seed = $urandom();
        start = 1;
        @(posedge clk); #1;
        start = 0;
        cyc = 0;
        while (!done && cyc < 2000) begin @(posedge clk); #1; cyc++; end
        check("trial finished", done);
        check("n flips stored", $countones(codeword ^ stored_word) == n);
        if (n <= 2) check($sformatf("n=%0d corrected", n), data_out == data_in && corrected);
        if (data_out == data_in) ok++;
        if (extended) two++;
      end
      $display("CLC(16,39) errors=%0d corrected=%0d/2000", n, ok);
    end
    check("second step ran", two > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
