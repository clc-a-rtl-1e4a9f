// tb_clc_a_top: end-to-end error coverage run of CLC(32,65) with the CLC-A
// decoder, at the default parameters. For each error count from 0 to 8 it
// runs TRIALS trials (random data, random seed for the clustered error
// pattern), as the coverage experiment does with 10,000 patterns per count,
// and prints the share of words decoded correctly and how often the second
// correction step ran.
// Checks per trial: done arrives within a bound; the clean codeword equals
// the reference encoding; the stored word differs from it in exactly n_err
// bits; the corrected flag agrees with data_out == data_in; one- and two-step
// decodes report the matching extended flag. Checks overall: every word with
// 0, 1 or 2 errors is corrected; and each mechanism happens at least once
// (one-step decode, two-step decode, a correction by the second step, an
// uncorrected word, an error-free word).
module tb_clc_a_top;
  import clc_tb_pkg::*;

  localparam int TRIALS = 10000;

  logic clk = 0, rst, start, busy, done, corrected, extended;
  logic [DW-1:0]  data_in, data_out;
  logic [3:0]     n_err;
  logic [31:0]    seed;
  logic [CWW-1:0] codeword, stored_word;
  int checks = 0, failures = 0;

  clc_a_top dut (.clk(clk), .rst(rst), .start(start), .data_in(data_in), .n_err(n_err),
                 .seed(seed), .busy(busy), .done(done), .data_out(data_out),
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
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ok[9], n_ext[9], n_ext_ok[9];
    int one_step, two_step, uncorrected, clean_words;
    int cyc;
    rst = 1; start = 0; data_in = '0; n_err = 0; seed = 0;
    one_step = 0; two_step = 0; uncorrected = 0; clean_words = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n <= 8; n++) begin
      n_ok[n] = 0; n_ext[n] = 0; n_ext_ok[n] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        data_in = $urandom();
        n_err   = 4'(n);
        seed    = $urandom();
        start   = 1;
        @(posedge clk); #1;
        start = 0;
        check("busy after start", busy);
        cyc = 0;
        while (!done && cyc < 2000) begin
          @(posedge clk); #1;
          cyc++;
        end
        if (!done) begin
          check($sformatf("n=%0d trial %0d finished", n, t), 0);
          continue;
        end
        if (t < 50) begin
          check("codeword matches reference encoder", codeword == ref_encode(data_in));
          check($sformatf("n=%0d stored word has n flips", n),
                $countones(codeword ^ stored_word) == n);
        end
        check("corrected flag matches comparison", corrected == (data_out == data_in));
        if (n <= 2) check($sformatf("n=%0d word corrected", n), data_out == data_in);
        if (data_out == data_in) n_ok[n]++;
        else uncorrected++;
        if (n == 0) clean_words++;
        if (extended) begin
          two_step++;
          n_ext[n]++;
          if (data_out == data_in) n_ext_ok[n]++;
        end else one_step++;
      end
      $display("errors=%0d corrected=%0d/%0d (%0d.%01d%%) second step=%0d (of which corrected %0d)",
               n, n_ok[n], TRIALS, n_ok[n] * 100 / TRIALS, (n_ok[n] * 1000 / TRIALS) % 10,
               n_ext[n], n_ext_ok[n]);
    end
    check("one-step decodes happened", one_step > 0);
    check("two-step decodes happened", two_step > 0);
    check("second step corrected words", n_ext_ok[3] + n_ext_ok[4] > 0);
    check("uncorrected words happened", uncorrected > 0);
    check("error-free words happened", clean_words > 0);
    $display("one-step=%0d two-step=%0d uncorrected=%0d", one_step, two_step, uncorrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
