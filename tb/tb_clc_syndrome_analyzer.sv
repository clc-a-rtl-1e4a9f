// tb_clc_syndrome_analyzer: drives every combination of "Hamming syndrome
// zero or not" and SPr for the four lines (256 cases, with random nonzero
// syndrome values) and compares line_err and EXTEND with a count-based
// model: EXTEND = (number of faulty lines >= 2) and (some line has SC != 0
// with SPr = 0). Also checks the Figure-style case of a double error in one
// line and a single error in another.
module tb_clc_syndrome_analyzer;
  import clc_tb_pkg::*;

  logic [LINES-1:0][3:0] sc;
  logic [LINES-1:0]      spr;
  logic [LINES-1:0]      line_err;
  logic                  extend;
  int checks = 0, failures = 0;

  clc_syndrome_analyzer dut (.sc(sc), .spr(spr), .line_err(line_err), .extend(extend));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 256; v++) begin
        int nerr;
        bit dbl;
        logic [LINES-1:0] exp_err;
        nerr = 0;
        dbl  = 0;
        for (int l = 0; l < LINES; l++) begin
          sc[l]  = v[2*l] ? 4'(1 + $urandom_range(14)) : 4'd0;
          spr[l] = v[2*l+1];
          exp_err[l] = v[2*l] | v[2*l+1];
          if (exp_err[l]) nerr++;
          if (v[2*l] && !v[2*l+1]) dbl = 1;
        end
        #1;
        checks++;
        if (line_err !== exp_err || extend !== (nerr >= 2 && dbl)) begin
          failures++;
          $display("FAIL sc=%h spr=%b: line_err=%b extend=%b", sc, spr, line_err, extend);
        end
      end
    end
    // Double error in line 0 (SC=7^9, SPr=0), single error in line 1.
    sc  = '{4'd0, 4'd0, 4'd7, 4'd14};
    spr = 4'b0010;
    #1;
    checks++;
    if (extend !== 1'b1) begin
      failures++;
      $display("FAIL double+single case: extend=%b", extend);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
