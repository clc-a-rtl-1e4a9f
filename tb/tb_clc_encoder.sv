// tb_clc_encoder: checks the CLC(32,65) encoder against the reference encoder
// of clc_tb_pkg (built from Hamming positions, not from the check equations)
// for corner words, all walking-one words and random words. Combinational:
// the codeword is sampled 1 ns after the data changes.
module tb_clc_encoder;
  import clc_tb_pkg::*;

  logic [DW-1:0]  data;
  logic [CWW-1:0] codeword;
  int checks = 0, failures = 0;

  clc_encoder dut (.data(data), .codeword(codeword));

  task automatic check_word(logic [DW-1:0] d);
    logic [CWW-1:0] exp;
    data = d;
    #1;
    exp = ref_encode(d);
    checks++;
    if (codeword !== exp) begin
      failures++;
      $display("FAIL data=%h got=%h exp=%h", d, codeword, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_word('0);
    check_word('1);
    for (int i = 0; i < DW; i++) check_word(DW'(1) << i);
    for (int i = 0; i < 2000; i++) check_word($urandom());
    // One hand-worked value: data 0x01 sets D0, so C0, C1 (positions 1,2 cover
    // position 3), Pr0, Pc0, Pc8, Pc9, Pc12 are 1 and all else 0.
    data = 32'h1;
    #1;
    checks++;
    if (codeword !== (65'h1 | (65'h1 << 32) | (65'h1 << 33) | (65'h1 << 48) |
                      (65'h1 << 52) | (65'h1 << 60) | (65'h1 << 61) | (65'h1 << 64))) begin
      failures++;
      $display("FAIL hand-worked vector: %h", codeword);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
