// tb_clc_syndrome_calc: checks the syndromes of clean codewords (all zero)
// and of codewords with one flipped bit at every one of the 65 positions:
// a flipped line bit must give that line the Hamming position of the bit as
// SC (0 for Pr), set its SPr and set exactly its column in SPc; a flipped Pc
// bit must set only its column in SPc. Codewords come from the reference
// encoder of clc_tb_pkg. Combinational, sampled 1 ns after each change.
module tb_clc_syndrome_calc;
  import clc_tb_pkg::*;

  logic [CWW-1:0]          cw;
  logic [LINES-1:0][3:0]   sc;
  logic [LINES-1:0]        spr;
  logic [12:0]             spc;
  int checks = 0, failures = 0;

  clc_syndrome_calc dut (.codeword(cw), .sc(sc), .spr(spr), .spc(spc));

  task automatic expect_syn(string what, logic [LINES-1:0][3:0] esc,
                            logic [LINES-1:0] espr, logic [12:0] espc);
    checks++;
    if (sc !== esc || spr !== espr || spc !== espc) begin
      failures++;
      $display("FAIL %s: sc=%h spr=%b spc=%b exp sc=%h spr=%b spc=%b",
               what, sc, spr, spc, esc, espr, espc);
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
    for (int t = 0; t < 50; t++) begin
      logic [CWW-1:0] clean;
      clean = ref_encode($urandom());
      cw = clean;
      #1;
      expect_syn("clean", '0, '0, '0);
      for (int r = 0; r <= LINES; r++) begin
        for (int c = 0; c < 13; c++) begin
          logic [LINES-1:0][3:0] esc;
          logic [LINES-1:0]      espr;
          esc  = '0;
          espr = '0;
          if (r < LINES) begin
            espr[r] = 1'b1;
            if (c < 12) esc[r] = 4'(ham_pos(c));
          end
          cw = clean;
          cw[cell_bit(r, c)] = ~cw[cell_bit(r, c)];
          #1;
          expect_syn($sformatf("flip r%0d c%0d", r, c), esc, espr, 13'(1) << c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
