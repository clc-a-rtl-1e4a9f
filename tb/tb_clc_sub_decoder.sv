// tb_clc_sub_decoder: drives EN by hand and checks single correction steps.
//  - No error, every single error (65 positions) and every pair of adjacent
//    cells in the 2D array (horizontal, vertical, diagonal): one step must
//    return the original data with EXTEND=0.
//  - The double-error example: D3, D4 (line 0) and D11 (line 1). The first
//    step must raise EXTEND, repair D11 and leave D3/D4 wrong; a second step
//    (EN held a second cycle) must repair D3 and D4.
//  - A lone EN pulse after an idle cycle must read enc_word again, not the
//    stored word.
module tb_clc_sub_decoder;
  import clc_tb_pkg::*;

  logic clk = 0, rst, en, extend;
  logic [CWW-1:0] enc_word, word_q;
  logic [DW-1:0]  dec_word;
  int checks = 0, failures = 0;

  clc_sub_decoder dut (.clk(clk), .rst(rst), .en(en), .enc_word(enc_word),
                       .extend(extend), .word_q(word_q), .dec_word(dec_word));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One step on w: EN for one cycle, then idle; returns EXTEND seen in the step.
  task automatic one_step(logic [CWW-1:0] w, output logic ext);
    enc_word = w;
    en = 1;
    #1 ext = extend;
    @(posedge clk); #1;
    en = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0]  d;
    logic [CWW-1:0] clean, w;
    logic           ext;
    rst = 1; en = 0; enc_word = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      d = $urandom();
      clean = ref_encode(d);
      one_step(clean, ext);
      check($sformatf("clean word %h", d), dec_word == d && !ext && word_q == clean);
      for (int r = 0; r <= LINES; r++)
        for (int c = 0; c < 13; c++) begin
          w = clean;
          w[cell_bit(r, c)] ^= 1'b1;
          one_step(w, ext);
          check($sformatf("single r%0d c%0d", r, c), dec_word == d && !ext);
          // Adjacent pairs: right, down, down-right, down-left.
          for (int k = 0; k < 4; k++) begin
            int r2, c2;
            r2 = r + ((k == 0) ? 0 : 1);
            c2 = c + ((k == 0 || k == 2) ? 1 : (k == 1) ? 0 : -1);
            if (r2 > LINES || c2 < 0 || c2 > 12) continue;
            w = clean;
            w[cell_bit(r, c)]   ^= 1'b1;
            w[cell_bit(r2, c2)] ^= 1'b1;
            one_step(w, ext);
            check($sformatf("double r%0d c%0d / r%0d c%0d", r, c, r2, c2), dec_word == d && !ext);
          end
        end
    end
    // Double error in line 0 (D3, D4) and single error in line 1 (D11).
    d = 32'hA5C3_1E77;
    clean = ref_encode(d);
    w = clean;
    w[3] ^= 1'b1; w[4] ^= 1'b1; w[11] ^= 1'b1;
    enc_word = w;
    en = 1;
    #1 check("example: EXTEND in step 1", extend);
    @(posedge clk); #1;
    check("example: D11 repaired after step 1", dec_word[11] == d[11]);
    check("example: D3/D4 still wrong after step 1", dec_word[4:3] == ~d[4:3]);
    enc_word = '0;  // the second step must not read enc_word
    @(posedge clk); #1;
    en = 0;
    check("example: all repaired after step 2", dec_word == d);
    @(posedge clk); #1;
    // Random double error (line a, horizontal pair) plus single error in
    // line b: step 1 raises EXTEND and must leave the pair unrepaired,
    // step 2 must repair everything.
    for (int t = 0; t < 200; t++) begin
      int a, b, c, c2;
      a  = $urandom_range(LINES - 1);
      b  = (a + 1 + $urandom_range(LINES - 2)) % LINES;
      c  = $urandom_range(11);
      c2 = $urandom_range(11);
      if (c2 == c || c2 == c + 1) continue;
      d = $urandom();
      clean = ref_encode(d);
      w = clean;
      w[cell_bit(a, c)] ^= 1'b1;
      w[cell_bit(a, c + 1)] ^= 1'b1;
      w[cell_bit(b, c2)] ^= 1'b1;
      enc_word = w;
      en = 1;
      #1 check($sformatf("d+s a=%0d b=%0d: EXTEND", a, b), extend);
      @(posedge clk); #1;
      check($sformatf("d+s a=%0d b=%0d c=%0d: pair untouched by step 1", a, b, c),
            word_q[cell_bit(a, c)] != clean[cell_bit(a, c)] &&
            word_q[cell_bit(a, c + 1)] != clean[cell_bit(a, c + 1)] &&
            word_q[cell_bit(b, c2)] == clean[cell_bit(b, c2)]);
      @(posedge clk); #1;
      en = 0;
      check($sformatf("d+s a=%0d b=%0d: repaired by step 2", a, b), dec_word == d);
      @(posedge clk); #1;
    end
    d = 32'hA5C3_1E77;
    clean = ref_encode(d);
    // Triple error inside one line (D0, D1, D3): SC != 0, SPr = 1, and the
    // flip of the three SPc columns explains both syndromes: parity repairs it.
    w = clean;
    w[0] ^= 1'b1; w[1] ^= 1'b1; w[3] ^= 1'b1;
    one_step(w, ext);
    check("triple error in one line repaired by parity", dec_word == d && !ext);
    // Three in a row with zero Hamming syndrome (D8, D9, D10: 3^5^6 = 0).
    w = clean;
    w[8] ^= 1'b1; w[9] ^= 1'b1; w[10] ^= 1'b1;
    one_step(w, ext);
    check("triple error with SC = 0 repaired by parity", dec_word == d);
    // Single error D29 with Pc4 and Pc6 flipped below it: Hamming must win.
    w = clean;
    w[29] ^= 1'b1; w[cell_bit(LINES, 4)] ^= 1'b1; w[cell_bit(LINES, 6)] ^= 1'b1;
    one_step(w, ext);
    check("single error beside two Pc flips repaired by Hamming", dec_word == d);
    // A new first step reads enc_word again.
    one_step(clean, ext);
    check("new step reads enc_word", dec_word == d && word_q == clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
