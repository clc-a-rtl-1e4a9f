// tb_clc_a_decoder: the CLC-A decoder through its START/READY handshake.
// Checks, for encoded random words: no error and single errors decode in one
// step with READY two cycles after START; adjacent double errors decode in
// one step; the D3, D4 + D11 example takes the second step, READY three
// cycles after START, and decodes correctly; extended reports the step count.
// Also counts how often the second step ran over random 3-bit patterns made
// of a double error in one line and a single error in another line.
module tb_clc_a_decoder;
  import clc_tb_pkg::*;

  logic clk = 0, rst, start, ready, extended;
  logic [CWW-1:0] enc_word;
  logic [DW-1:0]  dec_word;
  int checks = 0, failures = 0;
  int n_ext = 0;

  clc_a_decoder dut (.clk(clk), .rst(rst), .start(start), .enc_word(enc_word),
                     .ready(ready), .dec_word(dec_word), .extended(extended));

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Decode w; returns the clock edges from START to READY.
  task automatic decode(logic [CWW-1:0] w, output int lat);
    enc_word = w;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 1;
    while (!ready && lat < 20) begin
      @(posedge clk); #1;
      lat++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0]  d;
    logic [CWW-1:0] w;
    int lat;
    rst = 1; start = 0; enc_word = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    check("ready low after reset", !ready);
    for (int t = 0; t < 200; t++) begin
      d = $urandom();
      w = ref_encode(d);
      if (t % 2) w[$urandom_range(CWW-1)] ^= 1'b1;
      decode(w, lat);
      check($sformatf("single/no error t=%0d", t), dec_word == d && lat == 2 && !extended);
      // Horizontal adjacent pair within a line.
      begin
        int r, c;
        r = $urandom_range(LINES - 1);
        c = $urandom_range(11);
        w = ref_encode(d);
        w[cell_bit(r, c)] ^= 1'b1;
        w[cell_bit(r, c + 1)] ^= 1'b1;
        decode(w, lat);
        check($sformatf("double r%0d c%0d", r, c), dec_word == d && lat == 2);
      end
    end
    // The worked example: D3, D4 and D11.
    d = $urandom();
    w = ref_encode(d);
    w[3] ^= 1'b1; w[4] ^= 1'b1; w[11] ^= 1'b1;
    decode(w, lat);
    check("example decoded", dec_word == d);
    check("example took two steps", lat == 3 && extended);
    // Double error in line a, single error in line b (different columns).
    for (int t = 0; t < 300; t++) begin
      int a, b, c, c2;
      a = $urandom_range(LINES - 1);
      b = (a + 1 + $urandom_range(LINES - 2)) % LINES;
      c = $urandom_range(11);
      c2 = $urandom_range(11);
      if (c2 == c || c2 == c + 1) continue;
      d = $urandom();
      w = ref_encode(d);
      w[cell_bit(a, c)] ^= 1'b1;
      w[cell_bit(a, c + 1)] ^= 1'b1;
      w[cell_bit(b, c2)] ^= 1'b1;
      decode(w, lat);
      if (extended) n_ext++;
      check($sformatf("double+single a=%0d b=%0d c=%0d c2=%0d", a, b, c, c2),
            dec_word == d && extended && lat == 3);
    end
    $display("second step taken %0d times", n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
