// tb_ols_check_gen: self-checking testbench of the OLS check-bit generator.
//
// Default code (m = 4, t = 1): all 65536 data words are applied and every
// check bit is compared with the row and column parities of the 4 x 4 data
// square, written out here independently of the design's H-matrix function.
// Larger codes (m = 4, t = 2 with GF(4) Latin squares, m = 5, t = 3 with modulo-5 Latin squares and m = 8, t = 2
// with GF(8) Latin squares) are checked by the properties an OLS code must
// have: probing with one-hot words reads out each column of H, which must
// have weight 2t with exactly one one per group of m checks, and two columns
// may share at most one check; random words check linearity.
module tb_ols_check_gen;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- default code ----
  logic [16:1] d;
  logic [8:1]  c;
  ols_check_gen dut (.d(d), .c(c));

  function automatic logic [8:1] ref_checks(input logic [16:1] w);
    logic [8:1] x;
    x = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        x[1 + i] ^= w[4 * i + j + 1];  // row i
        x[5 + j] ^= w[4 * i + j + 1];  // column j
      end
    return x;
  endfunction

  // ---- m = 5, t = 3 ----
  logic [25:1] d5;
  logic [30:1] c5;
  ols_check_gen #(.M(5), .T(3)) dut5 (.d(d5), .c(c5));

  // ---- m = 4, t = 2: the double-error-correcting k = 16 code, 16 check bits ----
  logic [16:1] d42;
  logic [16:1] c42;
  ols_check_gen #(.M(4), .T(2)) dut42 (.d(d42), .c(c42));

  // ---- m = 8, t = 2 ----
  logic [64:1] d8;
  logic [32:1] c8;
  ols_check_gen #(.M(8), .T(2)) dut8 (.d(d8), .c(c8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // The columns of H as seen through one-hot probes, then the OLS properties.
  logic [30:1] col5 [1:25];
  logic [32:1] col8 [1:64];
  logic [16:1] col42 [1:16];

  initial begin
    d = '0; d5 = '0; d8 = '0; d42 = '0;
    @(posedge clk);
    for (int w = 0; w < 65536; w++) begin
      d = 16'(w);
      #1;
      check(c == ref_checks(d), $sformatf("d=%h c=%h expected %h", d, c, ref_checks(d)));
      // the XOR of all check bits of an OLS code is zero
      check(^c == 1'b0, "overall check parity");
    end
    // c1 covers d1..d4, c5 covers d1,d5,d9,d13
    d = 16'h0001; #1; check(c == 8'b0001_0001, "d1 -> c1, c5");
    d = 16'h8000; #1; check(c == 8'b1000_1000, "d16 -> c4, c8");

    for (int b = 1; b <= 25; b++) begin d5 = '0; d5[b] = 1'b1; #1; col5[b] = c5; end
    for (int b = 1; b <= 64; b++) begin d8 = '0; d8[b] = 1'b1; #1; col8[b] = c8; end
    // k = 16, t = 2: the first data bit lies in checks 1, 5, 9 and 13
    for (int b = 1; b <= 16; b++) begin d42 = '0; d42[b] = 1'b1; #1; col42[b] = c42; end
    check(col42[1] == 16'b0001_0001_0001_0001, "t=2 column 1 in checks 1, 5, 9, 13");
    for (int b = 1; b <= 16; b++) begin
      check($countones(col42[b]) == 4, $sformatf("m4t2 column %0d weight", b));
      for (int g = 0; g < 4; g++)
        check($countones(col42[b][4*g+1 +: 4]) == 1, $sformatf("m4t2 column %0d group %0d", b, g));
      for (int b2 = b + 1; b2 <= 16; b2++)
        check($countones(col42[b] & col42[b2]) <= 1, $sformatf("m4t2 columns %0d,%0d overlap", b, b2));
    end
    for (int b = 1; b <= 25; b++) begin
      check($countones(col5[b]) == 6, $sformatf("m5 column %0d weight", b));
      for (int g = 0; g < 6; g++)
        check($countones(col5[b][5*g+1 +: 5]) == 1, $sformatf("m5 column %0d group %0d", b, g));
      for (int b2 = b + 1; b2 <= 25; b2++)
        check($countones(col5[b] & col5[b2]) <= 1, $sformatf("m5 columns %0d,%0d overlap", b, b2));
    end
    for (int b = 1; b <= 64; b++) begin
      check($countones(col8[b]) == 4, $sformatf("m8 column %0d weight", b));
      for (int g = 0; g < 4; g++)
        check($countones(col8[b][8*g+1 +: 8]) == 1, $sformatf("m8 column %0d group %0d", b, g));
      for (int b2 = b + 1; b2 <= 64; b2++)
        check($countones(col8[b] & col8[b2]) <= 1, $sformatf("m8 columns %0d,%0d overlap", b, b2));
    end
    // linearity on random words
    for (int n = 0; n < 200; n++) begin
      logic [64:1] w8;
      logic [32:1] acc8;
      logic [25:1] w5;
      logic [30:1] acc5;
      w8 = {$urandom, $urandom};
      w5 = 25'($urandom);
      acc8 = '0; acc5 = '0;
      d8 = w8; #1;
      for (int b = 1; b <= 64; b++) if (w8[b]) acc8 ^= col8[b];
      check(c8 == acc8, "m8 linearity");
      d5 = w5; #1;
      for (int b = 1; b <= 25; b++) if (w5[b]) acc5 ^= col5[b];
      check(c5 == acc5, "m5 linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
