// tb_ols_ced_syndrome: self-checking testbench of the self-correcting OLS
// syndrome computation (k = 16, t = 1).
//
// 1. Fault-free: every data word with a random received check field; s must
//    be the recomputed row/column parities XOR the received check bits
//    (reference written here), r1 == r2 == parity of the check bits, f == 0.
//    Received-word errors must not raise f.
// 2. A fault in the original network, modelled by forcing the original
//    syndrome, or the original recomputed check bits, to the right value with
//    one bit inverted: f must rise and s must stay correct (duplicate used).
// 3. A fault in the duplicate alone: f == 0, output unchanged.
// 4. A stuck checker rail: f rises, s still correct.
module tb_ols_ced_syndrome;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [16:1] d;
  logic [8:1]  c, s;
  logic        r1, r2, f;
  ols_ced_syndrome dut (.d(d), .c(c), .s(s), .r1(r1), .r2(r2), .f(f));

  function automatic logic [8:1] ref_checks(input logic [16:1] w);
    logic [8:1] x;
    x = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        x[1 + i] ^= w[4 * i + j + 1];
        x[5 + j] ^= w[4 * i + j + 1];
      end
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [8:1] good, bad, p;

  initial begin
    d = '0; c = '0;
    @(posedge clk);
    for (int w = 0; w < 65536; w++) begin
      d = 16'(w);
      c = (w % 3 == 0) ? ref_checks(d) : 8'($urandom);
      #1;
      check(s == (ref_checks(d) ^ c), $sformatf("s for d=%h c=%h", d, c));
      check(r1 == ^c && r2 == ^c && !f, $sformatf("checker for d=%h c=%h", d, c));
      if (c == ref_checks(d)) check(s == '0, "code word gives zero syndrome");
    end
    for (int n = 0; n < 400; n++) begin
      d = 16'($urandom);
      p = ref_checks(d);
      c = (n % 2 == 0) ? p : p ^ 8'($urandom);
      good = p ^ c;
      for (int b = 1; b <= 8; b++) begin
        bad = good; bad[b] = ~bad[b];
        force dut.s_orig = bad;
        #1;
        check(f && s == good, $sformatf("syndrome bit s%0d fault corrected", b));
        release dut.s_orig;
        bad = p; bad[b] = ~bad[b];
        force dut.p_orig = bad;
        #1;
        check(f && s == good, $sformatf("recomputed check %0d fault corrected", b));
        release dut.p_orig;
        #1;
      end
      bad = good ^ (8'b1 << ($urandom % 8));
      force dut.s_dup = bad;
      #1;
      check(!f && s == good, "fault in duplicate masked");
      release dut.s_dup;
      force dut.r2 = ~(^c);
      #1;
      check(f && s == good, "stuck rail r2 selects duplicate");
      release dut.r2;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
