// tb_ols_ced_encoder: self-checking testbench of the self-correcting OLS
// encoder (k = 16, t = 1).
//
// 1. Fault-free: all 65536 data words; c must equal the row/column parities
//    of the data square (reference written here), r1 == r2 == parity of the
//    data, e == 0.
// 2. Faults in the original network: the original check bits are forced to
//    the correct value with one bit inverted (any single faulty node of the
//    network gives exactly this, as no gate is shared between check bits),
//    and also with three bits inverted. e must rise and c must still be the
//    correct check bits, taken from the duplicate.
// 3. A fault in the duplicate alone must not change the output (e == 0).
// 4. A stuck rail of the checker must raise e and still give correct c.
// 5. Two inverted check bits, one in each half, cancel in the parity
//    prediction: e stays 0 and the wrong bits go out. This is the known limit
//    of the scheme (only odd numbers of flipped check bits are seen) and is
//    checked so that it stays documented behaviour.
module tb_ols_ced_encoder;

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
  logic [8:1]  c;
  logic        r1, r2, e;
  ols_ced_encoder dut (.d(d), .c(c), .r1(r1), .r2(r2), .e(e));

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

  logic [8:1] good, bad;

  initial begin
    d = '0;
    @(posedge clk);
    // 1. fault-free
    for (int w = 0; w < 65536; w++) begin
      d = 16'(w);
      #1;
      check(c == ref_checks(d), $sformatf("c for d=%h", d));
      check(r1 == ^d && r2 == ^d && !e, $sformatf("checker for d=%h", d));
    end
    // 2. single and triple faults in the original network
    for (int n = 0; n < 400; n++) begin
      d = 16'($urandom);
      good = ref_checks(d);
      for (int b = 1; b <= 8; b++) begin
        bad = good; bad[b] = ~bad[b];
        force dut.c_orig = bad;
        #1;
        check(e == 1'b1, $sformatf("e after flipping c%0d", b));
        check(c == good, $sformatf("corrected c after flipping c%0d", b));
        release dut.c_orig;
        #1;
      end
      bad = good ^ 8'b0000_0111;
      force dut.c_orig = bad;
      #1;
      check(e && c == good, "triple flip corrected");
      release dut.c_orig;
      // 3. duplicate wrong, original right
      bad = good ^ (8'b1 << ($urandom % 8));
      force dut.c_dup = bad;
      #1;
      check(!e && c == good, "fault in duplicate masked");
      release dut.c_dup;
      // 4. a checker rail stuck at the wrong value
      force dut.r1 = ~(^d);
      #1;
      check(e && c == good, "stuck rail r1 selects duplicate");
      release dut.r1;
      force dut.r2 = ~(^d);
      #1;
      check(e && c == good, "stuck rail r2 selects duplicate");
      release dut.r2;
      // 5. even flips across the halves are not seen
      bad = good ^ 8'b0001_0001;
      force dut.c_orig = bad;
      #1;
      check(!e && c == bad, "two flips across halves pass undetected");
      release dut.c_orig;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
