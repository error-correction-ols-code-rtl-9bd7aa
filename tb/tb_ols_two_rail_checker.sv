// tb_ols_two_rail_checker: self-checking testbench of the two-rail parity
// checker. Every combination of two 4-bit input sets is applied (the size
// used by the encoder of the default code) plus random 8-bit sets (the size
// used by the syndrome computation); r1 and r2 must be the parities of the
// two sets and e must be 1 exactly when the rails disagree, i.e. when the
// whole input has odd parity.
module tb_ols_two_rail_checker;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:1] x4, y4;
  logic       a1, a2, ae;
  ols_two_rail_checker #(.NA(4), .NB(4)) dut4 (.x(x4), .y(y4), .r1(a1), .r2(a2), .e(ae));

  logic [8:1] x8, y8;
  logic       b1, b2, be;
  ols_two_rail_checker #(.NA(8), .NB(8)) dut8 (.x(x8), .y(y8), .r1(b1), .r2(b2), .e(be));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit par(input logic [8:1] v);
    bit p = 0;
    for (int i = 1; i <= 8; i++) p = p ^ v[i];
    return p;
  endfunction

  initial begin
    x4 = '0; y4 = '0; x8 = '0; y8 = '0;
    for (int n = 0; n < 256; n++) begin
      {x4, y4} = 8'(n);
      #1;
      check(a1 == par({4'b0, x4}), $sformatf("r1 for x=%b", x4));
      check(a2 == par({4'b0, y4}), $sformatf("r2 for y=%b", y4));
      check(ae == (par({4'b0, x4}) != par({4'b0, y4})), $sformatf("e for x=%b y=%b", x4, y4));
      // code words: {r1, r2} in {00, 11} <=> e == 0
      check((a1 == a2) == !ae, "two-rail code");
    end
    for (int n = 0; n < 1000; n++) begin
      x8 = 8'($urandom); y8 = 8'($urandom);
      #1;
      check(b1 == par(x8) && b2 == par(y8), "8-bit rails");
      check(be == (par(x8) ^ par(y8)), "8-bit flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
