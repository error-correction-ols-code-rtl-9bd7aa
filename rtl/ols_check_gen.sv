// ols_check_gen: check-bit generator of an OLS code (the XOR network of the
// encoder, also the first stage of the syndrome computation).
//
// Check bit c(r) is the parity of the m data bits whose column of the
// parity-check matrix H has a one in row r (see ols_pkg for the structure of
// H). For the design's default code, k = 16 and t = 1, this gives
//   c1 = d1^d2^d3^d4,  c2 = d5^..^d8,   c3 = d9^..^d12,  c4 = d13^..^d16
//   c5 = d1^d5^d9^d13, c6 = d2^d6^d10^d14, c7 = d3^d7^d11^d15, c8 = d4^d8^d12^d16
// exactly the groups of the original encoder circuit. Each
// check bit is its own XOR tree of m - 1 two-input gates and no gate is shared
// between check bits, so one faulty node can spoil only one check bit.
//
// Interface: d[K:1] data bits (d[1] is d1), c[R:1] check bits.
// Purely combinational, no clock.
module ols_check_gen #(
  parameter int unsigned M = ols_pkg::M_DEFAULT,  // Latin square size, k = M*M
  parameter int unsigned T = ols_pkg::T_DEFAULT,  // errors corrected
  localparam int unsigned K = M * M,
  localparam int unsigned R = 2 * T * M
) (
  input  logic [K:1] d,
  output logic [R:1] c
);

  // Row r of H restricted to the data columns.
  function automatic logic [K:1] h_row(input int unsigned row);
    logic [K:1] mask;
    for (int unsigned b = 1; b <= K; b++) mask[b] = ols_pkg::in_check(M, row, b);
    return mask;
  endfunction

  for (genvar gr = 1; gr <= R; gr++) begin : g_chk
    localparam logic [K:1] HROW = h_row(gr);
    assign c[gr] = ^(d & HROW);
  end

endmodule
