// ols_ced_syndrome: OLS syndrome computation with concurrent error detection
// and correction.
//
// The syndrome bit s(r) is the check bit recomputed from the received data
// XORed with the received check bit c(r): s(r) = c(r) ^ XOR of the data bits
// of check r. The original network produces s_orig. Parity prediction: since
// each data bit enters an even number (2t) of checks, the XOR of all syndrome
// bits equals the XOR of all received check bits whatever the data. A two-rail
// checker therefore forms r1 = s1^..^s(2tm) and r2 = c1^..^c(2tm), and
// f = r1 ^ r2 is 1 only when a fault inside the network has flipped an odd
// number of syndrome bits. A duplicated syndrome network fed from the same
// inputs gives s_dup, and the output is s = f ? s_dup : s_orig, that is
// S_output = f'.s_orig + f.s_dup. Errors in the received word itself are not
// flagged by f; they show as a nonzero syndrome for the decoder to correct.
// All of this follows the original scheme's syndrome circuit and equations.
//
// Interface: d[K:1] received data bits, c[R:1] received check bits;
// s[R:1] corrected syndrome (S_OUTPUT); r1, r2 checker rails; f error flag
// (also the mux select). Purely combinational.
module ols_ced_syndrome #(
  parameter int unsigned M = ols_pkg::M_DEFAULT,
  parameter int unsigned T = ols_pkg::T_DEFAULT,
  localparam int unsigned K = M * M,
  localparam int unsigned R = 2 * T * M
) (
  input  logic [K:1] d,
  input  logic [R:1] c,
  output logic [R:1] s,
  output logic       r1,
  output logic       r2,
  output logic       f
);

  logic [R:1] p_orig, p_dup;  // check bits recomputed from the data
  logic [R:1] s_orig, s_dup;  // syndromes of the original and duplicate

  ols_check_gen #(.M(M), .T(T)) u_orig (.d(d), .c(p_orig));
  ols_check_gen #(.M(M), .T(T)) u_dup  (.d(d), .c(p_dup));

  assign s_orig = p_orig ^ c;
  assign s_dup  = p_dup ^ c;

  ols_two_rail_checker #(.NA(R), .NB(R)) u_chk (
    .x (s_orig),
    .y (c),
    .r1(r1),
    .r2(r2),
    .e (f)
  );

  assign s = f ? s_dup : s_orig;

endmodule
