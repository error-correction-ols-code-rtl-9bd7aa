// ols_ced_encoder: OLS encoder with concurrent error detection and correction.
//
// The encoder computes the 2tm check bits of the data word in an original XOR
// network (c_orig). Because every data bit of an OLS code feeds exactly 2t
// check bits, the XOR of all check bits is zero for every data word; more
// usefully, the first tm check bits and the last tm check bits each have the
// same parity (for t = 1 both equal the parity of the data word). A two-rail
// checker forms r1 = c1^..^c(tm) and r2 = c(tm+1)^..^c(2tm) and raises
// e = r1 ^ r2 when they differ, i.e. when a fault has flipped an odd number of
// check bits. A second, duplicated copy of the XOR network (c_dup) works on
// the same data bits. A 2:1 multiplexer selected by e passes c_orig when e = 0
// and c_dup when e = 1, so a single fault in the original network is both
// flagged and corrected at the output. This structure is the original scheme's
// (original network, checker, duplicate, multiplexer on e); the split of the
// check bits into halves for r1/r2 follows its k = 16, t = 1 drawing, where
// r1 covers c1..c4 and r2 covers c5..c8.
//
// Interface: d[K:1] data in; c[R:1] corrected check bits (C_OUTPUT); r1, r2
// checker rails; e error flag (also the mux select). Purely combinational.
module ols_ced_encoder #(
  parameter int unsigned M = ols_pkg::M_DEFAULT,
  parameter int unsigned T = ols_pkg::T_DEFAULT,
  localparam int unsigned K = M * M,
  localparam int unsigned R = 2 * T * M,
  localparam int unsigned H = T * M          // check bits per checker rail
) (
  input  logic [K:1] d,
  output logic [R:1] c,
  output logic       r1,
  output logic       r2,
  output logic       e
);

  logic [R:1] c_orig;  // check bits of the original network
  logic [R:1] c_dup;   // check bits of the duplicated network

  ols_check_gen #(.M(M), .T(T)) u_orig (.d(d), .c(c_orig));
  ols_check_gen #(.M(M), .T(T)) u_dup  (.d(d), .c(c_dup));

  ols_two_rail_checker #(.NA(H), .NB(H)) u_chk (
    .x (c_orig[H:1]),
    .y (c_orig[R:H+1]),
    .r1(r1),
    .r2(r2),
    .e (e)
  );

  assign c = e ? c_dup : c_orig;

endmodule
