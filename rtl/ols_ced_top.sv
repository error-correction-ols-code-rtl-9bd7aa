// ols_ced_top: OLS-protected data path with self-correcting encoder and
// self-correcting syndrome computation.
//
// Write side: the data word d is encoded by ols_ced_encoder into the check
// bits c. A fault inside the encoder's original XOR network is caught by its
// parity-prediction checker (rails r[1], r[2], flag e) and the check bits of
// the duplicated network are sent out instead. The memory that stores the
// code word {d, c} is outside this module.
// Read side: the word read back, {rd_d, rd_c}, goes to ols_ced_syndrome,
// which produces the syndrome s with its own checker (rails r1, r2, flag f)
// and duplicate; ols_mld_decoder then corrects up to t data-bit errors by
// majority vote and gives the corrected data dc.
//
// The port names d, c, r, s, r1 and r2 are those of the original top-level
// block. That block has a single data input; the separate read-back
// inputs rd_d/rd_c, the flags e and f, the decoder outputs dc/flip/err and
// the assignment of r to the encoder rails and r1/r2 to the syndrome rails
// are this design's choices.
//
// Bit numbering is 1-based, as in the names d1..d16 and c1..c8 of the code.
// Entirely combinational: every output follows its inputs with the delay of
// the XOR trees and one multiplexer; there is no clock or reset.
module ols_ced_top #(
  parameter int unsigned M = ols_pkg::M_DEFAULT,  // 4: k = 16 data bits
  parameter int unsigned T = ols_pkg::T_DEFAULT,  // 1: single error correction
  localparam int unsigned K = M * M,
  localparam int unsigned R = 2 * T * M
) (
  // write side
  input  logic [K:1] d,       // data word to encode
  output logic [R:1] c,       // check bits to store with d
  output logic [2:1] r,       // encoder checker rails {r2, r1}
  output logic       e,       // encoder fault seen, duplicate used
  // read side
  input  logic [K:1] rd_d,    // data bits read back
  input  logic [R:1] rd_c,    // check bits read back
  output logic [R:1] s,       // syndrome
  output logic       r1,      // syndrome checker rail: XOR of s
  output logic       r2,      // syndrome checker rail: XOR of rd_c
  output logic       f,       // syndrome fault seen, duplicate used
  output logic [K:1] dc,      // corrected data
  output logic [K:1] flip,    // data bits inverted by the decoder
  output logic       err      // nonzero syndrome: error in the read word
);

  ols_ced_encoder #(.M(M), .T(T)) u_enc (
    .d (d),
    .c (c),
    .r1(r[1]),
    .r2(r[2]),
    .e (e)
  );

  ols_ced_syndrome #(.M(M), .T(T)) u_syn (
    .d (rd_d),
    .c (rd_c),
    .s (s),
    .r1(r1),
    .r2(r2),
    .f (f)
  );

  ols_mld_decoder #(.M(M), .T(T)) u_dec (
    .d   (rd_d),
    .s   (s),
    .dc  (dc),
    .flip(flip),
    .err (err)
  );

endmodule
