// ols_mld_decoder: one-step majority-logic (OS-MLD) correction of the data
// bits of an OLS code word.
//
// Every data bit takes part in exactly 2t syndrome bits, and no other data
// bit shares more than one of them. The decoder counts, for each data bit,
// how many of its 2t syndrome bits are one; when the count reaches the
// majority t + 1 the bit is taken to be wrong and is inverted. With at most t
// errors in the word this corrects them all. For the default code (t = 1)
// each data bit is checked by one row check and one column check and is
// inverted when both are one. The voting rule is that of OS-MLD decoding; the extra
// flag err (any syndrome bit set) is this design's own way of reporting that
// an error was detected, whether or not it could be corrected.
//
// Interface: d[K:1] received data bits, s[R:1] syndrome; dc[K:1] corrected
// data; flip[K:1] bits that were inverted; err detected-error flag.
// Purely combinational.
module ols_mld_decoder #(
  parameter int unsigned M = ols_pkg::M_DEFAULT,
  parameter int unsigned T = ols_pkg::T_DEFAULT,
  localparam int unsigned K = M * M,
  localparam int unsigned R = 2 * T * M
) (
  input  logic [K:1] d,
  input  logic [R:1] s,
  output logic [K:1] dc,
  output logic [K:1] flip,
  output logic       err
);

  localparam int unsigned CW = $clog2(2 * T + 1);  // width of a vote count

  // Column b of H restricted to the check rows: the 2t checks of data bit b.
  function automatic logic [R:1] h_col(input int unsigned col);
    logic [R:1] mask;
    for (int unsigned i = 1; i <= R; i++) mask[i] = ols_pkg::in_check(M, i, col);
    return mask;
  endfunction

  for (genvar gb = 1; gb <= K; gb++) begin : g_bit
    localparam logic [R:1] HCOL = h_col(gb);
    logic [CW-1:0] votes;
    always_comb begin
      votes = '0;
      for (int unsigned i = 1; i <= R; i++)
        if (HCOL[i]) votes = votes + CW'(s[i]);
    end
    assign flip[gb] = (votes >= CW'(T + 1));
  end

  assign dc  = d ^ flip;
  assign err = |s;

endmodule
