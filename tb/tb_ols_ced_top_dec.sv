// tb_ols_ced_top_dec: end-to-end run of the data path built for the
// double-error-correcting variant of the 16-bit code (m = 4, t = 2, 16 check
// bits).
//
// Random words are encoded, up to two bits of each 32-bit stored word are
// inverted, and the word is read back through the syndrome computation and
// the majority decoder; the corrected data must equal the written data. On
// the way, single faults are forced into the original encoder and syndrome
// networks, and their checkers must flag them while the outputs stay equal to
// the fault-free values (taken from the same design a moment earlier, with no
// fault present). Counts: encoder fixes, syndrome fixes, words with one and
// with two corrected errors; a count of zero is a failure.
module tb_ols_ced_top_dec;

  localparam int M = 4, T = 2, K = M * M, R = 2 * T * M;

  int checks = 0, failures = 0;
  int n_enc_fix = 0, n_syn_fix = 0, n_one = 0, n_two = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [K:1] d, rd_d, dc, flip;
  logic [R:1] c, rd_c, s;
  logic [2:1] r;
  logic       e, r1, r2, f, err;

  ols_ced_top #(.M(M), .T(T)) dut (
    .d(d), .c(c), .r(r), .e(e),
    .rd_d(rd_d), .rd_c(rd_c), .s(s), .r1(r1), .r2(r2), .f(f),
    .dc(dc), .flip(flip), .err(err)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    d = '0; rd_d = '0; rd_c = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [R:1]   good_c, good_s, bad;
      logic [K+R:1] word;
      int p1, p2, ne;
      @(posedge clk);
      // write
      d = K'($urandom);
      #1;
      good_c = c;
      check(!e && r[1] == r[2], "no encoder fault flagged");
      p1 = 1 + int'($urandom % R);
      bad = good_c;
      bad[p1] = ~bad[p1];
      force dut.u_enc.c_orig = bad;
      #1;
      check(e && c == good_c, "encoder fault corrected");
      if (e && c == good_c) n_enc_fix++;
      release dut.u_enc.c_orig;
      #1;
      // store with 0, 1 or 2 errors
      word = {d, good_c};
      ne = n % 3;
      p1 = 1 + int'($urandom % (K + R));
      p2 = 1 + (p1 + int'($urandom % (K + R - 1))) % (K + R);
      if (ne >= 1) word[p1] = ~word[p1];
      if (ne == 2) word[p2] = ~word[p2];
      // read
      {rd_d, rd_c} = word;
      #1;
      good_s = s;
      check(!f && r1 == r2, "no syndrome fault flagged");
      check(dc == d, $sformatf("corrected data with %0d errors", ne));
      check(err == (ne != 0), "error flag");
      if (ne == 1 && dc == d) n_one++;
      if (ne == 2 && dc == d) n_two++;
      p1 = 1 + int'($urandom % R);
      bad = good_s;
      bad[p1] = ~bad[p1];
      force dut.u_syn.s_orig = bad;
      #1;
      check(f && s == good_s && dc == d, "syndrome fault corrected");
      if (f && s == good_s) n_syn_fix++;
      release dut.u_syn.s_orig;
    end
    $display("mechanisms: enc_fix=%0d syn_fix=%0d one_err=%0d two_err=%0d",
             n_enc_fix, n_syn_fix, n_one, n_two);
    check(n_enc_fix > 0, "encoder correction happened");
    check(n_syn_fix > 0, "syndrome correction happened");
    check(n_one > 0, "single error corrected");
    check(n_two > 0, "double error corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
