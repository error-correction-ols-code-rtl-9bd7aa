// tb_ols_ced_top: end-to-end testbench of the OLS-protected data path at its
// default size (k = 16 data bits, t = 1, 8 check bits).
//
// A 64-word memory, modelled here as an array of 24-bit code words, sits
// between the write side and the read side of the design, one access per
// clock cycle. Each round writes random words through the encoder, then reads
// every word back through the syndrome computation and the majority decoder
// and compares the corrected data with what was written. Along the way it
// makes each mechanism of the design happen and counts it:
//   enc_fix   a single fault in the encoder's original network is flagged by e
//             and the duplicate's check bits are stored instead
//   syn_fix   a single fault in the syndrome's original network is flagged by
//             f and the duplicate's syndrome is used instead
//   data_fix  a bit flipped in a stored data bit is corrected by majority vote
//   chk_err   a bit flipped in a stored check bit is detected, no data changed
//   clean     an undisturbed word reads back with a zero syndrome
// A mechanism that never happened counts as a failure.
module tb_ols_ced_top;

  localparam int K = 16, R = 8, DEPTH = 64;

  int checks = 0, failures = 0;
  int n_enc_fix = 0, n_syn_fix = 0, n_data_fix = 0, n_chk_err = 0, n_clean = 0;
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

  ols_ced_top dut (
    .d(d), .c(c), .r(r), .e(e),
    .rd_d(rd_d), .rd_c(rd_c), .s(s), .r1(r1), .r2(r2), .f(f),
    .dc(dc), .flip(flip), .err(err)
  );

  logic [K+R:1] mem    [DEPTH];   // stored code words {d, c}
  logic [K:1]   golden [DEPTH];   // data written

  function automatic logic [R:1] ref_checks(input logic [K:1] w);
    logic [R:1] x;
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

  initial begin
    d = '0; rd_d = '0; rd_c = '0;
    for (int round = 0; round < 40; round++) begin
      // ---- write phase ----
      for (int a = 0; a < DEPTH; a++) begin
        @(posedge clk);
        d = K'($urandom);
        golden[a] = d;
        if (a % 4 == 1) begin
          // single fault in the original encoder network
          logic [R:1] bad;
          int pos;
          pos = 1 + int'($urandom % R);
          bad = ref_checks(d);
          bad[pos] = ~bad[pos];
          force dut.u_enc.c_orig = bad;
        end
        #1;
        check(c == ref_checks(d), $sformatf("encoded check bits, addr %0d", a));
        check(r[1] == r[2] || a % 4 == 1, "encoder rails agree when no fault is present");
        if (a % 4 == 1) begin
          check(e, "encoder fault flagged");
          if (e && c == ref_checks(d)) n_enc_fix++;
          release dut.u_enc.c_orig;
        end else begin
          check(!e, "no encoder fault flagged");
        end
        mem[a] = {d, c};
      end
      // ---- disturb the stored words: at most one bit per word ----
      for (int a = 0; a < DEPTH; a++) begin
        int pos;
        case (a % 3)
          0:       pos = 0;                              // clean
          1:       pos = R + 1 + int'($urandom % K);     // a data bit
          default: pos = 1 + int'($urandom % R);         // a check bit
        endcase
        if (pos != 0) mem[a][pos] = ~mem[a][pos];
      end
      // ---- read phase ----
      for (int a = 0; a < DEPTH; a++) begin
        logic [R:1] good_s;
        bit syn_fault;
        @(posedge clk);
        {rd_d, rd_c} = mem[a];
        good_s = ref_checks(rd_d) ^ rd_c;
        syn_fault = (a % 5 == 2);
        if (syn_fault) begin
          logic [R:1] bad;
          int pos;
          pos = 1 + int'($urandom % R);
          bad = good_s;
          bad[pos] = ~bad[pos];
          force dut.u_syn.s_orig = bad;
        end
        #1;
        check(s == good_s, $sformatf("syndrome, addr %0d", a));
        check(dc == golden[a], $sformatf("corrected data, addr %0d: %h vs %h", a, dc, golden[a]));
        check(f == syn_fault, "syndrome fault flag");
        check(r1 == r2 || syn_fault, "syndrome rails agree");
        if (syn_fault) begin
          if (f && s == good_s) n_syn_fix++;
          release dut.u_syn.s_orig;
        end
        case (a % 3)
          0: begin
            check(!err && flip == '0, "clean word");
            if (!err) n_clean++;
          end
          1: begin
            check(err && $countones(flip) == 1, "data bit error corrected");
            if (err && dc == golden[a] && rd_d != golden[a]) n_data_fix++;
          end
          default: begin
            check(err && flip == '0, "check bit error detected, data untouched");
            if (err && flip == '0) n_chk_err++;
          end
        endcase
      end
    end
    $display("mechanisms: enc_fix=%0d syn_fix=%0d data_fix=%0d chk_err=%0d clean=%0d",
             n_enc_fix, n_syn_fix, n_data_fix, n_chk_err, n_clean);
    check(n_enc_fix > 0, "encoder correction happened");
    check(n_syn_fix > 0, "syndrome correction happened");
    check(n_data_fix > 0, "data correction happened");
    check(n_chk_err > 0, "check-bit error detection happened");
    check(n_clean > 0, "clean read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
