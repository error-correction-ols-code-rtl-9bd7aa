// tb_ols_mld_decoder: self-checking testbench of the majority-logic decoder.
//
// Default code (k = 16, t = 1): for random data words, the error-free word
// and every single error (each of the 16 data bits and 8 check bits) are
// decoded from a syndrome computed here from the row/column parities; the
// corrected data must equal the written data, a check-bit error must flip no
// data bit, and err must be 1 exactly when an error is present. Every double
// error must at least be detected (err == 1).
// Two double-error-correcting codes are also exercised: m = 4, t = 2 (every
// single and double error of the 32-bit word, for random data) and m = 5,
// t = 2 (up to two random errors anywhere in the 45-bit word); the data must
// come out corrected. Its syndrome
// uses the check-bit generator, whose own testbench checks the OLS structure.
module tb_ols_mld_decoder;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // k = 16, t = 2: every pair of positions in the 32-bit word
    for (int n = 0; n < 20; n++) begin
      logic [32:1] word;
      d4 = 16'($urandom);
      #1;
      for (int p1 = 0; p1 <= 32; p1++)
        for (int p2 = p1 + 1; p2 <= 32; p2++) begin
          word = {d4, c4};
          if (p1 != 0) word[p1] = ~word[p1];
          word[p2] = ~word[p2];
          {rd4, rc4} = word;
          #1;
          check(dc4 == d4 && err4, $sformatf("k=16 t=2 correction at %0d,%0d", p1, p2));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [16:1] d, dc, flip;
  logic [8:1]  s;
  logic        err;
  ols_mld_decoder dut (.d(d), .s(s), .dc(dc), .flip(flip), .err(err));

  // t = 2 instance
  logic [25:1] d5, rd5, dc5, flip5;
  logic [20:1] c5, rc5, p5, s5;
  logic        err5;
  ols_check_gen   #(.M(5), .T(2)) enc5 (.d(d5), .c(c5));
  ols_check_gen   #(.M(5), .T(2)) rec5 (.d(rd5), .c(p5));
  assign s5 = p5 ^ rc5;
  ols_mld_decoder #(.M(5), .T(2)) dut5 (.d(rd5), .s(s5), .dc(dc5), .flip(flip5), .err(err5));

  // t = 2 with m = 4: the 16-bit double-error-correcting code, 16 check bits
  logic [16:1] d4, rd4, dc4, flip4;
  logic [16:1] c4, rc4, p4, s4;
  logic        err4;
  ols_check_gen   #(.M(4), .T(2)) enc4 (.d(d4), .c(c4));
  ols_check_gen   #(.M(4), .T(2)) rec4 (.d(rd4), .c(p4));
  assign s4 = p4 ^ rc4;
  ols_mld_decoder #(.M(4), .T(2)) dut4 (.d(rd4), .s(s4), .dc(dc4), .flip(flip4), .err(err4));

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

  logic [16:1] w, rd;
  logic [8:1]  cw, rc;

  initial begin
    d = '0; s = '0; d5 = '0; rd5 = '0; rc5 = '0; d4 = '0; rd4 = '0; rc4 = '0;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      w  = 16'($urandom);
      cw = ref_checks(w);
      // all error patterns of weight 0 and 1 over the 24-bit word
      for (int pos = 0; pos <= 24; pos++) begin
        {rd, rc} = {w, cw};
        if (pos >= 1 && pos <= 16) rd[pos] = ~rd[pos];
        if (pos >= 17) rc[pos - 16] = ~rc[pos - 16];
        d = rd;
        s = ref_checks(rd) ^ rc;
        #1;
        check(dc == w, $sformatf("w=%h error at %0d: dc=%h", w, pos, dc));
        check(err == (pos != 0), $sformatf("err flag, error at %0d", pos));
        if (pos == 0 || pos >= 17) check(flip == '0, "no data bit flipped");
      end
      // double errors are detected
      for (int k = 0; k < 10; k++) begin
        int p1, p2;
        p1 = 1 + ($urandom % 24);
        p2 = 1 + (p1 + ($urandom % 23)) % 24;
        {rd, rc} = {w, cw};
        if (p1 <= 16) rd[p1] = ~rd[p1]; else rc[p1 - 16] = ~rc[p1 - 16];
        if (p2 <= 16) rd[p2] = ~rd[p2]; else rc[p2 - 16] = ~rc[p2 - 16];
        d = rd;
        s = ref_checks(rd) ^ rc;
        #1;
        check(err, $sformatf("double error %0d,%0d detected", p1, p2));
      end
    end
    // t = 2: up to two errors corrected
    for (int n = 0; n < 3000; n++) begin
      logic [45:1] word;
      int ne;
      d5 = 25'($urandom);
      #1;
      word = {d5, c5};
      ne = n % 3;
      for (int k = 0; k < ne; k++) begin
        int p;
        p = 1 + ($urandom % 45);
        word[p] = ~word[p];
      end
      {rd5, rc5} = word;
      #1;
      check(dc5 == d5, $sformatf("t=2 correction, %0d errors", ne));
    end
    // k = 16, t = 2: every pair of positions in the 32-bit word
    for (int n = 0; n < 20; n++) begin
      logic [32:1] word;
      d4 = 16'($urandom);
      #1;
      for (int p1 = 0; p1 <= 32; p1++)
        for (int p2 = p1 + 1; p2 <= 32; p2++) begin
          word = {d4, c4};
          if (p1 != 0) word[p1] = ~word[p1];
          word[p2] = ~word[p2];
          {rd4, rc4} = word;
          #1;
          check(dc4 == d4 && err4, $sformatf("k=16 t=2 correction at %0d,%0d", p1, p2));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
