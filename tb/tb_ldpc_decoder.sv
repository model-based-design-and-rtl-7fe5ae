// tb_ldpc_decoder -- checks the bit-flipping decoder (full-syndrome test, and the variant that
// tests only the current check) against a behavioural model of the algorithm that works
// from the syndrome equations, and checks the latency bound of 25 cycles from start to done.
// Cases: every message without errors; every message with every single-bit error (all must
// be corrected with exactly one flip); random double and triple errors (decoded message,
// flip count and final-syndrome flag must match the model). Then every double and every
// triple error pattern is run once and the decoded messages that come out right are counted:
// with minimum distance 3 only single errors can always be corrected, and 32 of the 120
// double and 52 of the 560 triple patterns end on the sent codeword. Errors in all eight
// message bits form a codeword themselves, so they must pass undetected.
module tb_ldpc_decoder;
  logic clk = 0, rst = 1, start = 0;
  logic [1:16] y_in = 0;
  logic done_a, done_b, errd_a, errd_b, sok_a, sok_b;
  logic [1:8] msg_a, msg_b;
  logic [3:0] flips_a, flips_b;
  int checks = 0, failures = 0;
  bit last_ok_a;                   // decoder A returned the sent message in the last run
  int eq [8][3] = '{'{3, 8, 9}, '{4, 5, 10}, '{1, 6, 11}, '{2, 7, 12},
                    '{2, 5, 13}, '{3, 6, 14}, '{4, 7, 15}, '{1, 8, 16}};
  logic [15:0] grow [8] = '{16'b1000000000100001, 16'b0100000000011000, 16'b0010000010000100,
                            16'b0001000001000010, 16'b0000100001001000, 16'b0000010000100100,
                            16'b0000001000010010, 16'b0000000110000001};

  ldpc_decoder #(.FULL_SYNDROME_TEST(1'b1)) dut_a (.clk, .rst, .start, .y_in, .done(done_a), .msg(msg_a),
    .err_detected(errd_a), .syndrome_ok(sok_a), .flips(flips_a));
  ldpc_decoder #(.FULL_SYNDROME_TEST(1'b0)) dut_b (.clk, .rst, .start, .y_in, .done(done_b), .msg(msg_b),
    .err_detected(errd_b), .syndrome_ok(sok_b), .flips(flips_b));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:8] syn(logic [1:16] y);
    logic [1:8] s;
    for (int r = 0; r < 8; r++) s[r+1] = y[eq[r][0]] ^ y[eq[r][1]] ^ y[eq[r][2]];
    return s;
  endfunction

  function automatic logic [1:16] enc(logic [1:8] m);
    logic [15:0] x;
    x = '0;
    for (int r = 0; r < 8; r++) if (m[r+1]) x ^= grow[r];
    return x;
  endfunction

  // Behavioural model of the algorithm: returns the corrected word and the flip count.
  function automatic logic [1:16] model(logic [1:16] y, bit full, output int nflip);
    nflip = 0;
    for (int r = 0; r < 8; r++) begin
      if (syn(y)[r+1]) begin
        for (int t = 0; t < 3; t++) begin
          logic [1:16] yt;
          bit ok;
          yt = y;
          yt[eq[r][t]] = ~yt[eq[r][t]];
          ok = full ? (syn(yt) == '0) : (syn(yt)[r+1] == 1'b0);
          if (ok || t == 2) begin
            y = yt;
            nflip++;
            break;
          end
        end
      end
    end
    return y;
  endfunction

  task automatic run(logic [1:8] m, logic [1:16] e, bit must_correct);
    logic [1:16] y, ya, yb;
    int na, nb, cyc;
    y  = enc(m) ^ e;
    ya = model(y, 1'b1, na);
    yb = model(y, 1'b0, nb);
    @(negedge clk);
    y_in = y; start = 1;
    @(negedge clk);
    start = 0; y_in = 16'($urandom);
    cyc = 1;
    while (!done_a && cyc < 40) begin @(negedge clk); cyc++; end
    check(done_a && cyc <= 25, $sformatf("decoder A latency %0d", cyc));
    check(msg_a == ya[1:8], $sformatf("A: y=%b msg=%b model=%b", y, msg_a, ya[1:8]));
    check(int'(flips_a) == na, $sformatf("A: flips %0d model %0d", flips_a, na));
    check(errd_a == (syn(y) != '0), "A: err_detected");
    check(sok_a == (syn(ya) == '0), "A: syndrome_ok");
    last_ok_a = (msg_a == m);
    if (must_correct) check(msg_a == m && sok_a, $sformatf("A: single error not corrected y=%b", y));
    while (!done_b && cyc < 40) begin @(negedge clk); cyc++; end
    check(msg_b == yb[1:8] && int'(flips_b) == nb && sok_b == (syn(yb) == '0),
          $sformatf("B: y=%b msg=%b model=%b", y, msg_b, yb[1:8]));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 256; m++) run(8'(m), '0, 1'b0);
    for (int m = 0; m < 256; m++)
      for (int j = 1; j <= 16; j++) begin
        logic [1:16] e;
        e = '0; e[j] = 1'b1;
        run(8'(m), e, 1'b1);
      end
    for (int k = 0; k < 2000; k++) begin
      logic [1:16] e;
      int a, b, c;
      a = $urandom_range(1, 16); b = $urandom_range(1, 16); c = $urandom_range(1, 16);
      e = '0; e[a] = 1'b1; e[b] ^= 1'b1;
      if (k % 2 == 1) e[c] ^= 1'b1;
      run(8'($urandom), e, 1'b0);
    end
    for (int w = 2; w <= 3; w++) begin
      int n_ok, n_all;
      n_ok = 0; n_all = 0;
      for (int a = 1; a <= 16; a++)
        for (int b = a + 1; b <= 16; b++)
          for (int c = (w == 3 ? b + 1 : 17); c <= (w == 3 ? 16 : 17); c++) begin
            logic [1:16] e;
            e = '0; e[a] = 1'b1; e[b] = 1'b1;
            if (w == 3) e[c] = 1'b1;
            run(8'($urandom), e, 1'b0);
            n_all++;
            if (last_ok_a) n_ok++;
          end
      $display("weight-%0d errors: %0d of %0d corrected", w, n_ok, n_all);
      check(n_all == (w == 2 ? 120 : 560) && n_ok == (w == 2 ? 32 : 52),
            $sformatf("weight-%0d errors: %0d of %0d corrected", w, n_ok, n_all));
    end
    run(8'h5A, 16'hFF00, 1'b0);
    check(!errd_a && msg_a == 8'hA5, "all eight message bits in error must pass as a codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
