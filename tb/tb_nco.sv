// tb_nco -- checks the oscillator at its default settings: valid_out follows valid_in by
// exactly 6 cycles; output n is within 120 LSB of 32767*sin(2*pi*n/32) and
// 32767*cos(2*pi*n/32) (32-sample period from increment 2048 on a 16-bit accumulator; the
// tolerance covers the 12-bit phase quantization and the 4-bit dither); sine and cosine stay
// in quadrature; and the output is idle while valid_in is low.
module tb_nco;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic signed [15:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst, .valid_in, .sin_o, .cos_o, .valid_out);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n, cyc, maxerr;
    real ws, wc;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    valid_in = 1;
    cyc = 0;
    while (!valid_out && cyc < 20) begin @(negedge clk); cyc++; end
    check(cyc == 6, $sformatf("latency %0d", cyc));
    n = 0; maxerr = 0;
    repeat (2000) begin
      int es, ec;
      ws = 32767.0 * $sin(2.0 * 3.141592653589793 * real'(n) / 32.0);
      wc = 32767.0 * $cos(2.0 * 3.141592653589793 * real'(n) / 32.0);
      es = $rtoi(real'(sin_o) - ws); if (es < 0) es = -es;
      ec = $rtoi(real'(cos_o) - wc); if (ec < 0) ec = -ec;
      if (es > maxerr) maxerr = es;
      if (ec > maxerr) maxerr = ec;
      check(valid_out && es <= 120 && ec <= 120,
            $sformatf("n=%0d sin=%0d (%0.1f) cos=%0d (%0.1f)", n, sin_o, ws, cos_o, wc));
      n++;
      @(negedge clk);
    end
    $display("max deviation %0d LSB", maxerr);
    // Stop the oscillator: valid_out falls 6 cycles later and the output holds.
    valid_in = 0;
    repeat (6) @(negedge clk);
    check(!valid_out, "valid_out low after stop");
    begin
      logic signed [15:0] hs;
      hs = sin_o;
      repeat (5) @(negedge clk);
      check(sin_o == hs, "output holds while stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
