// tb_qam4_demodulator -- drives a +-A cos symbol stream plus random noise and a cosine local
// carrier, strobes every 256 cycles at sample 216 of each symbol, and checks each y against
// the sum of rx*carrier over the 32 samples the filter covers (the rx samples 2 .. 33 cycles
// before the strobe), computed here from a history of the inputs; also checks that y_valid
// follows the strobe by one clock and that the sign of y equals the transmitted symbol.
module tb_qam4_demodulator;
  localparam int SUM_W = 18 + 16 + 5;
  logic clk = 0, rst = 1, strobe = 0;
  logic signed [17:0] rx = 0;
  logic signed [15:0] carrier = 0;
  logic signed [SUM_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  longint hist_rx [0:63], hist_car [0:63];

  qam4_demodulator dut (.clk, .rst, .rx, .carrier, .strobe, .y, .y_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    bit sym;
    for (int i = 0; i < 64; i++) begin hist_rx[i] = 0; hist_car[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    n = 0;
    for (int s = 0; s < 60; s++) begin
      sym = 1'($urandom);
      for (int k = 0; k < 256; k++) begin
        real c;
        longint want;
        c = $cos(2.0 * 3.141592653589793 * real'(n) / 32.0);
        carrier = 16'($rtoi(32767.0 * c));
        rx = 18'($rtoi((sym ? 1.0 : -1.0) * 32767.0 * c) + int'($urandom_range(0, 8000)) - 4000);
        strobe = (k == 216);
        // history: index 0 is the current cycle
        for (int i = 63; i > 0; i--) begin hist_rx[i] = hist_rx[i-1]; hist_car[i] = hist_car[i-1]; end
        hist_rx[0] = longint'(rx); hist_car[0] = longint'(carrier);
        want = 0;
        for (int i = 2; i <= 33; i++) want += hist_rx[i] * hist_car[i];
        @(negedge clk);
        check(y_valid == (k == 216), "y_valid timing");
        if (k == 216 && s > 0) begin
          check(longint'(y) == want, $sformatf("symbol %0d y=%0d want=%0d", s, y, want));
          check((y > 0) == sym, $sformatf("symbol %0d sign", s));
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
