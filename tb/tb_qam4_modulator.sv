// tb_qam4_modulator -- drives random carrier samples (including the extremes) and bits and
// checks that one clock later y = +carrier for bit 1 and -carrier for bit 0, with -(-32768)
// saturated to 32767.
module tb_qam4_modulator;
  logic clk = 0, rst = 1, bit_i = 0;
  logic signed [15:0] carrier = 0, y;
  int checks = 0, failures = 0;

  qam4_modulator dut (.clk, .rst, .bit_i, .carrier, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 3000; k++) begin
      int want;
      @(negedge clk);
      bit_i = 1'($urandom);
      case (k % 10)
        0: carrier = -16'sd32768;
        1: carrier = 16'sd32767;
        2: carrier = 16'sd0;
        default: carrier = 16'($urandom);
      endcase
      want = bit_i ? int'(carrier) : -int'(carrier);
      if (want > 32767) want = 32767;
      @(negedge clk);
      checks++;
      if (int'(y) != want) begin
        failures++;
        $display("FAIL: bit=%0d carrier=%0d y=%0d want=%0d", bit_i, carrier, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
