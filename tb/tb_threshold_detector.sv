// tb_threshold_detector -- checks the decision y > 0 for zero, +-1, the extremes and random
// values, its one-clock latency, and that the decision holds between strobes.
module tb_threshold_detector;
  logic clk = 0, rst = 1, y_valid = 0, bit_o, bit_valid;
  logic signed [39:0] y = 0;
  int checks = 0, failures = 0;

  threshold_detector #(.W(40)) dut (.clk, .rst, .y, .y_valid, .bit_o, .bit_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 500; k++) begin
      logic signed [39:0] v;
      bit want;
      case (k % 8)
        0: v = 0;
        1: v = 1;
        2: v = -1;
        3: v = {1'b0, {39{1'b1}}};
        4: v = {1'b1, {39{1'b0}}};
        default: v = {8'($urandom), 32'($urandom)};
      endcase
      want = (v > 0);
      @(negedge clk);
      y = v; y_valid = 1;
      @(negedge clk);
      y_valid = 0; y = -y;
      check(bit_valid && bit_o == want, $sformatf("y=%0d bit=%0d", v, bit_o));
      @(negedge clk);
      check(!bit_valid && bit_o == want, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
