// tb_parallel_to_serial -- loads a random 16-bit frame during each frame period and checks
// that in the following period word i (bits 2i+1, 2i+2) comes out after the enable with
// idx = i, and that the output holds between enables.
module tb_parallel_to_serial;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [2:0] idx = 0;
  logic [1:16] frame = 0;
  logic [1:0] q;
  int checks = 0, failures = 0;

  parallel_to_serial #(.W(2), .NW(8)) dut (.clk, .rst, .load, .frame, .en, .idx, .q);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:16] prev, cur;
    repeat (2) @(posedge clk);
    rst <= 0;
    prev = '0;
    for (int f = 0; f < 40; f++) begin
      cur = 16'($urandom);
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        en = 1; idx = 3'(i);
        load = (i == 3); frame = cur;
        @(negedge clk);
        en = 0; load = 0;
        check(q == {prev[2*i+1], prev[2*i+2]}, $sformatf("frame %0d word %0d: %b", f, i, q));
        repeat (2) begin
          @(negedge clk);
          check(q == {prev[2*i+1], prev[2*i+2]}, "hold");
        end
      end
      prev = cur;
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
