// tb_serial_to_parallel -- feeds random 2-bit words at positions 0..7 with random gaps and
// checks that each completed 16-bit frame holds word i in bits 2i+1, 2i+2 and that
// frame_valid pulses once, on the cycle after the last word.
module tb_serial_to_parallel;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] idx = 0;
  logic [1:0] d = 0;
  logic [1:16] frame;
  logic frame_valid;
  int checks = 0, failures = 0;

  serial_to_parallel #(.W(2), .NW(8)) dut (.clk, .rst, .en, .idx, .d, .frame, .frame_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 50; f++) begin
      logic [1:16] want;
      for (int i = 0; i < 8; i++) begin
        logic [1:0] w;
        w = 2'($urandom);
        want[2*i+1] = w[1];
        want[2*i+2] = w[0];
        @(negedge clk);
        en = 1; idx = 3'(i); d = w;
        @(negedge clk);
        en = 0;
        check(frame_valid == (i == 7), $sformatf("frame_valid at word %0d", i));
        if (i == 7) check(frame == want, $sformatf("frame %b want %b", frame, want));
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          check(!frame_valid, "frame_valid held");
        end
      end
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
