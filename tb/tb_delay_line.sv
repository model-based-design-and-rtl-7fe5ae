// tb_delay_line -- at the default depth of 4096 drives random bits and checks that q is 0
// until primed rises, that primed rises after exactly 4096 cycles, and that afterwards q
// equals the input of 4096 cycles earlier.
module tb_delay_line;
  localparam int DEPTH = 4096;
  logic clk = 0, rst = 1, d = 0, q, primed;
  int checks = 0, failures = 0;
  bit hist [$];

  delay_line dut (.clk, .rst, .d, .q, .primed);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3 * DEPTH; c++) begin
      d = 1'($urandom);
      hist.push_back(d);
      #1;
      check(primed == (c >= DEPTH), $sformatf("primed at cycle %0d", c));
      if (c >= DEPTH) check(q == hist[c - DEPTH], $sformatf("q at cycle %0d", c));
      else            check(q == 1'b0, "q zero before primed");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * DEPTH) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
