// tb_symbol_timing -- runs the rate controller at its default OSR = 256 for three frames and
// checks that sym_tick comes every 256 cycles, that sym_idx steps 0..7 and wraps at each tick,
// and that rx_strobe comes once per symbol, 216 cycles after the tick.
module tb_symbol_timing;
  logic clk = 0, rst = 1;
  logic [7:0] sample_cnt;
  logic [2:0] sym_idx;
  logic sym_tick, rx_strobe;
  int checks = 0, failures = 0;

  symbol_timing dut (.clk, .rst, .sample_cnt, .sym_idx, .sym_tick, .rx_strobe);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last_tick, ticks, strobes, expect_idx;
    repeat (2) @(posedge clk);
    rst <= 0;
    last_tick = -1; ticks = 0; strobes = 0; expect_idx = 0;
    for (int c = 0; c < 3 * 8 * 256; c++) begin
      @(negedge clk);
      if (sym_tick) begin
        if (last_tick >= 0) check(c - last_tick == 256, $sformatf("tick spacing %0d", c - last_tick));
        check(int'(sym_idx) == expect_idx, $sformatf("sym_idx %0d want %0d", sym_idx, expect_idx));
        expect_idx = (expect_idx + 1) % 8;
        last_tick = c;
        ticks++;
      end
      if (rx_strobe) begin
        check(c - last_tick == 216, $sformatf("rx_strobe %0d after tick", c - last_tick));
        strobes++;
      end
    end
    check(ticks == 24, $sformatf("ticks %0d", ticks));
    check(strobes == 24, $sformatf("strobes %0d", strobes));
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
