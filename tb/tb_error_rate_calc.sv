// tb_error_rate_calc -- drives random bit pairs with a random enable and checks the error and
// bit counters against counts kept here, and that both clear on reset.
module tb_error_rate_calc;
  logic clk = 0, rst = 1, en = 0, tx = 0, rx = 0;
  logic [31:0] errors, bits;
  int checks = 0, failures = 0;

  error_rate_calc dut (.clk, .rst, .en, .tx, .rx, .errors, .bits);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ne, nb;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      ne = 0; nb = 0;
      for (int c = 0; c < 2000; c++) begin
        en = ($urandom_range(0, 3) != 0);
        tx = 1'($urandom);
        rx = ($urandom_range(0, 9) == 0) ? ~tx : tx;
        if (en) begin nb++; if (tx != rx) ne++; end
        @(negedge clk);
        check(int'(errors) == ne && int'(bits) == nb,
              $sformatf("cycle %0d errors=%0d/%0d bits=%0d/%0d", c, errors, ne, bits, nb));
      end
      en = 0;
      rst = 1;
      @(negedge clk);
      rst = 0;
      check(errors == 0 && bits == 0, "cleared by reset");
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
