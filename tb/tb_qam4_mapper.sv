// tb_qam4_mapper -- checks the polar mapping 0 -> -1, 1 -> +1.
module tb_qam4_mapper;
  logic b;
  logic signed [1:0] level;
  int checks = 0, failures = 0;

  qam4_mapper dut (.b, .level);

  initial begin
    for (int k = 0; k < 4; k++) begin
      b = k[0];
      #1;
      checks++;
      if (int'(level) != (b ? 1 : -1)) begin
        failures++;
        $display("FAIL: b=%0d level=%0d", b, level);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
