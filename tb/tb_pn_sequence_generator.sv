// tb_pn_sequence_generator -- checks the z^6 + z + 1 generator started from 0 0 0 0 0 1: the
// first six outputs are the initial register contents read from register 6 down to 1
// (1 0 0 0 0 0), every later bit obeys b[n] = b[n-5] XOR b[n-6], the period is 63 with 32
// ones, and the output holds while en is low.
module tb_pn_sequence_generator;
  logic clk = 0, rst = 1, en = 0, bit_o;
  int checks = 0, failures = 0;
  bit seq [200];

  pn_sequence_generator dut (.clk, .rst, .en, .bit_o);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ones;
    bit ref_b [200];
    ref_b[0] = 1;
    for (int n = 1; n < 6; n++) ref_b[n] = 0;
    for (int n = 6; n < 200; n++) ref_b[n] = ref_b[n-5] ^ ref_b[n-6];
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      seq[n] = bit_o;
      check(bit_o == ref_b[n], $sformatf("bit %0d = %0d, want %0d", n, bit_o, ref_b[n]));
      // Hold for a few cycles between steps.
      en = 0;
      repeat (n % 3) begin
        @(negedge clk);
        check(bit_o == seq[n], "output moved while en low");
      end
      en = 1;
      @(posedge clk);
      #1 en = 0;
    end
    ones = 0;
    for (int n = 0; n < 63; n++) ones += int'(seq[n]);
    check(ones == 32, $sformatf("ones in one period = %0d", ones));
    for (int n = 0; n < 137; n++) check(seq[n] == seq[n+63], "period 63");
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
