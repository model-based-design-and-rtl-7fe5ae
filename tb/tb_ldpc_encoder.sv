// tb_ldpc_encoder -- encodes all 256 messages in random order with random gaps and checks
// each codeword against m x G computed from a hand-entered copy of the generator rows, one
// clock after msg_valid, and that cw_valid pulses exactly then.
module tb_ldpc_encoder;
  logic clk = 0, rst = 1, msg_valid = 0;
  logic [1:8]  msg = 0;
  logic [1:16] cw;
  logic cw_valid;
  int checks = 0, failures = 0;
  logic [15:0] grow [8] = '{16'b1000000000100001, 16'b0100000000011000, 16'b0010000010000100,
                            16'b0001000001000010, 16'b0000100001001000, 16'b0000010000100100,
                            16'b0000001000010010, 16'b0000000110000001};

  ldpc_encoder dut (.clk, .rst, .msg_valid, .msg, .cw, .cw_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int order [256];
    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (order[k]) begin
      logic [15:0] want;
      want = '0;
      @(negedge clk);
      msg = 8'(order[k]); msg_valid = 1;
      for (int r = 0; r < 8; r++) if (msg[r+1]) want ^= grow[r];
      @(negedge clk);
      msg_valid = 0; msg = 8'($urandom);
      check(cw_valid, "cw_valid after msg_valid");
      check(cw == want, $sformatf("m=%b cw=%b want=%b", 8'(order[k]), cw, want));
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(!cw_valid && cw == want, "cw held, no strobe");
      end
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
