// tb_qam4_transceiver -- loops the transceiver's outputs back to its inputs through a clean
// channel with a one-sample delay and sends random bits. Checks that every decoded bit equals
// the bit sent exactly 16 symbol periods (4096 samples) earlier, i.e. that out_valid comes
// one clock after a sym_tick and carries the bit taken at the sym_tick 4096 cycles before.
// Then forces symbol errors by negating one branch for one symbol in some frames (one bit
// error per codeword) and checks that the decoder reports and corrects them.
module tb_qam4_transceiver;
  logic clk = 0, rst = 1, in_bit = 0, sym_tick;
  logic signed [15:0] tx_i, tx_q;
  logic signed [17:0] rx_i, rx_q;
  logic out_bit, out_valid, dec_done, dec_err_detected, dec_syndrome_ok;
  logic [3:0] dec_flips;
  logic inv_i = 0, inv_q = 0;
  int checks = 0, failures = 0;
  int corrected = 0, frames = 0;
  bit sent [$];
  longint tick_cycle [$];
  longint cyc = 0;

  qam4_transceiver dut (.clk, .rst, .in_bit, .sym_tick, .tx_i, .tx_q, .rx_i, .rx_q,
    .out_bit, .out_valid, .dec_done, .dec_err_detected, .dec_syndrome_ok, .dec_flips);

  awgn_channel u_ch (.clk, .noise_on(1'b0), .ebno_db(0.0), .invert_i(inv_i), .invert_q(inv_q),
    .in_i(tx_i), .in_q(tx_q), .out_i(rx_i), .out_q(rx_q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  // Record the bit taken at every symbol tick.
  always @(posedge clk) if (!rst && sym_tick) begin
    sent.push_back(in_bit);
    tick_cycle.push_back(cyc);
  end

  // Compare each decoded bit with the bit of 16 symbols earlier.
  int outs = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    if (outs >= 16) begin
      check(out_bit == sent[outs - 16], $sformatf("decoded bit %0d = %0d, sent %0d", outs - 16, out_bit, sent[outs - 16]));
      check(cyc - tick_cycle[outs - 16] == 4096 + 1, $sformatf("latency %0d", cyc - tick_cycle[outs - 16]));
    end
    outs++;
  end

  always @(posedge clk) if (!rst && dec_done) begin
    frames++;
    if (dec_err_detected && dec_syndrome_ok && dec_flips == 1) corrected++;
  end

  // New random input bit after each tick.
  always @(posedge clk) if (sym_tick) in_bit <= 1'($urandom);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // 20 clean frames.
    repeat (20 * 8 * 256) @(posedge clk);
    check(corrected == 0, "no corrections on a clean channel");
    // 20 frames with one forced symbol error each, alternating branch and position.
    // Align to the first symbol tick of a frame; drive the channel controls half a cycle
    // after the clock edge.
    do @(posedge clk); while (!(sym_tick && sent.size() % 8 == 0));
    @(negedge clk);
    for (int f = 0; f < 20; f++) begin
      int pos;
      pos = f % 8;
      repeat (pos * 256) @(negedge clk);
      inv_i = (f % 2 == 0);
      inv_q = (f % 2 == 1);
      repeat (256) @(negedge clk);
      inv_i = 0;
      inv_q = 0;
      repeat ((7 - pos) * 256) @(negedge clk);
    end
    repeat (3 * 8 * 256) @(posedge clk);
    check(corrected >= 19, $sformatf("corrected frames %0d", corrected));
    check(outs > 300, $sformatf("decoded bits %0d", outs));
    $display("frames %0d, corrected %0d, decoded bits %0d", frames, corrected, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * 8 * 256) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
