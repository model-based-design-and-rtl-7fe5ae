// tb_sdr_qam4_top -- end-to-end test of the whole link at its default sizes (OSR = 256,
// 4096-sample reference delay): PN source, LDPC encoder, QAM-4 modulator, AWGN channel with
// a one-sample loop delay, demodulator, detector, LDPC decoder and bit-error counter.
//
// Phases:
//   1. clean channel, 20 frames: no bit errors, no decoder corrections;
//   2. one forced symbol error per frame (one branch negated for one symbol), 16 frames: the
//      decoder detects and corrects each, still no bit errors;
//   3. Eb/No sweep of -20, -15, -10, -5, 0, 5 and 10 dB, FRAMES_PER_POINT frames each: prints the
//      bit error rate after decoding per point; no errors at 0, 5 and 10 dB, errors at -20 dB,
//      and the error rate does not grow with Eb/No.
// Mechanisms counted (each must occur): error-free frames, frames with a detected error,
// corrected frames (syndrome zero after flips), decoded-bit errors counted by the error counter.
module tb_sdr_qam4_top;
  localparam int FRAMES_PER_POINT = 1000;
  localparam int FRAME = 8 * 256;

  logic clk = 0, rst = 1;
  logic signed [15:0] tx_i, tx_q;
  logic signed [17:0] rx_i, rx_q;
  logic tx_bit, rx_bit, rx_valid, dec_done, dec_err_detected, dec_syndrome_ok;
  logic [31:0] errors, bits;
  logic [3:0] dec_flips;
  logic noise_on = 0, inv_i = 0, inv_q = 0;
  real ebno = 0.0;
  int checks = 0, failures = 0;
  int n_clean = 0, n_detected = 0, n_corrected = 0, n_residual = 0;

  sdr_qam4_top dut (.clk, .rst, .tx_i, .tx_q, .rx_i, .rx_q, .tx_bit, .rx_bit, .rx_valid,
    .errors, .bits, .dec_done, .dec_err_detected, .dec_syndrome_ok, .dec_flips);

  awgn_channel u_ch (.clk, .noise_on, .ebno_db(ebno), .invert_i(inv_i), .invert_q(inv_q),
    .in_i(tx_i), .in_q(tx_q), .out_i(rx_i), .out_q(rx_q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst && dec_done) begin
    if (!dec_err_detected) n_clean++;
    else begin
      n_detected++;
      if (dec_syndrome_ok) n_corrected++; else n_residual++;
    end
  end

  initial begin
    int e0, b0, c0;
    real pts [7] = '{-20.0, -15.0, -10.0, -5.0, 0.0, 5.0, 10.0};
    real ber [7];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;

    // 1. clean channel
    repeat (20 * FRAME) @(negedge clk);
    check(bits > 100 && errors == 0, $sformatf("clean: errors %0d of %0d", errors, bits));
    check(n_detected == 0, "clean: no decoder corrections");

    // 2. forced single symbol errors, aligned to frame starts
    do @(negedge clk); while (!(dut.u_trx.sym_tick && dut.u_trx.sym_idx == 0));
    c0 = n_corrected;
    for (int f = 0; f < 16; f++) begin
      repeat ((f % 8) * 256) @(negedge clk);
      inv_i = (f % 2 == 0);
      inv_q = (f % 2 == 1);
      repeat (256) @(negedge clk);
      inv_i = 0;
      inv_q = 0;
      repeat ((7 - f % 8) * 256) @(negedge clk);
    end
    repeat (3 * FRAME) @(negedge clk);
    check(n_corrected - c0 == 16, $sformatf("forced errors corrected in %0d of 16 frames", n_corrected - c0));
    check(errors == 0, $sformatf("forced errors: %0d bit errors after decoding", errors));

    // 3. Eb/No sweep
    noise_on = 1;
    for (int p = 0; p < 7; p++) begin
      ebno = pts[p];
      repeat (3 * FRAME) @(negedge clk);   // flush symbols of the previous point
      e0 = errors; b0 = bits;
      repeat (FRAMES_PER_POINT * FRAME) @(negedge clk);
      ber[p] = real'(errors - e0) / real'(bits - b0);
      $display("Eb/No %6.1f dB: %0d errors in %0d bits, BER %e", pts[p], errors - e0, bits - b0, ber[p]);
    end
    check(ber[0] > 0.0, "errors at -20 dB");
    check(ber[4] == 0.0, "no errors at 0 dB");
    check(ber[5] == 0.0, "no errors at 5 dB");
    check(ber[6] == 0.0, "no errors at 10 dB");
    for (int p = 1; p < 7; p++) check(ber[p] <= ber[p-1], $sformatf("BER does not grow from %0.0f dB", pts[p-1]));

    $display("frames: clean %0d, error detected %0d, corrected %0d, residual %0d",
             n_clean, n_detected, n_corrected, n_residual);
    check(n_clean > 0, "mechanism: error-free frame");
    check(n_detected > 0, "mechanism: detected error");
    check(n_corrected > 0, "mechanism: corrected frame");
    check(n_residual == 0, "final syndrome always zero");
    check(errors > 0, "mechanism: bit errors counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((60 + 7 * (FRAMES_PER_POINT + 3)) * FRAME) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
