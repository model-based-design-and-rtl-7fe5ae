// qam4_transceiver -- the part of the SDR that runs on the FPGA: a QAM-4 transmitter with
// QC-LDPC (16,8) encoding and the matching receiver with bit-flipping decoding.
//
// Transmit path: in_bit is taken once per symbol (sym_tick, every OSR samples); eight bits
// form a message m1..m8 (S/P 1 -> 8); the encoder makes the 16-bit codeword; during the next
// frame period the codeword leaves two bits per symbol (P/S 16 -> 2), the first of each pair
// (Y1, Y3, ...) on the in-phase branch and the second (Y2, Y4, ...) on the quad-phase branch.
// Each bit becomes a +-1 level that multiplies the carrier of NCO2 (cosine for in-phase, sine
// for quad-phase). The two branches leave separately as tx_i and tx_q: the channel carries
// them as the real and imaginary parts of one complex signal, they are not summed.
//
// Receive path: rx_i and rx_q are mixed with the carriers of NCO1 (same settings, started
// together with NCO2), low-pass filtered and sampled once per symbol at rx_strobe; a sign
// decision gives one bit per branch; eight bit pairs rebuild the 16-bit word (S/P 2 -> 16) that
// the LDPC decoder corrects; the decoded 8 bits leave one per symbol (P/S 8 -> 1).
//
// Timing: everything runs on the sample clock with enables from symbol_timing. A bit taken at
// the sym_tick of symbol period P comes out on out_bit one clock after the sym_tick of period
// P + 16 (two frames of 8 symbols = 4096 samples at OSR = 256), with out_valid high on that
// cycle. The receiver decision is taken OSR - 40 samples into each symbol, so the channel path
// (modulator register, channel, mixer and filter registers) may add up to a few samples of
// delay without moving a symbol into the next period. Frame alignment uses the shared symbol
// counter. The block structure follows the model; the single clock with enables, the
// widths and the alignment scheme are this design's choices.
module qam4_transceiver
  import qam4_ldpc_pkg::*;
#(
  parameter int OSR      = 256,
  parameter int RX_W     = 18,
  parameter int FIR_TAPS = 32,
  parameter bit FULL_SYNDROME_TEST = 1'b1,
  localparam int CAR_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_bit,
  output logic                    sym_tick,
  output logic signed [CAR_W-1:0] tx_i,
  output logic signed [CAR_W-1:0] tx_q,
  input  logic signed [RX_W-1:0]  rx_i,
  input  logic signed [RX_W-1:0]  rx_q,
  output logic                    out_bit,
  output logic                    out_valid,
  output logic                    dec_done,
  output logic                    dec_err_detected,
  output logic                    dec_syndrome_ok,
  output logic [3:0]              dec_flips
);
  localparam int SUM_W = RX_W + CAR_W + $clog2(FIR_TAPS);

  logic [$clog2(OSR)-1:0] sample_cnt;
  logic [2:0]             sym_idx;
  logic                   rx_strobe;

  symbol_timing #(.OSR(OSR), .SYMS_PER_FRAME(8), .RX_PHASE(OSR - 40)) u_timing (
    .clk, .rst, .sample_cnt, .sym_idx, .sym_tick, .rx_strobe
  );

  // ---------------- transmitter ----------------
  msg_t msg;
  logic msg_valid;
  cw_t  cw;
  logic cw_valid;
  logic [1:0] tx_pair;

  serial_to_parallel #(.W(1), .NW(K)) u_tx_sp (
    .clk, .rst, .en(sym_tick), .idx(sym_idx), .d(in_bit), .frame(msg), .frame_valid(msg_valid)
  );

  ldpc_encoder u_enc (.clk, .rst, .msg_valid, .msg, .cw, .cw_valid);

  parallel_to_serial #(.W(2), .NW(8)) u_tx_ps (
    .clk, .rst, .load(cw_valid), .frame(cw), .en(sym_tick), .idx(sym_idx), .q(tx_pair)
  );

  logic signed [CAR_W-1:0] tx_sin, tx_cos, rx_sin, rx_cos;
  logic                    tx_nco_valid, rx_nco_valid;

  nco u_nco2 (.clk, .rst, .valid_in(1'b1), .sin_o(tx_sin), .cos_o(tx_cos), .valid_out(tx_nco_valid));

  // Demux: first bit of the pair is in-phase, second quad-phase.
  qam4_modulator #(.W(CAR_W)) u_mod_i (.clk, .rst, .bit_i(tx_pair[1]), .carrier(tx_cos), .y(tx_i));
  qam4_modulator #(.W(CAR_W)) u_mod_q (.clk, .rst, .bit_i(tx_pair[0]), .carrier(tx_sin), .y(tx_q));

  // ---------------- receiver ----------------
  nco u_nco1 (.clk, .rst, .valid_in(1'b1), .sin_o(rx_sin), .cos_o(rx_cos), .valid_out(rx_nco_valid));

  logic signed [SUM_W-1:0] y_i, y_q;
  logic                    yv_i, yv_q;
  logic                    det_i, det_q, dv_i, dv_q;

  qam4_demodulator #(.RX_W(RX_W), .CAR_W(CAR_W), .FIR_TAPS(FIR_TAPS)) u_dem_i (
    .clk, .rst, .rx(rx_i), .carrier(rx_cos), .strobe(rx_strobe), .y(y_i), .y_valid(yv_i)
  );
  qam4_demodulator #(.RX_W(RX_W), .CAR_W(CAR_W), .FIR_TAPS(FIR_TAPS)) u_dem_q (
    .clk, .rst, .rx(rx_q), .carrier(rx_sin), .strobe(rx_strobe), .y(y_q), .y_valid(yv_q)
  );

  threshold_detector #(.W(SUM_W)) u_det_i (.clk, .rst, .y(y_i), .y_valid(yv_i), .bit_o(det_i), .bit_valid(dv_i));
  threshold_detector #(.W(SUM_W)) u_det_q (.clk, .rst, .y(y_q), .y_valid(yv_q), .bit_o(det_q), .bit_valid(dv_q));

  // Mux: in-phase bit first, quad-phase bit second.
  cw_t  rx_word;
  logic rx_word_valid;

  serial_to_parallel #(.W(2), .NW(8)) u_rx_sp (
    .clk, .rst, .en(dv_i), .idx(sym_idx), .d({det_i, det_q}), .frame(rx_word), .frame_valid(rx_word_valid)
  );

  msg_t dec_msg;

  ldpc_decoder #(.FULL_SYNDROME_TEST(FULL_SYNDROME_TEST)) u_dec (
    .clk, .rst, .start(rx_word_valid), .y_in(rx_word), .done(dec_done), .msg(dec_msg),
    .err_detected(dec_err_detected), .syndrome_ok(dec_syndrome_ok), .flips(dec_flips)
  );

  logic [0:0] out_word;

  parallel_to_serial #(.W(1), .NW(K)) u_rx_ps (
    .clk, .rst, .load(dec_done), .frame(dec_msg), .en(sym_tick), .idx(sym_idx), .q(out_word)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= sym_tick;
  end
  assign out_bit = out_word[0];

  // The two branches and both oscillators run in lock step, and the decoder finishes within
  // the symbol period of the frame's last decision, before the next symbol tick.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!dec_done || sample_cnt > ($clog2(OSR))'(OSR - 40))
        else $error("LDPC decoder finished after the end of the symbol period");
      assert (dv_i == dv_q) else $error("in-phase and quad-phase detectors out of step");
      assert (tx_nco_valid == rx_nco_valid) else $error("oscillators out of step");
    end
  end
endmodule
