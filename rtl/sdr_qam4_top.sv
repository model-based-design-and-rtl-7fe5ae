// sdr_qam4_top -- QAM-4 software-defined-radio link with QC-LDPC (16,8) coding, as it runs
// around the channel: a PN test-data source, the FPGA transceiver, a reference delay and a
// bit-error counter. The AWGN channel itself is outside: tx_i / tx_q go out as the real and
// imaginary parts of the transmitted signal and rx_i / rx_q come back after the channel.
//
// The PN generator (z^6 + z + 1) makes one bit per symbol period. That bit, upsampled to the
// sample rate (high for one sample at most per symbol, zeros between), is delayed by DELAY =
// 4096 samples, the end-to-end delay of the transceiver at OSR = 256, and compared with each
// decoded bit; errors / bits is the bit error rate, counted once the delay line has filled.
// tx_bit and rx_bit are the two upsampled streams, for display.
//
// Timing: one sample per clock. Reset is synchronous and active high. The structure follows
// the model; comparing only at the decoded-bit strobe and the status outputs are this
// design's choices.
module sdr_qam4_top #(
  parameter int OSR      = 256,
  parameter int DELAY    = 16 * OSR,
  parameter int RX_W     = 18,
  parameter int FIR_TAPS = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic signed [15:0]     tx_i,
  output logic signed [15:0]     tx_q,
  input  logic signed [RX_W-1:0] rx_i,
  input  logic signed [RX_W-1:0] rx_q,
  output logic                   tx_bit,
  output logic                   rx_bit,
  output logic                   rx_valid,
  output logic [31:0]            errors,
  output logic [31:0]            bits,
  output logic                   dec_done,
  output logic                   dec_err_detected,
  output logic                   dec_syndrome_ok,
  output logic [3:0]             dec_flips
);
  logic sym_tick, pn_bit, out_bit, out_valid, ref_bit, primed;

  pn_sequence_generator u_pn (.clk, .rst, .en(sym_tick), .bit_o(pn_bit));

  qam4_transceiver #(.OSR(OSR), .RX_W(RX_W), .FIR_TAPS(FIR_TAPS)) u_trx (
    .clk, .rst, .in_bit(pn_bit), .sym_tick, .tx_i, .tx_q, .rx_i, .rx_q,
    .out_bit, .out_valid, .dec_done, .dec_err_detected, .dec_syndrome_ok, .dec_flips
  );

  // Upsampled reference: the PN bit on the sample after the symbol tick, zero otherwise,
  // so that after DELAY samples it meets the decoded bit of the same symbol.
  always_ff @(posedge clk) begin
    if (rst) tx_bit <= 1'b0;
    else     tx_bit <= sym_tick & pn_bit;
  end

  delay_line #(.DEPTH(DELAY)) u_delay (.clk, .rst, .d(tx_bit), .q(ref_bit), .primed);

  error_rate_calc #(.CNT_W(32)) u_err (
    .clk, .rst, .en(out_valid & primed), .tx(ref_bit), .rx(out_bit), .errors, .bits
  );

  assign rx_bit   = out_valid & out_bit;
  assign rx_valid = out_valid;
endmodule
