// qam4_demodulator -- one branch (in-phase or quad-phase) of the coherent QAM-4 demodulator:
// the received sample is multiplied by the local carrier, low-pass filtered to keep the DC
// term that carries the symbol, and sampled once per symbol for the threshold detector.
//
// Mixing a +-A*cos(wt) symbol with cos(wt) gives +-A/2 plus a term at twice the carrier
// frequency. The low-pass filter is a FIR_TAPS-tap FIR with all coefficients 1 (a boxcar),
// built as a running sum: each clock the newest product is added and the product that falls
// out of a FIR_TAPS-deep delay line is subtracted. With the default carrier of 32 samples per
// period a 32-tap window holds whole periods of the double-frequency term, which therefore
// sums to zero, while the DC term grows by FIR_TAPS.
//
// Formats: rx is sfix(RX_W)_En15, carrier sfix(CAR_W)_En(CAR_W-1); the product and the sum
// are exact (no rounding). Timing: the product is registered (1 clock) and the sum is
// registered (1 clock), so y covers the products of rx samples t-FIR_TAPS-1 .. t-2 at a strobe on
// cycle t, and y / y_valid appear one clock after the strobe. The mixer, FIR low-pass and
// downsampler are the model's structure; the filter coefficients, widths and latencies are
// this design's choices.
module qam4_demodulator #(
  parameter int RX_W     = 18,
  parameter int CAR_W    = 16,
  parameter int FIR_TAPS = 32,
  localparam int PW      = RX_W + CAR_W,
  localparam int SUM_W   = PW + $clog2(FIR_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [RX_W-1:0]  rx,
  input  logic signed [CAR_W-1:0] carrier,
  input  logic                    strobe,
  output logic signed [SUM_W-1:0] y,
  output logic                    y_valid
);
  logic signed [PW-1:0]    prod;
  logic signed [PW-1:0]    dl [FIR_TAPS];
  logic signed [SUM_W-1:0] sum;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod    <= '0;
      sum     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
      for (int i = 0; i < FIR_TAPS; i++) dl[i] <= '0;
    end else begin
      prod  <= rx * carrier;
      dl[0] <= prod;
      for (int i = 1; i < FIR_TAPS; i++) dl[i] <= dl[i-1];
      sum     <= sum + SUM_W'(prod) - SUM_W'(dl[FIR_TAPS-1]);
      y_valid <= strobe;
      if (strobe) y <= sum;
    end
  end
endmodule
