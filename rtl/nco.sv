// nco -- numerically controlled oscillator producing the sine and cosine carriers of the
// QAM-4 modulator and demodulator.
//
// An ACC_W-bit phase accumulator advances by PHASE_INC every valid_in cycle; with the defaults
// (16-bit accumulator, increment 2048) the carrier period is 65536 / 2048 = 32 samples, i.e.
// 8 carrier cycles per 256-sample symbol. The phase plus PHASE_OFFSET plus a DITHER_BITS-bit
// pseudo-random dither (from a 16-bit LFSR, x^16 + x^14 + x^13 + x^11 + 1) is truncated to
// QUANT_W bits. The top two bits select the quadrant and the rest index a quarter-wave table
// of 2^(QUANT_W-2) + 1 entries, round(32767 * sin(pi/2 * k / 2^(QUANT_W-2))), computed at
// elaboration. Cosine is the sine of the phase advanced by a quarter period. Outputs are
// sfix16_En15 (Q1.15).
//
// Timing: six register stages, so the sample for the phase accumulated at valid_in on cycle t
// leaves on cycle t + 6 with valid_out (latency 6 as in the model). The first sample after
// reset has phase PHASE_OFFSET + dither. Phase increment, offset, dither width, output type
// and latency are the model's settings; the accumulator and quantizer widths, the dither
// source and the table layout are this design's choices.
module nco #(
  parameter int                  ACC_W        = 16,
  parameter logic [ACC_W-1:0]    PHASE_INC    = 16'd2048,
  parameter logic [ACC_W-1:0]    PHASE_OFFSET = 16'd0,
  parameter int                  DITHER_BITS  = 4,
  parameter int                  QUANT_W      = 12,
  parameter int                  OUT_W        = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    valid_in,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o,
  output logic                    valid_out
);
  localparam int L  = 1 << (QUANT_W - 2);   // quarter-wave table length
  localparam int IW = QUANT_W - 1;          // table index width (0 .. L)

  typedef logic signed [OUT_W-1:0] lut_t [0:L];

  function automatic lut_t make_lut();
    lut_t t;
    real amp;
    amp = real'((1 << (OUT_W - 1)) - 1);
    for (int k = 0; k <= L; k++)
      t[k] = OUT_W'($rtoi($floor(amp * $sin(1.5707963267948966 * real'(k) / real'(L)) + 0.5)));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  // Stage 1: accumulator and dither generator.
  logic [ACC_W-1:0] acc, ph1;
  logic [15:0]      lfsr;
  logic [DITHER_BITS-1:0] dith1;
  // Stage 2: dithered, offset phase, truncated to QUANT_W bits.
  logic [QUANT_W-1:0] ph2;
  logic [ACC_W-1:0]   ph_full;
  // Stage 3: sign (phase in the second half of the period) and table index.
  logic             ns3, nc3;
  logic [IW-1:0]    is3, ic3;
  // Stage 4: table outputs and signs.
  logic signed [OUT_W-1:0] ms4, mc4;
  logic             ns4, nc4;
  // Stage 5: signed values.
  logic signed [OUT_W-1:0] s5, c5;
  logic [5:0]       vpipe;

  logic [QUANT_W-1:0] qph, qphc;
  assign ph_full = ph1 + PHASE_OFFSET + ACC_W'(dith1);
  assign qph     = ph2;
  assign qphc = qph + QUANT_W'(L);

  // Index into the quarter-wave table for a quantized phase.
  function automatic logic [IW-1:0] lut_index(logic [QUANT_W-1:0] a);
    logic [IW-1:0] low;
    low = IW'(a[QUANT_W-3:0]);
    return a[QUANT_W-2] ? IW'(L) - low : low;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      ph1   <= '0;
      lfsr  <= 16'hACE1;
      dith1 <= '0;
      ph2   <= '0;
      ns3   <= 1'b0;
      nc3   <= 1'b0;
      is3   <= '0;
      ic3   <= '0;
      ms4   <= '0;
      mc4   <= '0;
      ns4   <= 1'b0;
      nc4   <= 1'b0;
      s5    <= '0;
      c5    <= '0;
      sin_o <= '0;
      cos_o <= '0;
      vpipe <= '0;
    end else begin
      vpipe <= {vpipe[4:0], valid_in};
      if (valid_in) begin
        ph1   <= acc;
        acc   <= acc + PHASE_INC;
        lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        dith1 <= lfsr[DITHER_BITS-1:0];
      end
      ph2   <= ph_full[ACC_W-1 -: QUANT_W];
      ns3   <= qph[QUANT_W-1];
      nc3   <= qphc[QUANT_W-1];
      is3   <= lut_index(qph);
      ic3   <= lut_index(qphc);
      ms4   <= LUT[is3];
      mc4   <= LUT[ic3];
      ns4   <= ns3;
      nc4   <= nc3;
      s5    <= ns4 ? -ms4 : ms4;
      c5    <= nc4 ? -mc4 : mc4;
      sin_o <= s5;
      cos_o <= c5;
    end
  end

  assign valid_out = vpipe[5];
endmodule
