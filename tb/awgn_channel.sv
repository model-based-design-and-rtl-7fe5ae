// awgn_channel -- behavioural model (not synthesizable) of the channel between the
// transmitter outputs and the receiver inputs: complex additive white Gaussian noise followed
// by the one-sample delay of the loop back to the receiver.
//
// The in-phase and quad-phase samples (sfix16_En15) are the real and imaginary parts of one
// complex signal. The noise is set the way a Simulink-style AWGN block in Eb/No mode sets it,
// with one symbol per sample: the total noise variance is SIG_POWER / (BITS_PER_SYM *
// 10^(EbNo/10)), split equally between real and imaginary parts. With SIG_POWER = 4 and 2 bits
// per symbol that is a standard deviation of 1.0 (full scale) per part at 0 dB. Gaussian
// samples come from the Box-Muller method on $urandom; the first call seeds it with SEED.
// The result is rounded to sfix(RX_W)_En15 with saturation and registered (one clock).
// noise_on = 0 gives a clean channel; invert_i / invert_q negate a branch, which a testbench
// uses to force symbol errors.
module awgn_channel #(
  parameter int  RX_W         = 18,
  parameter int  SEED         = 56,
  parameter real SIG_POWER    = 4.0,
  parameter int  BITS_PER_SYM = 2
) (
  input  logic                   clk,
  input  logic                   noise_on,
  input  real                    ebno_db,
  input  logic                   invert_i,
  input  logic                   invert_q,
  input  logic signed [15:0]     in_i,
  input  logic signed [15:0]     in_q,
  output logic signed [RX_W-1:0] out_i,
  output logic signed [RX_W-1:0] out_q
);
  localparam real SCALE = 32768.0;
  localparam real MAXV  = real'((1 << (RX_W - 1)) - 1);
  localparam real MINV  = -real'(1 << (RX_W - 1));

  bit seeded = 0;

  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic logic signed [RX_W-1:0] quant(real v);
    real r;
    r = $floor(v * SCALE + 0.5);
    if (r > MAXV) r = MAXV;
    if (r < MINV) r = MINV;
    return RX_W'($rtoi(r));
  endfunction

  initial out_i = '0;
  initial out_q = '0;

  always @(posedge clk) begin
    real sigma, u1, u2, mag, ni, nq, si, sq;
    if (!seeded) begin
      void'($urandom(SEED));
      seeded = 1;
    end
    sigma = $sqrt(SIG_POWER / (real'(BITS_PER_SYM) * $pow(10.0, ebno_db / 10.0)) / 2.0);
    u1  = uniform01();
    u2  = uniform01();
    mag = $sqrt(-2.0 * $ln(u1));
    ni  = noise_on ? sigma * mag * $cos(2.0 * 3.141592653589793 * u2) : 0.0;
    nq  = noise_on ? sigma * mag * $sin(2.0 * 3.141592653589793 * u2) : 0.0;
    si  = real'(in_i) / SCALE;
    sq  = real'(in_q) / SCALE;
    if (invert_i) si = -si;
    if (invert_q) sq = -sq;
    out_i <= quant(si + ni);
    out_q <= quant(sq + nq);
  end
endmodule
