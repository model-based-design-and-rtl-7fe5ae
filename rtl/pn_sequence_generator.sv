// pn_sequence_generator -- pseudo-noise test-data source, a Fibonacci (simple shift register)
// LFSR for the generator polynomial z^6 + z + 1, started from registers 1..6 = 0 0 0 0 0 1.
//
// Registers r[1..DEG] shift one place towards r[DEG] on every enabled cycle; r[1] takes the
// XOR of the registers whose polynomial coefficient is 1 (z^k taps register DEG-k+1, so z^1
// is r[5] and z^6 is r[6]); the output is r[DEG]. The sequence is an m-sequence of period 63
// obeying b[n] = b[n-5] XOR b[n-6].
//
// Interface: en advances one step (the transceiver pulses it once per symbol period);
// bit_o is the current output and changes on the clock edge after en. Synchronous reset
// reloads INIT. The polynomial and initial state are the model's; taking the output from the
// last register (zero output shift) is this design's reading of the generator settings.
module pn_sequence_generator #(
  parameter int            DEG  = 6,
  parameter logic [1:DEG]  TAPS = 6'b000011,  // r[5] (z^1) and r[6] (z^6)
  parameter logic [1:DEG]  INIT = 6'b000001
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic bit_o
);
  logic [1:DEG] r;

  always_ff @(posedge clk) begin
    if (rst) r <= INIT;
    else if (en) r <= {^(r & TAPS), r[1:DEG-1]};
  end

  assign bit_o = r[DEG];
endmodule
