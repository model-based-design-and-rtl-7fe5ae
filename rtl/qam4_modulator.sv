// qam4_modulator -- one branch (in-phase or quad-phase) of the QAM-4 modulator: the symbol bit
// is mapped to a polar level of -1 or +1 by qam4_mapper and multiplied by the NCO carrier.
//
// The carrier is sfix16_En15 (Q1.15). The product keeps that format; the only value that does
// not fit, -1 x -1.0, saturates to +32767/32768. The output is registered, so y follows bit_i
// and carrier by one clock. The model multiplies in floating point; the fixed-point format
// and the output register are this design's choices.
module qam4_modulator #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bit_i,
  input  logic signed [W-1:0] carrier,
  output logic signed [W-1:0] y
);
  logic signed [1:0]   level;
  logic signed [W+1:0] prod;
  localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W-1));

  qam4_mapper u_map (.b(bit_i), .level(level));

  always_comb prod = level * carrier;

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else if (prod > MAXV) y <= MAXV[W-1:0];
    else if (prod < MINV) y <= MINV[W-1:0];
    else y <= prod[W-1:0];
  end
endmodule
