// qam4_mapper -- the QAM-4 "multiplexer": turns a data bit into a polar level, 0 -> -1 and
// 1 -> +1, as a 2-bit two's-complement value. The model forms (b == 0) * (-1) + (b == 1) * (+1)
// in floating point; this is the same function in fixed point. Purely combinational.
module qam4_mapper (
  input  logic              b,
  output logic signed [1:0] level
);
  always_comb level = b ? 2'sd1 : -2'sd1;
endmodule
