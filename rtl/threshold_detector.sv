// threshold_detector -- hard-decision detector of one demodulator branch: the decision is 1
// when the filtered, downsampled sample is greater than zero, otherwise 0 (the comparator
// against the constant 0 of the model). Interface: the decision of a sample offered with
// y_valid appears on bit_o one clock later together with a one-cycle bit_valid; bit_o holds
// until the next decision. The output register is this design's choice.
module threshold_detector #(
  parameter int W = 40
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] y,
  input  logic                y_valid,
  output logic                bit_o,
  output logic                bit_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= y_valid;
      if (y_valid) bit_o <= (y > 0);
    end
  end
endmodule
