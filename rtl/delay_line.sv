// delay_line -- the z^-DEPTH delay of the reference bit stream (DEPTH = 4096 samples = 16
// symbols of 256 samples) that lines the transmitted bits up with the decoded ones before
// they are compared. Built as a circular buffer: each clock the oldest entry is read out (asynchronous
// read) and overwritten with the new bit, so q is d delayed by exactly DEPTH clocks. The memory is not
// reset; primed goes high once DEPTH bits have been written, and q is forced to 0 before that
// (the model's delay starts from zeros). The circular-buffer structure is this design's.
module delay_line #(
  parameter int DEPTH = 4096
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic primed
);
  localparam int AW = $clog2(DEPTH);
  logic          mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) mem[ptr] <= d;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (ptr == AW'(DEPTH - 1)) primed <= 1'b1;
    end
  end

  assign q = primed & mem[ptr];
endmodule
