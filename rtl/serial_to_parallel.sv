// serial_to_parallel -- S/P converter: gathers NW words of W bits, one per enabled cycle,
// into a frame. Word position idx (0 .. NW-1, from the shared symbol counter) selects where
// the word goes; word 0 lands in the most significant position, which is element 1 of the
// frame vector (bit 1 of a [1:W*NW] vector). When the word at position NW-1 arrives, the
// complete frame (including that word) appears on frame and frame_valid pulses for one
// cycle; frame holds until the next frame completes. Used 1 -> 8 for the message bits and
// 2 -> 16 for the received symbol pairs. The explicit position input is this design's way of
// keeping frames aligned.
module serial_to_parallel #(
  parameter int W  = 1,
  parameter int NW = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [$clog2(NW)-1:0]   idx,
  input  logic [W-1:0]            d,
  output logic [1:W*NW]           frame,
  output logic                    frame_valid
);
  logic [1:W*NW] acc;
  logic [1:W*NW] nxt;

  always_comb begin
    nxt = acc;
    nxt[W*int'(idx) + 1 +: W] = d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc         <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (en) begin
        acc <= nxt;
        if (idx == $clog2(NW)'(NW - 1)) begin
          frame       <= nxt;
          frame_valid <= 1'b1;
        end
      end
    end
  end
endmodule
