// parallel_to_serial -- P/S converter: holds a frame of NW words of W bits and emits word idx
// (0 .. NW-1, from the shared symbol counter) on each enabled cycle; word 0 is the most
// significant, element 1 of the [1:W*NW] frame vector. A frame offered with load is stored
// in a second register and becomes the one being emitted on the next enable with idx == 0,
// so a whole frame period goes out unbroken while the next frame is being prepared.
// q is registered: it changes on the clock edge of the enabled cycle and holds for the
// symbol period. Used 16 -> 2 for the codeword and 8 -> 1 for the decoded message. The double
// buffering is this design's choice.
module parallel_to_serial #(
  parameter int W  = 2,
  parameter int NW = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic [1:W*NW]           frame,
  input  logic                    en,
  input  logic [$clog2(NW)-1:0]   idx,
  output logic [W-1:0]            q
);
  logic [1:W*NW] pending;
  logic [1:W*NW] active;
  logic [1:W*NW] src;

  // At the first word of a frame the pending frame takes over.
  assign src = (idx == '0) ? pending : active;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      active  <= '0;
      q       <= '0;
    end else begin
      if (load) pending <= frame;
      if (en) begin
        if (idx == '0) active <= pending;
        q <= src[W*int'(idx) + 1 +: W];
      end
    end
  end
endmodule
