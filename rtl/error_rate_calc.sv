// error_rate_calc -- bit-error counter. On each cycle with en high it compares the reference
// bit tx with the received bit rx, adds one to bits and, if they differ, one to errors. The
// bit error rate is errors / bits. The counters saturate at their maximum and clear on
// reset. Only strobed samples are compared, not the zero samples between symbols; the counter
// widths and saturation are this design's choices.
module error_rate_calc #(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             tx,
  input  logic             rx,
  output logic [CNT_W-1:0] errors,
  output logic [CNT_W-1:0] bits
);
  always_ff @(posedge clk) begin
    if (rst) begin
      errors <= '0;
      bits   <= '0;
    end else if (en) begin
      if (bits != '1) bits <= bits + 1'b1;
      if ((tx != rx) && (errors != '1)) errors <= errors + 1'b1;
    end
  end
endmodule
