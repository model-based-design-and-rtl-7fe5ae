// ldpc_encoder -- QC-LDPC (16,8) encoder. Computes the codeword X = m x G over GF(2) with the
// systematic generator G = [I8 P^T] of qam4_ldpc_pkg: X1..X8 are the message bits m1..m8 and
// X9..X16 are parity bits, each the XOR of the message bits of one parity check.
//
// Interface: when msg_valid is high the codeword of msg is registered; cw and cw_valid appear
// one clock later (cw_valid is a one-cycle strobe, cw holds). The matrix product is the
// model's; registering the output is this design's choice.
module ldpc_encoder
  import qam4_ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic msg_valid,
  input  msg_t msg,
  output cw_t  cw,
  output logic cw_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cw       <= '0;
      cw_valid <= 1'b0;
    end else begin
      cw_valid <= msg_valid;
      if (msg_valid) cw <= ldpc_encode(msg);
    end
  end
endmodule
