// symbol_timing -- rate controller of the transceiver. The model runs at three rates: the
// sample rate, the symbol rate (sample rate / OSR, OSR = 256) and the frame rate (symbol rate
// / 8, one 16-bit LDPC codeword = 8 QAM-4 symbols). Here everything runs on the sample clock
// and this block produces the enables that stand in for the up- and down-samplers.
//
// sample_cnt counts 0..OSR-1 within a symbol and sym_idx counts 0..SYMS_PER_FRAME-1 within a
// frame. sym_tick is high on the cycle with sample_cnt == 0 (the start of symbol sym_idx);
// rx_strobe is high on sample_cnt == RX_PHASE, where the receiver takes its symbol decision.
// RX_PHASE = OSR - 40 leaves the 25-cycle LDPC decoder room to finish before the next symbol
// tick. The counters are this design's realisation of the model's rate changes.
module symbol_timing #(
  parameter int OSR            = 256,
  parameter int SYMS_PER_FRAME = 8,
  parameter int RX_PHASE       = OSR - 40
) (
  input  logic                              clk,
  input  logic                              rst,
  output logic [$clog2(OSR)-1:0]            sample_cnt,
  output logic [$clog2(SYMS_PER_FRAME)-1:0] sym_idx,
  output logic                              sym_tick,
  output logic                              rx_strobe
);
  localparam int SW = $clog2(OSR);
  localparam int FW = $clog2(SYMS_PER_FRAME);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_cnt <= '0;
      sym_idx    <= '0;
    end else if (sample_cnt == SW'(OSR - 1)) begin
      sample_cnt <= '0;
      sym_idx    <= (sym_idx == FW'(SYMS_PER_FRAME - 1)) ? '0 : sym_idx + 1'b1;
    end else begin
      sample_cnt <= sample_cnt + 1'b1;
    end
  end

  assign sym_tick  = (sample_cnt == '0);
  assign rx_strobe = (sample_cnt == SW'(RX_PHASE));
endmodule
