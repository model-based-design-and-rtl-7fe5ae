// ldpc_decoder -- hard-decision bit-flipping decoder for the QC-LDPC (16,8) code.
//
// The syndrome S = Y x H^T of the received word has one bit per parity check (S1..S8, each
// the XOR of three codeword bits). The checks are visited in order S1 .. S8. When S_i is 1
// the three bits of check i are tried in ascending order: a trial flips one bit (undoing the
// previous trial) and tests the syndrome of the result. The first trial that passes is kept;
// if neither of the first two passes, the third flip is kept without a test, which leaves
// S_i at 0 either way. With FULL_SYNDROME_TEST = 1 a trial passes when the whole syndrome
// becomes zero, which corrects any single bit error; with FULL_SYNDROME_TEST = 0 it passes
// when S_i alone becomes zero, which the first flip always achieves. The decoded message is
// the systematic part Y1..Y8.
//
// Interface: start loads y_in (one-cycle strobe, ignored while busy). One check or one
// trial is handled per clock, so a codeword takes at most 8 x 3 = 24 cycles after loading;
// done pulses at most 25 cycles after start, with msg, err_detected (the received syndrome
// was nonzero), syndrome_ok (the final syndrome is zero) and flips (bits flipped), which hold
// until the next done. The visiting order, the flip-test-revert sequence and the third flip
// kept untested are the model's algorithm; testing the whole syndrome, one trial per cycle and
// the status outputs are this design's choices.
module ldpc_decoder
  import qam4_ldpc_pkg::*;
#(
  parameter bit FULL_SYNDROME_TEST = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  cw_t        y_in,
  output logic       done,
  output msg_t       msg,
  output logic       err_detected,
  output logic       syndrome_ok,
  output logic [3:0] flips
);
  typedef enum logic [1:0] {IDLE, RUN} state_t;

  state_t     state;
  cw_t        y;
  logic [2:0] row;     // check index i - 1
  logic [1:0] trial;   // 0, 1, 2
  logic [3:0] nflip;
  logic       err0;

  syn_t s, st;
  cw_t  yt;
  logic pass;

  always_comb begin
    s    = ldpc_syndrome(y);
    yt   = y ^ trial_mask(H[int'(row) + 1], int'(trial));
    st   = ldpc_syndrome(yt);
    pass = FULL_SYNDROME_TEST ? (st == '0) : !st[int'(row) + 1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      y            <= '0;
      row          <= '0;
      trial        <= '0;
      nflip        <= '0;
      err0         <= 1'b0;
      done         <= 1'b0;
      msg          <= '0;
      err_detected <= 1'b0;
      syndrome_ok  <= 1'b0;
      flips        <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          y     <= y_in;
          row   <= '0;
          trial <= '0;
          nflip <= '0;
          err0  <= (ldpc_syndrome(y_in) != '0);
          state <= RUN;
        end
        RUN: begin
          logic next_row;
          cw_t  ynew;
          next_row = 1'b0;
          ynew     = y;
          if (trial == 2'd0 && !s[int'(row) + 1]) begin
            next_row = 1'b1;
          end else if (pass || trial == 2'd2) begin
            ynew     = yt;
            nflip    <= nflip + 1'b1;
            next_row = 1'b1;
          end else begin
            trial <= trial + 1'b1;
          end
          y <= ynew;
          if (next_row) begin
            trial <= '0;
            row   <= row + 1'b1;
            if (row == 3'd7) begin
              state        <= IDLE;
              done         <= 1'b1;
              msg          <= ynew[1:K];
              err_detected <= err0;
              syndrome_ok  <= (ldpc_syndrome(ynew) == '0);
              flips        <= (ynew != y) ? nflip + 1'b1 : nflip;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
