// lfsr_key: 4-bit XNOR linear feedback shift register that supplies a fresh
// cipher key every clock.
//
// Four flip-flops form a shift chain from bit 0 towards bit 3; the XNOR of
// bits 3 and 2 is fed back into bit 0, i.e. key <= {key[2:0], ~(key[3]^key[2])}.
// This is the maximal-length polynomial x^4 + x^3 + 1: the state walks
// through all 15 values other than 1111 (the XNOR lock-up state) and then
// repeats. From the seed 0001 the sequence begins 0001, 0011, 0111, 1110,
// 1101, 1011, exactly as in the published timing diagram.
//
// The four flip-flops, the XNOR feedback and the key sequence follow the
// source design. The synchronous active-high reset that loads SEED and the
// seed value 0001 are this design's choices. A SEED of 1111 would lock the
// register, so it is rejected by an assertion.
//
// Timing: key is the register output; it changes on every rising clk edge.
module lfsr_key
  import rlgcd_pkg::*;
#(
  parameter key_t SEED = 4'b0001
) (
  input  logic clk,
  input  logic rst,
  output key_t key
);
  key_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= SEED;
    else     state <= {state[KEY_W-2:0], ~(state[KEY_W-1] ^ state[KEY_W-2])};
  end

  assign key = state;

  // The all-ones state maps onto itself under XNOR feedback.
  initial assert (SEED != '1) else $error("lfsr_key: SEED 1111 is the lock-up state");
  a_no_lockup: assert property (@(posedge clk) disable iff (rst) state != '1);
endmodule
