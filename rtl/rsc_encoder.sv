// rsc_encoder: one constituent recursive systematic convolutional encoder
// (RSC 1 or RSC 2 of the turbo encoder).
//
// Bit-serial: when `en` is high the input bit `u` is consumed, the parity
// bit for it is presented combinationally on `parity` in the same cycle and
// the 3-bit shift register advances at the next rising clock edge. `clear`
// (synchronous, higher priority than `en`) returns the register to the
// all-zero state at the start of a block. The systematic output is `u`
// itself and is taken by the caller.
//
// The trellis is the LTE one (feedback 1+D^2+D^3, parity 1+D+D^3), see
// turbo_pkg. The source description only names the block; the polynomials, the
// bit-serial interface and the absence of trellis termination (the 8-bit
// block gives a 24-bit output, so no tail bits are sent) are this design's
// reading.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  input  logic       clear,   // restart from state 0
  input  logic       en,      // consume u this cycle
  input  logic       u,       // information bit
  output logic       parity,  // parity bit for u in the current state
  output logic [2:0] state    // register contents {r1,r2,r3}
);

  always_comb parity = rsc_parity(state, u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= 3'b000;
    else if (clear)  state <= 3'b000;
    else if (en)     state <= rsc_next(state, u);
  end

endmodule
