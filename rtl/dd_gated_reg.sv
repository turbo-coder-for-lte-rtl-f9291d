// dd_gated_reg: register with data-driven clock gating.
//
// The register is clocked only in cycles where its next value differs from
// its present value: the XOR of d and q, ORed over all bits, enables a
// clock_gate, and the flip-flops sit on the gated clock. Functionally it is
// a plain register, q <= d on every rising edge; in power terms a register
// whose value does not change receives no clock edge. `gclk_edge` is the
// gated clock, brought out so that its activity can be observed.
//
// This is the gated-clock scheme the source describes (the clock stops when
// a register's output equals its input and the flip-flop is activated only
// when they differ). It is applied to the decoder's result registers, which
// change once per block. Reset is asynchronous, active low, to 0.
module dd_gated_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         gclk_edge
);

  logic changed;

  assign changed = |(d ^ q);

  clock_gate u_cg (.clk(clk), .en(changed), .gclk(gclk_edge));

  always_ff @(posedge gclk_edge or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
