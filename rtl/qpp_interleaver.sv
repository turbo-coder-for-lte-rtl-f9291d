// qpp_interleaver: quadratic permutation polynomial address generator.
//
// Produces the interleaved index PI(i) = (F1*i + F2*i^2) mod N for
// i = 0, 1, 2, ... without a multiplier, using the second-order recursion
//   A(0) = 0,  G(0) = F1 + F2
//   A(i+1) = A(i) + G(i),  G(i+1) = G(i) + 2*F2     (all mod N)
// which follows from A(i+1) - A(i) = F1 + F2 + 2*i*F2. Both registers stay
// below N, so each update is one addition and one conditional subtraction.
//
// `start` (synchronous) returns to i = 0; `step` advances to i+1 at the
// next clock edge. `addr` is PI(i) for the current i and `index` is i.
// F1 must be odd and F2 even (the source description's condition); for N a power of
// two this makes PI a permutation. The block size N = 8 follows the 8-bit
// input of the source description's encoder; F1 = 3 and F2 = 2 are this design's
// choice (the source description gives no values).
module qpp_interleaver #(
  parameter int unsigned N  = 8,
  parameter int unsigned F1 = 3,
  parameter int unsigned F2 = 2,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] index
);

  localparam int unsigned G0  = (F1 + F2) % N;
  localparam int unsigned DG  = (2 * F2) % N;

  logic [AW:0] a_q, g_q;   // one spare bit for the modular addition
  logic [AW:0] a_sum, g_sum, a_nxt, g_nxt;

  always_comb begin
    a_sum = a_q + g_q;
    g_sum = g_q + (AW+1)'(DG);
    a_nxt = (a_sum >= (AW+1)'(N)) ? a_sum - (AW+1)'(N) : a_sum;
    g_nxt = (g_sum >= (AW+1)'(N)) ? g_sum - (AW+1)'(N) : g_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      g_q   <= (AW+1)'(G0);
      index <= '0;
    end else if (start) begin
      a_q   <= '0;
      g_q   <= (AW+1)'(G0);
      index <= '0;
    end else if (step) begin
      a_q   <= a_nxt;
      g_q   <= g_nxt;
      index <= index + 1'b1;
    end
  end

  assign addr = a_q[AW-1:0];

endmodule
