// max_star: the Jacobian logarithm max*(a, b) = ln(e^a + e^b) in fixed point.
//
// max*(a, b) = max(a, b) + ln(1 + e^-|a-b|). The correction term is
// approximated by one LSB when |a - b| <= 2 and zero otherwise, which is the
// rounded value of the correction for a metric LSB of 0.5 (in natural-log
// units). With LOG_MAP = 0 the correction is dropped and the unit reduces to
// the max-log-MAP approximation. Purely combinational; the caller must keep
// a and b one bit inside the range of W so that the correction cannot
// overflow.
module max_star #(
  parameter int unsigned W       = 14,
  parameter bit          LOG_MAP = 1'b1
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  logic signed [W:0] diff;
  logic              near_eq;

  always_comb begin
    diff  = (W+1)'(a) - (W+1)'(b);
    near_eq = (diff <= 2) && (diff >= -2);
    y     = ((a >= b) ? a : b) + ((LOG_MAP && near_eq) ? W'(1) : W'(0));
  end

endmodule
