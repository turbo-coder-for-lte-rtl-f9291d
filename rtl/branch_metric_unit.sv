// branch_metric_unit: branch metrics of one trellis step (BMU).
//
// For a transition labelled with information bit u and parity bit p the
// branch metric is gamma(u,p) = u*(Ls + La) + p*Lp, where Ls is the channel
// value of the systematic bit, La the a-priori value (extrinsic information
// from the other decoder) and Lp the channel value of the parity bit. Only
// four distinct metrics exist per step; gamma[{u,p}] holds them:
//   gamma[0] = 0, gamma[1] = Lp, gamma[2] = Ls + La, gamma[3] = Ls + La + Lp.
// This form drops the constant -(Ls+La+Lp)/2 of the symmetric form, which
// cancels in every LLR. `lsa` = Ls + La is also output for the extrinsic
// computation. Combinational.
module branch_metric_unit #(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned EXT_W = 7,
  parameter int unsigned MW    = 12
) (
  input  logic signed [IN_W-1:0]  ls,
  input  logic signed [EXT_W-1:0] la,
  input  logic signed [IN_W-1:0]  lp,
  output logic signed [MW-1:0]    gamma [4],
  output logic signed [MW-1:0]    lsa
);

  always_comb begin
    lsa      = MW'(ls) + MW'(la);
    gamma[0] = '0;
    gamma[1] = MW'(lp);
    gamma[2] = lsa;
    gamma[3] = lsa + MW'(lp);
  end

endmodule
