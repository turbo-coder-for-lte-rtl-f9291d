// forward_metric_unit: one step of the forward state-metric recursion
// (FSMU), alpha_{k+1}(s') = max*_{s -> s'} (alpha_k(s) + gamma_k(s, s')).
//
// Each of the 8 states has two predecessors (turbo_pkg::rsc_pred), so the
// unit is 8 add-compare-select cells built from max_star. The new metrics
// are normalised by subtracting their maximum, so the best state is 0, and
// are clamped from below at NEG = -2^(MW-3), which also stands for "state
// not reachable". Combinational; the caller registers alpha.
module forward_metric_unit
  import turbo_pkg::*;
#(
  parameter int unsigned MW      = 12,
  parameter bit          LOG_MAP = 1'b1
) (
  input  logic signed [MW-1:0] alpha_in  [NSTATES],
  input  logic signed [MW-1:0] gamma     [4],
  output logic signed [MW-1:0] alpha_out [NSTATES]
);

  localparam int unsigned WW = MW + 2;
  localparam logic signed [WW-1:0] NEG = -(WW'(1) <<< (MW-3));

  logic signed [WW-1:0] cand0 [NSTATES];
  logic signed [WW-1:0] cand1 [NSTATES];
  logic signed [WW-1:0] acs   [NSTATES];
  logic signed [WW-1:0] mx;
  logic signed [WW-1:0] norm;
  rsc_branch_t          br0, br1;

  always_comb begin
    for (int ns = 0; ns < NSTATES; ns++) begin
      br0       = rsc_pred(3'(ns), 1'b0);
      br1       = rsc_pred(3'(ns), 1'b1);
      cand0[ns] = WW'(alpha_in[br0.s]) + WW'(gamma[{br0.u, br0.p}]);
      cand1[ns] = WW'(alpha_in[br1.s]) + WW'(gamma[{br1.u, br1.p}]);
    end
  end

  for (genvar g = 0; g < NSTATES; g++) begin : g_acs
    max_star #(.W(WW), .LOG_MAP(LOG_MAP)) u_acs (.a(cand0[g]), .b(cand1[g]), .y(acs[g]));
  end

  always_comb begin
    mx = acs[0];
    for (int s = 1; s < NSTATES; s++) if (acs[s] > mx) mx = acs[s];
    for (int s = 0; s < NSTATES; s++) begin
      norm         = acs[s] - mx;
      alpha_out[s] = (norm < NEG) ? MW'(NEG) : MW'(norm);
    end
  end

endmodule
