// backward_metric_unit: one step of the backward state-metric recursion
// (BSMU), beta_k(s) = max*_{u in {0,1}} (gamma_k(s, next(s,u)) + beta_{k+1}(next(s,u))).
//
// Each state has two successors, one per input bit, so the unit is 8
// add-compare-select cells built from max_star. Results are normalised so
// that the best state is 0 and clamped from below at NEG = -2^(MW-3), in the
// same way as the forward unit. Combinational; the caller registers beta.
module backward_metric_unit
  import turbo_pkg::*;
#(
  parameter int unsigned MW      = 12,
  parameter bit          LOG_MAP = 1'b1
) (
  input  logic signed [MW-1:0] beta_in  [NSTATES],   // beta_{k+1}
  input  logic signed [MW-1:0] gamma    [4],
  output logic signed [MW-1:0] beta_out [NSTATES]    // beta_k
);

  localparam int unsigned WW = MW + 2;
  localparam logic signed [WW-1:0] NEG = -(WW'(1) <<< (MW-3));

  logic signed [WW-1:0] cand0 [NSTATES];
  logic signed [WW-1:0] cand1 [NSTATES];
  logic signed [WW-1:0] acs   [NSTATES];
  logic signed [WW-1:0] mx;
  logic signed [WW-1:0] norm;

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      cand0[s] = WW'(beta_in[rsc_next(3'(s), 1'b0)])
               + WW'(gamma[{1'b0, rsc_parity(3'(s), 1'b0)}]);
      cand1[s] = WW'(beta_in[rsc_next(3'(s), 1'b1)])
               + WW'(gamma[{1'b1, rsc_parity(3'(s), 1'b1)}]);
    end
  end

  for (genvar g = 0; g < NSTATES; g++) begin : g_acs
    max_star #(.W(WW), .LOG_MAP(LOG_MAP)) u_acs (.a(cand0[g]), .b(cand1[g]), .y(acs[g]));
  end

  always_comb begin
    mx = acs[0];
    for (int s = 1; s < NSTATES; s++) if (acs[s] > mx) mx = acs[s];
    for (int s = 0; s < NSTATES; s++) begin
      norm        = acs[s] - mx;
      beta_out[s] = (norm < NEG) ? MW'(NEG) : MW'(norm);
    end
  end

endmodule
