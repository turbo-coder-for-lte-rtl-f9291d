// llr_unit: a-posteriori LLR and extrinsic value of one trellis step (LLR
// computation).
//
//   LLR_k = max*_{(s,u=1)} (alpha_k(s) + gamma_k(s,u) + beta_{k+1}(next(s,u)))
//         - max*_{(s,u=0)} (alpha_k(s) + gamma_k(s,u) + beta_{k+1}(next(s,u)))
//   Le_k  = LLR_k - (Ls_k + La_k)
// Each max* runs over the 8 branches of one input value as a balanced tree
// of max_star cells, pairing states (0,1),(2,3),(4,5),(6,7) first. Le is
// saturated to EXT_W bits before it is passed to the other decoder;
// `hard` is the bit decision (1 when LLR > 0). Combinational.
module llr_unit
  import turbo_pkg::*;
#(
  parameter int unsigned MW      = 12,
  parameter int unsigned EXT_W   = 7,
  parameter bit          LOG_MAP = 1'b1
) (
  input  logic signed [MW-1:0]    alpha     [NSTATES],   // alpha_k
  input  logic signed [MW-1:0]    beta_next [NSTATES],   // beta_{k+1}
  input  logic signed [MW-1:0]    gamma     [4],
  input  logic signed [MW-1:0]    lsa,                   // Ls + La
  output logic signed [MW-1:0]    llr,
  output logic signed [EXT_W-1:0] ext,
  output logic                    hard
);

  localparam int unsigned WW = MW + 2;
  localparam logic signed [WW-1:0] EMAX = (WW'(1) <<< (EXT_W-1)) - 1;
  localparam logic signed [WW-1:0] EMIN = -(WW'(1) <<< (EXT_W-1));

  // Level 0: 8 branch sums per input value; levels 1..3 of the max* tree.
  logic signed [WW-1:0] t0 [2][8];
  logic signed [WW-1:0] t1 [2][4];
  logic signed [WW-1:0] t2 [2][2];
  logic signed [WW-1:0] t3 [2];
  logic signed [WW-1:0] llr_w, ext_w;

  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < NSTATES; s++)
        t0[u][s] = WW'(alpha[s])
                 + WW'(gamma[{1'(u), rsc_parity(3'(s), 1'(u))}])
                 + WW'(beta_next[rsc_next(3'(s), 1'(u))]);
  end

  for (genvar u = 0; u < 2; u++) begin : g_tree
    for (genvar i = 0; i < 4; i++) begin : g_l1
      max_star #(.W(WW), .LOG_MAP(LOG_MAP)) u_ms (.a(t0[u][2*i]), .b(t0[u][2*i+1]), .y(t1[u][i]));
    end
    for (genvar i = 0; i < 2; i++) begin : g_l2
      max_star #(.W(WW), .LOG_MAP(LOG_MAP)) u_ms (.a(t1[u][2*i]), .b(t1[u][2*i+1]), .y(t2[u][i]));
    end
    max_star #(.W(WW), .LOG_MAP(LOG_MAP)) u_l3 (.a(t2[u][0]), .b(t2[u][1]), .y(t3[u]));
  end

  always_comb begin
    llr_w = t3[1] - t3[0];
    ext_w = llr_w - WW'(lsa);
    llr   = MW'(llr_w);
    hard  = (llr_w > 0);
    if (ext_w > EMAX)      ext = EXT_W'(EMAX);
    else if (ext_w < EMIN) ext = EXT_W'(EMIN);
    else                   ext = EXT_W'(ext_w);
  end

endmodule
