// siso_decoder: soft-in soft-out component decoder using the Log-MAP (BCJR)
// algorithm on the 8-state LTE trellis.
//
// One pass decodes a block of N trellis steps in three phases (see
// siso_control):
//   forward  - the caller supplies, one step per cycle, the channel value of
//              the systematic bit, of the parity bit and the a-priori value.
//              They are kept in the BM storage, the branch metric unit forms
//              the four branch metrics and the forward unit updates alpha;
//              alpha_k is kept in the FSM storage. Start: alpha_0 = 0 for
//              state 0, "unreachable" for the others.
//   backward - branch metrics are re-formed from the BM storage in reverse
//              order, the backward unit updates beta, and beta_{k+1} is kept
//              in the BSM storage. Start: beta_N = 0 for all states (the
//              trellis is not terminated).
//   LLR      - alpha_k, beta_{k+1} and the stored inputs of step k are read
//              back and the LLR unit emits LLR_k, the extrinsic value
//              Le_k = LLR_k - Ls_k - La_k, the a-priori value used and the
//              hard decision, in natural order.
// Interface timing: `rd_en`/`rd_idx` request the inputs of step rd_idx; the
// caller presents them on in_sys/in_par/in_apr in the next cycle. Results
// appear with `out_valid` and index `out_idx`. A pass takes 3*(N+1) cycles
// from the `start` edge to the `done` pulse. The split into BMU, forward
// unit, backward unit, LLR unit, the three storages and the control follows
// the source description; the widths and the one-step-per-cycle schedule are this
// design's choices.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned IN_W    = 3,
  parameter int unsigned EXT_W   = 7,
  parameter int unsigned MW      = 12,
  parameter bit          LOG_MAP = 1'b1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // input stream (forward phase)
  output logic                    rd_en,
  output logic [AW-1:0]           rd_idx,
  input  logic signed [IN_W-1:0]  in_sys,
  input  logic signed [IN_W-1:0]  in_par,
  input  logic signed [EXT_W-1:0] in_apr,
  // output stream (LLR phase)
  output logic                    out_valid,
  output logic [AW-1:0]           out_idx,
  output logic signed [MW-1:0]    out_llr,
  output logic signed [EXT_W-1:0] out_ext,
  output logic signed [EXT_W-1:0] out_apr,
  output logic                    out_hard
);

  localparam int unsigned BMW = 2 * IN_W + EXT_W;
  localparam int unsigned SMW = NSTATES * MW;
  localparam logic signed [MW-1:0] NEG = -(MW'(1) <<< (MW-3));

  siso_phase_e   phase, proc_phase;
  logic          first, req_valid, proc_valid;
  logic [AW-1:0] req_idx, proc_idx;

  siso_control #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .phase(phase), .first(first),
    .req_valid(req_valid), .req_idx(req_idx),
    .proc_valid(proc_valid), .proc_phase(proc_phase), .proc_idx(proc_idx),
    .busy(busy), .done(done)
  );

  logic fwd_proc, bwd_proc, llr_proc;
  assign fwd_proc = proc_valid && (proc_phase == PH_FWD);
  assign bwd_proc = proc_valid && (proc_phase == PH_BWD);
  assign llr_proc = proc_valid && (proc_phase == PH_LLR);

  assign rd_en  = req_valid && (phase == PH_FWD);
  assign rd_idx = req_idx;

  // ---------------- BM storage: {Ls, La, Lp} per step ----------------
  logic                    bm_en, bm_we;
  logic [AW-1:0]           bm_addr;
  logic [BMW-1:0]          bm_wdata, bm_rdata;
  logic signed [IN_W-1:0]  ls_s, lp_s;
  logic signed [EXT_W-1:0] la_s;

  assign bm_we    = fwd_proc;
  assign bm_en    = fwd_proc || (req_valid && (phase == PH_BWD || phase == PH_LLR));
  assign bm_addr  = fwd_proc ? proc_idx : req_idx;
  assign bm_wdata = {in_sys, in_apr, in_par};

  metric_ram #(.DEPTH(N), .WIDTH(BMW)) u_bm_storage (
    .clk(clk), .en(bm_en), .we(bm_we), .addr(bm_addr),
    .wdata(bm_wdata), .rdata(bm_rdata)
  );

  // Branch metric inputs: straight from the caller in the forward phase,
  // from the BM storage afterwards.
  always_comb begin
    if (fwd_proc) begin
      ls_s = in_sys;
      la_s = in_apr;
      lp_s = in_par;
    end else begin
      {ls_s, la_s, lp_s} = bm_rdata;
    end
  end

  logic signed [MW-1:0] gamma [4];
  logic signed [MW-1:0] lsa;

  branch_metric_unit #(.IN_W(IN_W), .EXT_W(EXT_W), .MW(MW)) u_bmu (
    .ls(ls_s), .la(la_s), .lp(lp_s), .gamma(gamma), .lsa(lsa)
  );

  // ---------------- forward recursion and FSM storage ----------------
  logic signed [MW-1:0] alpha_q   [NSTATES];
  logic signed [MW-1:0] alpha_nxt [NSTATES];
  logic signed [MW-1:0] alpha_rd  [NSTATES];
  logic [SMW-1:0]       alpha_flat, alpha_rflat;

  forward_metric_unit #(.MW(MW), .LOG_MAP(LOG_MAP)) u_fsmu (
    .alpha_in(alpha_q), .gamma(gamma), .alpha_out(alpha_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++) alpha_q[s] <= (s == 0) ? '0 : NEG;
    end else if (start && !busy) begin
      for (int s = 0; s < NSTATES; s++) alpha_q[s] <= (s == 0) ? '0 : NEG;
    end else if (fwd_proc) begin
      alpha_q <= alpha_nxt;
    end
  end

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      alpha_flat[s*MW +: MW] = alpha_q[s];
      alpha_rd[s]            = alpha_rflat[s*MW +: MW];
    end
  end

  metric_ram #(.DEPTH(N), .WIDTH(SMW)) u_fsm_storage (
    .clk(clk),
    .en(fwd_proc || (req_valid && phase == PH_LLR)),
    .we(fwd_proc),
    .addr(fwd_proc ? proc_idx : req_idx),
    .wdata(alpha_flat), .rdata(alpha_rflat)
  );

  // ---------------- backward recursion and BSM storage ----------------
  logic signed [MW-1:0] beta_q   [NSTATES];
  logic signed [MW-1:0] beta_nxt [NSTATES];
  logic signed [MW-1:0] beta_rd  [NSTATES];
  logic [SMW-1:0]       beta_flat, beta_rflat;

  backward_metric_unit #(.MW(MW), .LOG_MAP(LOG_MAP)) u_bsmu (
    .beta_in(beta_q), .gamma(gamma), .beta_out(beta_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++) beta_q[s] <= '0;
    end else if (phase == PH_BWD && first) begin
      for (int s = 0; s < NSTATES; s++) beta_q[s] <= '0;
    end else if (bwd_proc) begin
      beta_q <= beta_nxt;
    end
  end

  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      beta_flat[s*MW +: MW] = beta_q[s];
      beta_rd[s]            = beta_rflat[s*MW +: MW];
    end
  end

  metric_ram #(.DEPTH(N), .WIDTH(SMW)) u_bsm_storage (
    .clk(clk),
    .en(bwd_proc || (req_valid && phase == PH_LLR)),
    .we(bwd_proc),
    .addr(bwd_proc ? proc_idx : req_idx),
    .wdata(beta_flat), .rdata(beta_rflat)
  );

  // ---------------- LLR computation ----------------
  llr_unit #(.MW(MW), .EXT_W(EXT_W), .LOG_MAP(LOG_MAP)) u_llr (
    .alpha(alpha_rd), .beta_next(beta_rd), .gamma(gamma), .lsa(lsa),
    .llr(out_llr), .ext(out_ext), .hard(out_hard)
  );

  assign out_valid = llr_proc;
  assign out_idx   = proc_idx;
  assign out_apr   = la_s;

endmodule
