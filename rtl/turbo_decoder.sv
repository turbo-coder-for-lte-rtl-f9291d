// turbo_decoder: iterative decoder for the rate-1/3 LTE turbo code with two
// Log-MAP SISO decoders, QPP interleaving of the systematic and extrinsic
// values, clock gating of the idle SISO and adaptable iteration count.
//
// Operation. N received triples (systematic, parity 1, parity 2; IN_W-bit
// signed soft values, positive favours a one) are loaded, one per cycle,
// with a valid/ready handshake. The decoder then alternates half-iterations:
//   SISO 1 reads Ls(k), Lp1(k) and its a-priori value La1(k) (the
//          de-interleaved extrinsic output of SISO 2, 0 in the first pass)
//          and writes its extrinsic output Le1(k) and the decision bit k;
//   SISO 2 reads Ls(PI(k)), Lp2(k) and La2(k) = Le1(PI(k)) (interleaved) and
//          writes its extrinsic output Le2(k) to position PI(k), i.e.
//          de-interleaved, where SISO 1 reads it in the next pass.
// The interleaver and de-interleaver are QPP address generators stepping in
// step with the SISO's requests, so no permutation table is stored.
//
// Adaptable iterations: during every pass of SISO 1 the number of positions
// where the a-priori value and the new extrinsic value differ in sign is
// counted (sign-difference ratio test). Decoding stops after a SISO 1 pass
// when that count is at most SDR_THRESH (from the second pass on), or after
// MAX_ITER passes of SISO 1. The decisions of that last SISO 1 pass are
// output on `out_bits` with a one-cycle `out_valid`, together with the
// number of SISO 1 passes used and whether the early stop fired.
//
// Clock gating: each SISO runs on its own gated clock that is enabled only
// during its half-iteration, and the result registers are clocked only when
// their contents change (dd_gated_reg). Storage inputs are blocked while idle (see
// metric_ram). Reset is asynchronous so that the gated SISOs are reset
// although their clocks are stopped.
//
// Timing: loading takes N cycles (one triple per cycle, no gaps needed),
// each half-iteration 3*N+5 cycles (one cycle to launch the SISO, 3*(N+1)
// for its pass, one to see `done`), and out_valid is registered one cycle
// after the last SISO 1 pass. With H = 2*iterations-1 half-iterations,
// out_valid rises H*(3N+5)+1 cycles after the edge that accepts the last
// input; for N = 8 and one iteration that is 30 cycles.
//
// Following the source description: two SISO decoders, interleaver for the systematic
// input, interleaver for SISO 1's extrinsic output, de-interleaver for SISO
// 2's, decisions from SISO 1, QPP interleaving, clock gating, adaptable
// iterations with a sign-difference test, blocked RAM inputs. This design's
// choices: the soft-value widths, the stop threshold, MAX_ITER, the use of
// one read and one write address generator and the handshake.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned F1         = 3,
  parameter int unsigned F2         = 2,
  parameter int unsigned IN_W       = 3,
  parameter int unsigned EXT_W      = 7,
  parameter int unsigned MW         = 12,
  parameter bit          LOG_MAP    = 1'b1,
  parameter int unsigned MAX_ITER   = 8,
  parameter int unsigned SDR_THRESH = 0,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // received soft values
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_sys,
  input  logic signed [IN_W-1:0] in_p1,
  input  logic signed [IN_W-1:0] in_p2,
  // decoded block
  output logic                   out_valid,
  output logic [N-1:0]           out_bits,
  output logic [IW-1:0]          out_iters,
  output logic                   out_early,
  output logic                   busy
);

  typedef enum logic [2:0] {D_IDLE, D_LOAD, D_RUN1, D_RUN2, D_DONE} dec_state_e;
  dec_state_e state_q;

  logic [AW-1:0] load_cnt;
  logic [IW-1:0] iter_q;
  logic          launch_q;
  logic [AW:0]   sdr_cnt;
  logic [N-1:0]  dec_q;
  logic          accept, stop;

  // SISO interfaces
  logic                    busy1, done1, rd_en1, ov1, hard1;
  logic                    busy2, done2, rd_en2, ov2;
  logic [AW-1:0]           rd_idx1, rd_idx2, oidx1, oidx2;
  logic signed [EXT_W-1:0] ext1, ext2, apr1;
  logic signed [IN_W-1:0]  sys_rd, p1_rd, p2_rd;
  logic signed [EXT_W-1:0] ext1_rd, ext2_rd;
  logic                    gclk1, gclk2;
  logic [AW-1:0]           pi_rd, pi_wr, pi_rd_i, pi_wr_i;

  assign in_ready = (state_q == D_IDLE) || (state_q == D_LOAD);
  assign accept   = in_valid && in_ready;
  assign busy     = (state_q != D_IDLE);

  assign stop = (iter_q == IW'(MAX_ITER)) ||
                ((iter_q >= IW'(2)) && (sdr_cnt <= (AW+1)'(SDR_THRESH)));

  // ---------------- iteration control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= D_IDLE;
      load_cnt  <= '0;
      iter_q    <= '0;
      launch_q  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      launch_q  <= 1'b0;
      out_valid <= 1'b0;
      unique case (state_q)
        D_IDLE, D_LOAD: if (accept) begin
          if (load_cnt == AW'(N - 1)) begin
            load_cnt <= '0;
            iter_q   <= IW'(1);
            launch_q <= 1'b1;
            state_q  <= D_RUN1;
          end else begin
            load_cnt <= load_cnt + 1'b1;
            state_q  <= D_LOAD;
          end
        end
        D_RUN1: if (done1) begin
          if (stop) begin
            state_q <= D_DONE;
          end else begin
            launch_q <= 1'b1;
            state_q  <= D_RUN2;
          end
        end
        D_RUN2: if (done2) begin
          iter_q   <= iter_q + 1'b1;
          launch_q <= 1'b1;
          state_q  <= D_RUN1;
        end
        D_DONE: begin
          out_valid <= 1'b1;
          state_q   <= D_IDLE;
        end
        default: state_q <= D_IDLE;
      endcase
    end
  end

  // Result registers, clocked only when their value changes (data-driven
  // clock gating); they load the decisions of the final SISO 1 pass.
  logic               res_load;
  logic [N+IW:0]      res_d, res_q;

  assign res_load = (state_q == D_RUN1) && done1 && stop;
  assign res_d    = res_load ? {dec_q, iter_q, (iter_q != IW'(MAX_ITER))} : res_q;

  dd_gated_reg #(.W(N + IW + 1)) u_result (
    .clk(clk), .rst_n(rst_n), .d(res_d), .q(res_q), .gclk_edge()
  );

  assign {out_bits, out_iters, out_early} = res_q;

  // Decisions and sign-difference count of the SISO 1 pass.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdr_cnt <= '0;
      dec_q   <= '0;
    end else if (state_q == D_RUN1 && launch_q) begin
      sdr_cnt <= '0;
    end else if (ov1) begin
      dec_q[oidx1] <= hard1;
      if (apr1[EXT_W-1] != ext1[EXT_W-1]) sdr_cnt <= sdr_cnt + 1'b1;
    end
  end

  // ---------------- interleaver / de-interleaver for SISO 2 ----------------
  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_interleaver (
    .clk(clk), .rst_n(rst_n), .start(state_q == D_RUN2 && launch_q),
    .step(rd_en2), .addr(pi_rd), .index(pi_rd_i)
  );

  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_deinterleaver (
    .clk(clk), .rst_n(rst_n), .start(state_q == D_RUN2 && launch_q),
    .step(ov2), .addr(pi_wr), .index(pi_wr_i)
  );

  // ---------------- channel and extrinsic buffers ----------------
  logic load_we;
  assign load_we = accept;

  metric_ram #(.DEPTH(N), .WIDTH(IN_W)) u_sys_ram (
    .clk(clk), .en(load_we || rd_en1 || rd_en2), .we(load_we),
    .addr(load_we ? load_cnt : (rd_en2 ? pi_rd : rd_idx1)),
    .wdata(in_sys), .rdata(sys_rd)
  );

  metric_ram #(.DEPTH(N), .WIDTH(2*IN_W)) u_par_ram (
    .clk(clk), .en(load_we || rd_en1 || rd_en2), .we(load_we),
    .addr(load_we ? load_cnt : (rd_en2 ? rd_idx2 : rd_idx1)),
    .wdata({in_p1, in_p2}), .rdata({p1_rd, p2_rd})
  );

  // SISO 1 -> SISO 2 (read through the interleaver)
  metric_ram #(.DEPTH(N), .WIDTH(EXT_W)) u_ext1_ram (
    .clk(clk), .en(ov1 || rd_en2), .we(ov1),
    .addr(ov1 ? oidx1 : pi_rd),
    .wdata(ext1), .rdata(ext1_rd)
  );

  // SISO 2 -> SISO 1 (written through the de-interleaver); cleared on load
  metric_ram #(.DEPTH(N), .WIDTH(EXT_W)) u_ext2_ram (
    .clk(clk), .en(load_we || ov2 || rd_en1), .we(load_we || ov2),
    .addr(load_we ? load_cnt : (ov2 ? pi_wr : rd_idx1)),
    .wdata(load_we ? '0 : ext2), .rdata(ext2_rd)
  );

  // ---------------- the two SISO decoders on gated clocks ----------------
  clock_gate u_cg1 (.clk(clk), .en(state_q == D_RUN1), .gclk(gclk1));
  clock_gate u_cg2 (.clk(clk), .en(state_q == D_RUN2), .gclk(gclk2));

  siso_decoder #(.N(N), .IN_W(IN_W), .EXT_W(EXT_W), .MW(MW), .LOG_MAP(LOG_MAP)) u_siso1 (
    .clk(gclk1), .rst_n(rst_n), .start(state_q == D_RUN1 && launch_q),
    .busy(busy1), .done(done1),
    .rd_en(rd_en1), .rd_idx(rd_idx1),
    .in_sys(sys_rd), .in_par(p1_rd), .in_apr(ext2_rd),
    .out_valid(ov1), .out_idx(oidx1), .out_llr(),
    .out_ext(ext1), .out_apr(apr1), .out_hard(hard1)
  );

  siso_decoder #(.N(N), .IN_W(IN_W), .EXT_W(EXT_W), .MW(MW), .LOG_MAP(LOG_MAP)) u_siso2 (
    .clk(gclk2), .rst_n(rst_n), .start(state_q == D_RUN2 && launch_q),
    .busy(busy2), .done(done2),
    .rd_en(rd_en2), .rd_idx(rd_idx2),
    .in_sys(sys_rd), .in_par(p2_rd), .in_apr(ext1_rd),
    .out_valid(ov2), .out_idx(oidx2), .out_llr(),
    .out_ext(ext2), .out_apr(), .out_hard()
  );

`ifndef SYNTHESIS
  // The address generators must stay in step with the SISO 2 indices.
  a_il_step:  assert property (@(posedge clk) disable iff (!rst_n) rd_en2 |-> pi_rd_i == rd_idx2);
  a_dil_step: assert property (@(posedge clk) disable iff (!rst_n) ov2 |-> pi_wr_i == oidx2);
  a_one_siso: assert property (@(posedge clk) disable iff (!rst_n) !(busy1 && busy2));
`endif

endmodule
