// tb_turbo_coder_top: end-to-end test of the turbo coder at its default
// parameters (N = 8, 3-bit soft values, up to 8 iterations).
//
// For each block a random information word is encoded by the RTL encoder
// and the code word is compared with the reference encoder. The code word is
// then sent through a model channel in the testbench: bits become soft
// values +/-2 plus uniform integer noise whose spread changes from block to
// block, clamped to the 3-bit range. The RTL decoder's decisions, iteration
// count and early-stop flag are compared with the reference turbo decoder,
// and noiseless blocks must decode to the original word. Latencies are
// checked: out_valid rises N+1 cycles after the encoder accepts a block and
// (2*iters-1)*(3N+5)+1 cycles after the decoder accepts its last input; the
// testbench sees each one edge later. The test also counts that
// every mechanism occurred: early stop, stop at the iteration limit, clock
// gating of each SISO, data-driven gating of the result register (at most
// one clock edge per block), blocked memory inputs, max* correction, and blocks
// with channel errors that were corrected.
module tb_turbo_coder_top;
  import turbo_ref_pkg::*;

  localparam int N = 8, F1 = 3, F2 = 2, MW = 12, EXT_W = 7, MAX_ITER = 8;
  localparam int NBLK = 2000;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge for the asynchronous reset

  logic             enc_in_valid, enc_in_ready, enc_out_valid;
  logic [N-1:0]     enc_data_in;
  logic [3*N-1:0]   enc_data_out;
  logic             dec_in_valid, dec_in_ready, dec_out_valid, dec_out_early, dec_busy;
  logic signed [2:0] dec_in_sys, dec_in_p1, dec_in_p2;
  logic [N-1:0]     dec_out_bits;
  logic [3:0]       dec_out_iters;

  turbo_coder_top dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_maxit = 0, n_corrected = 0, n_blocked = 0, n_corr = 0;
  int busy_edges = 0, g1_edges = 0, g2_edges = 0, res_edges = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism monitors
  always @(posedge clk) if (dec_busy) busy_edges++;
  always @(posedge dut.u_decoder.gclk1) g1_edges++;
  always @(posedge dut.u_decoder.gclk2) g2_edges++;
  always @(posedge dut.u_decoder.u_result.gclk_edge) res_edges++;
  always @(posedge clk)
    if (!dut.u_decoder.u_sys_ram.en && dut.u_decoder.u_sys_ram.addr != '0) n_blocked++;
  always @(posedge clk)
    if (dut.u_decoder.u_siso1.u_llr.g_tree[0].u_l3.near_eq && dut.u_decoder.u_siso1.out_valid) n_corr++;

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chan(bit b, int spread);
    int v;
    v = b ? 2 : -2;
    if (spread > 0) v += int'($urandom_range(2 * spread)) - spread;
    if (v > 3) v = 3;
    if (v < -4) v = -4;
    return v;
  endfunction

  initial begin
    bvec_t u, ui, p1, p2, rbits;
    ivec_t ys, y1, y2;
    int riters, cyc, spread, herr;
    bit rearly, ok;
    logic [3*N-1:0] exp_cw;

    enc_in_valid = 0; enc_data_in = '0;
    dec_in_valid = 0; dec_in_sys = '0; dec_in_p1 = '0; dec_in_p2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    for (int b = 0; b < NBLK; b++) begin
      // ---------------- encoder ----------------
      u = '{default: 0};
      for (int k = 0; k < N; k++) u[k] = 1'($urandom_range(1));
      for (int k = 0; k < N; k++) ui[k] = u[qpp(k, N, F1, F2)];
      p1 = rsc_encode(u, N);
      p2 = rsc_encode(ui, N);
      for (int k = 0; k < N; k++) begin
        exp_cw[2*N + k] = u[k];
        exp_cw[N + k]   = p1[k];
        exp_cw[k]       = p2[k];
        enc_data_in[k]  = u[k];
      end
      enc_in_valid <= 1;
      @(posedge clk);
      while (!enc_in_ready) @(posedge clk);
      enc_in_valid <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!enc_out_valid && cyc < 100);
      check(enc_data_out == exp_cw, $sformatf("block %0d code word %h, expected %h", b, enc_data_out, exp_cw));
      // out_valid rises N+1 edges after the accepting edge and is seen one edge later
      check(cyc == N + 2, $sformatf("encoder latency %0d, expected %0d", cyc, N + 2));

      // ---------------- channel ----------------
      spread = (b < 20) ? 0 : (b % 7);
      herr = 0;
      for (int k = 0; k < N; k++) begin
        ys[k] = chan(enc_data_out[2*N + k], spread);
        y1[k] = chan(enc_data_out[N + k], spread);
        y2[k] = chan(enc_data_out[k], spread);
        if ((ys[k] > 0) != u[k]) herr++;
      end
      turbo_decode(N, F1, F2, ys, y1, y2, 1'b1, MW, EXT_W, MAX_ITER, 0, rbits, riters, rearly);

      // ---------------- decoder ----------------
      for (int k = 0; k < N; k++) begin
        dec_in_valid <= 1;
        dec_in_sys <= 3'(ys[k]); dec_in_p1 <= 3'(y1[k]); dec_in_p2 <= 3'(y2[k]);
        @(posedge clk);
        while (!dec_in_ready) @(posedge clk);
      end
      dec_in_valid <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!dec_out_valid && cyc < 5000);
      ok = 1;
      for (int k = 0; k < N; k++) if (dec_out_bits[k] != rbits[k]) ok = 0;
      check(ok, $sformatf("block %0d decisions %b differ from reference", b, dec_out_bits));
      check(int'(dec_out_iters) == riters && dec_out_early == rearly,
            $sformatf("block %0d iterations %0d/%0d early %0d/%0d", b, dec_out_iters, riters, dec_out_early, rearly));
      check(cyc == (2 * int'(dec_out_iters) - 1) * (3 * N + 5) + 2,
            $sformatf("decoder latency %0d for %0d iterations", cyc, dec_out_iters));
      ok = 1;
      for (int k = 0; k < N; k++) if (dec_out_bits[k] != u[k]) ok = 0;
      if (spread == 0) check(ok, $sformatf("noiseless block %0d not decoded to the sent word", b));
      if (ok && herr > 0) n_corrected++;
      if (dec_out_early) n_early++;
      if (int'(dec_out_iters) == MAX_ITER) n_maxit++;
    end

    $display("early stops %0d, stops at the limit %0d, corrected blocks %0d", n_early, n_maxit, n_corrected);
    $display("decoder busy edges %0d, SISO1 edges %0d, SISO2 edges %0d, blocked RAM inputs %0d, max* corrections %0d",
             busy_edges, g1_edges, g2_edges, n_blocked, n_corr);
    check(n_early > 0, "early stop never happened");
    check(n_maxit > 0, "iteration limit never reached");
    check(n_corrected > 0, "no channel error was corrected");
    check(busy_edges > g1_edges && g1_edges > 0, "SISO 1 clock never gated");
    check(busy_edges > g2_edges && g2_edges > 0, "SISO 2 clock never gated");
    check(n_blocked > 0, "memory inputs never blocked");
    $display("result register clock edges %0d for %0d blocks", res_edges, NBLK);
    check(res_edges > 0 && res_edges <= NBLK, "result register not clocked only on changes");
    check(n_corr > 0, "max* correction never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
