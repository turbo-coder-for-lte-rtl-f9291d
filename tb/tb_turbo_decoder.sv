// tb_turbo_decoder: the turbo decoder at the smallest LTE block size,
// K = 40 with the LTE interleaver coefficients F1 = 3, F2 = 10, and at most
// 6 iterations. Random blocks are encoded by the reference encoder, sent
// through a model channel (soft values +/-2 plus uniform noise of a spread
// that changes per block, clamped to 3 bits) and decoded. Decisions,
// iteration count and early-stop flag must match the reference decoder,
// noiseless blocks must decode to the sent word, and the output must come
// (2*iters-1)*(3K+5)+1 cycles after the last input is accepted. Both stop
// reasons must occur.
module tb_turbo_decoder;
  import turbo_ref_pkg::*;
  localparam int N = 40, F1 = 3, F2 = 10, MAX_ITER = 6;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic in_valid, in_ready, out_valid, out_early, busy;
  logic signed [2:0] in_sys, in_p1, in_p2;
  logic [N-1:0] out_bits;
  logic [2:0] out_iters;
  turbo_decoder #(.N(N), .F1(F1), .F2(F2), .MAX_ITER(MAX_ITER)) dut (.*);

  int checks = 0, failures = 0, n_early = 0, n_max = 0, n_fixed = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int chan(bit b, int spread);
    int v;
    v = b ? 2 : -2;
    if (spread > 0) v += int'($urandom_range(2 * spread)) - spread;
    return (v > 3) ? 3 : ((v < -4) ? -4 : v);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bvec_t u, ui, p1, p2, rbits;
    ivec_t ys, y1, y2;
    int riters, cyc, spread, herr;
    bit rearly, ok;
    in_valid = 0; in_sys = 0; in_p1 = 0; in_p2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      u = '{default: 0};
      for (int k = 0; k < N; k++) u[k] = 1'($urandom_range(1));
      for (int k = 0; k < N; k++) ui[k] = u[qpp(k, N, F1, F2)];
      p1 = rsc_encode(u, N);
      p2 = rsc_encode(ui, N);
      spread = (b < 10) ? 0 : (b % 6);
      herr = 0;
      for (int k = 0; k < N; k++) begin
        ys[k] = chan(u[k], spread);
        y1[k] = chan(p1[k], spread);
        y2[k] = chan(p2[k], spread);
        if ((ys[k] > 0) != u[k]) herr++;
      end
      turbo_decode(N, F1, F2, ys, y1, y2, 1'b1, 12, 7, MAX_ITER, 0, rbits, riters, rearly);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_valid = 1; in_sys = 3'(ys[k]); in_p1 = 3'(y1[k]); in_p2 = 3'(y2[k]);
        if (k == N / 2 && b % 3 == 0) begin   // a gap in the input stream
          in_valid = 0;
          @(negedge clk);
          in_valid = 1;
        end
        check(in_ready, "ready while loading");
      end
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!out_valid && cyc < 20000) begin
        check(!in_ready, "not ready while decoding");
        @(negedge clk);
        cyc++;
      end
      ok = 1;
      for (int k = 0; k < N; k++) if (out_bits[k] != rbits[k]) ok = 0;
      check(ok, $sformatf("block %0d decisions differ from reference", b));
      check(int'(out_iters) == riters && out_early == rearly,
            $sformatf("block %0d iterations %0d/%0d early %0d/%0d", b, out_iters, riters, out_early, rearly));
      check(cyc - 1 == (2 * riters - 1) * (3 * N + 5) + 1, $sformatf("latency %0d", cyc - 1));
      ok = 1;
      for (int k = 0; k < N; k++) if (out_bits[k] != u[k]) ok = 0;
      if (spread == 0) check(ok, $sformatf("noiseless block %0d not decoded", b));
      if (ok && herr > 0) n_fixed++;
      if (out_early) n_early++;
      if (int'(out_iters) == MAX_ITER) n_max++;
    end
    $display("early stops %0d, iteration limit %0d, blocks with channel errors corrected %0d", n_early, n_max, n_fixed);
    check(n_early > 0 && n_max > 0 && n_fixed > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
