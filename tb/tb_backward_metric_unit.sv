// tb_backward_metric_unit: random state metrics and branch metrics; each new
// backward metric beta_k(s) must equal max* over the two branches leaving
// state s (gamma + beta_{k+1} of the successor), normalised by the largest
// result and floored at -2^(MW-3) = -512. Branches come from the reference
// encoder. Run with LOG_MAP = 1 (default) and LOG_MAP = 0.
module tb_backward_metric_unit;
  import turbo_ref_pkg::*;
  logic signed [11:0] beta_in [8], beta_out [8], beta_out_ml [8];
  logic signed [11:0] gamma [4];
  backward_metric_unit dut (.beta_in, .gamma, .beta_out);
  backward_metric_unit #(.LOG_MAP(1'b0)) dut_ml (.beta_in, .gamma, .beta_out(beta_out_ml));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void ref_step(input int a [8], input int g [4], input bit lm, output int o [8]);
    int cand [8];
    bit have [8];
    int ns, mx;
    bit p;
    have = '{default: 0};
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        rsc_step(s, bit'(u), ns, p);
        if (!have[s]) begin cand[s] = a[ns] + g[2*u + int'(p)]; have[s] = 1; end
        else cand[s] = maxs(cand[s], a[ns] + g[2*u + int'(p)], lm);
      end
    mx = cand[0];
    for (int s = 1; s < 8; s++) if (cand[s] > mx) mx = cand[s];
    for (int s = 0; s < 8; s++) o[s] = (cand[s] - mx < -512) ? -512 : cand[s] - mx;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [8], g [4], o [8], oml [8];
    for (int t = 0; t < 20000; t++) begin
      for (int s = 0; s < 8; s++) a[s] = (t % 5 == 0 && s > 0) ? -512 : -int'($urandom_range((t % 2 != 0) ? 6 : 300));
      a[$urandom_range(7)] = 0;
      g[0] = 0;
      g[1] = int'($urandom_range(8)) - 4;
      g[2] = int'($urandom_range(136)) - 68;
      g[3] = g[1] + g[2];
      for (int s = 0; s < 8; s++) beta_in[s] = 12'(a[s]);
      for (int i = 0; i < 4; i++) gamma[i] = 12'(g[i]);
      #1;
      ref_step(a, g, 1'b1, o);
      ref_step(a, g, 1'b0, oml);
      for (int s = 0; s < 8; s++) begin
        check(int'(beta_out[s]) == o[s], $sformatf("log-MAP beta[%0d] = %0d expected %0d", s, beta_out[s], o[s]));
        check(int'(beta_out_ml[s]) == oml[s], $sformatf("max-log beta[%0d] = %0d expected %0d", s, beta_out_ml[s], oml[s]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
