// tb_llr_unit: random forward, backward and branch metrics; the LLR must be
// the max* tree over the eight u=1 branches minus the tree over the eight
// u=0 branches (states paired (0,1),(2,3),(4,5),(6,7)), the extrinsic value
// LLR - (Ls+La) saturated to 7 bits, and the decision LLR > 0. Large
// metrics are included so that the saturation is exercised.
module tb_llr_unit;
  import turbo_ref_pkg::*;
  logic signed [11:0] alpha [8], beta_next [8], gamma [4], lsa, llr;
  logic signed [6:0]  ext;
  logic hard;
  llr_unit dut (.*);

  int checks = 0, failures = 0, n_sat = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [8], b [8], g [4], m [2][8], l1 [4], l2 [2], top [2], rl, re, ns, sp;
    bit p;
    for (int t = 0; t < 20000; t++) begin
      sp = (t % 3 == 0) ? 500 : 12;
      for (int s = 0; s < 8; s++) begin
        a[s] = -int'($urandom_range(sp));
        b[s] = -int'($urandom_range(sp));
      end
      g[0] = 0;
      g[1] = int'($urandom_range(8)) - 4;
      g[2] = int'($urandom_range(136)) - 68;
      g[3] = g[1] + g[2];
      for (int s = 0; s < 8; s++) begin alpha[s] = 12'(a[s]); beta_next[s] = 12'(b[s]); end
      for (int i = 0; i < 4; i++) gamma[i] = 12'(g[i]);
      lsa = 12'(g[2]);
      #1;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          rsc_step(s, bit'(u), ns, p);
          m[u][s] = a[s] + g[2*u + int'(p)] + b[ns];
        end
      for (int u = 0; u < 2; u++) begin
        for (int i = 0; i < 4; i++) l1[i] = maxs(m[u][2*i], m[u][2*i+1], 1'b1);
        for (int i = 0; i < 2; i++) l2[i] = maxs(l1[2*i], l1[2*i+1], 1'b1);
        top[u] = maxs(l2[0], l2[1], 1'b1);
      end
      rl = top[1] - top[0];
      re = sat(rl - g[2], 7);
      if (re != rl - g[2]) n_sat++;
      check(int'(llr) == rl, $sformatf("llr %0d expected %0d", llr, rl));
      check(int'(ext) == re, $sformatf("ext %0d expected %0d", ext, re));
      check(hard == (rl > 0), "hard decision");
    end
    check(n_sat > 0, "extrinsic saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
