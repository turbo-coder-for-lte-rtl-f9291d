// tb_branch_metric_unit: exhaustive over all 3-bit systematic and parity
// values and all 7-bit a-priori values; the four branch metrics and Ls+La
// must equal u*(Ls+La) + p*Lp for (u,p) = (0,0),(0,1),(1,0),(1,1).
module tb_branch_metric_unit;
  logic signed [2:0]  ls, lp;
  logic signed [6:0]  la;
  logic signed [11:0] gamma [4];
  logic signed [11:0] lsa;
  branch_metric_unit dut (.*);

  int checks = 0, failures = 0;
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
    for (int s = -4; s < 4; s++)
      for (int a = -64; a < 64; a++)
        for (int p = -4; p < 4; p++) begin
          ls = 3'(s); la = 7'(a); lp = 3'(p);
          #1;
          for (int up = 0; up < 4; up++)
            check(int'(gamma[up]) == (up / 2) * (s + a) + (up % 2) * p,
                  $sformatf("gamma[%0d] for ls=%0d la=%0d lp=%0d is %0d", up, s, a, p, gamma[up]));
          check(int'(lsa) == s + a, "ls+la");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
