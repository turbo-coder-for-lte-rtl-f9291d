// tb_max_star: exhaustive over a, b in [-40, 40] plus random large operands.
// With LOG_MAP = 1 the result must be max(a,b) + 1 when |a-b| <= 2 and
// max(a,b) otherwise; with LOG_MAP = 0 it must be max(a,b). The correction
// is also compared with the rounded exact value ln(1+e^(-|a-b|/2))/0.5.
module tb_max_star;
  logic signed [13:0] a, b, y, y_ml;
  max_star dut (.a, .b, .y);
  max_star #(.LOG_MAP(1'b0)) dut_ml (.a, .b, .y(y_ml));

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
    int ia, ib, m, d, c;
    real exact;
    for (int t = 0; t < 81 * 81 + 5000; t++) begin
      if (t < 81 * 81) begin ia = t / 81 - 40; ib = t % 81 - 40; end
      else begin ia = int'($urandom_range(4000)) - 2000; ib = ia + int'($urandom_range(8)) - 4; end
      a = 14'(ia); b = 14'(ib);
      #1;
      m = (ia > ib) ? ia : ib;
      d = (ia > ib) ? ia - ib : ib - ia;
      exact = $ln(1.0 + $exp(-0.5 * d)) / 0.5;
      c = (exact >= 0.5) ? 1 : 0;
      check(int'(y) == m + c, $sformatf("max*(%0d,%0d) = %0d", ia, ib, y));
      check(int'(y_ml) == m, $sformatf("max(%0d,%0d) = %0d", ia, ib, y_ml));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
