// tb_clock_gate: the gated clock must follow the clock exactly in cycles
// whose enable was high before the rising edge, stay low otherwise, and
// ignore enable changes while the clock is high (no shortened pulses).
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  clock_gate dut (.*);

  int checks = 0, failures = 0, pulses = 0, gated = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      e = 1'($urandom_range(1));
      en = e;                 // while clk is low: takes effect at the next rise
      @(posedge clk);
      #1;
      check(gclk == e, $sformatf("gclk %0d after rise with enable %0d", gclk, e));
      if (e) pulses++; else gated++;
      en = ~e;                // while clk is high: must not change gclk
      #2;
      check(gclk == e, "enable change during high phase leaked through");
      @(negedge clk);
      #1;
      check(gclk == 1'b0, "gclk low while clk low");
    end
    check(pulses > 0 && gated > 0, "both enabled and gated cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
