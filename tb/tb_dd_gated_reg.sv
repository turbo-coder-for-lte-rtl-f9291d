// tb_dd_gated_reg: random data, often held for several cycles. q must take
// the value of d at every rising edge, exactly as a plain register would,
// and the gated clock must pulse exactly once for every edge at which the
// value changed and never otherwise.
module tb_dd_gated_reg;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic [7:0] d, q;
  logic gclk_edge;
  dd_gated_reg dut (.*);

  int checks = 0, failures = 0, edges = 0, changes = 0;
  always @(posedge gclk_edge) edges++;

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
    logic [7:0] expq;
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expq = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) d = 8'($urandom);
      if (d != expq) changes++;
      expq = d;
      @(negedge clk);
      check(q == expq, $sformatf("q %h expected %h", q, expq));
      check(edges == changes, $sformatf("%0d gated edges for %0d changes", edges, changes));
    end
    check(changes > 0 && changes < 3000, "both held and changing cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
