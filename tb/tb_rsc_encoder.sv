// tb_rsc_encoder: random bit streams through one constituent encoder. The
// parity bit and register state after every bit are compared with the
// reference encoder; `clear` in the middle of a stream must restart from
// state 0, and a cycle without `en` must leave the state unchanged.
module tb_rsc_encoder;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic clear, en, u, parity;
  logic [2:0] state;
  rsc_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ns;
    bit p;
    clear = 0; en = 0; u = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 3'b000, "state after reset");
    s = 0;
    for (int t = 0; t < 2000; t++) begin
      clear = ($urandom_range(49) == 0);
      en    = ($urandom_range(9) != 0);
      u     = 1'($urandom_range(1));
      #1;
      rsc_step(s, u, ns, p);
      if (!clear && en) check(parity == p, $sformatf("parity at step %0d", t));
      @(negedge clk);
      if (clear) s = 0;
      else if (en) s = ns;
      check(int'(state) == s, $sformatf("state %0d expected %0d at step %0d", state, s, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
