// tb_qpp_interleaver: the recursive address generator against the QPP
// formula PI(i) = (F1*i + F2*i^2) mod N evaluated with multiplications.
// Two instances: the default (N = 8, F1 = 3, F2 = 2) and the LTE block size
// K = 40 with its standard coefficients F1 = 3, F2 = 10. Every address is
// checked, the addresses of a block must form a permutation, steps can be
// paused, and `start` must restart the sequence.
module tb_qpp_interleaver;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic start, step;
  logic [2:0] addr8, idx8;
  logic [5:0] addr40, idx40;
  qpp_interleaver dut8 (.clk, .rst_n, .start, .step, .addr(addr8), .index(idx8));
  qpp_interleaver #(.N(40), .F1(3), .F2(10)) dut40 (.clk, .rst_n, .start, .step, .addr(addr40), .index(idx40));

  int checks = 0, failures = 0;
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
    bit seen8 [8], seen40 [40];
    int i;
    start = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk); start = 1; step = 0;
      @(negedge clk); start = 0;
      seen8 = '{default: 0};
      seen40 = '{default: 0};
      i = 0;
      while (i < 40) begin
        step = ($urandom_range(3) != 0);
        #1;
        check(int'(idx40) == i, "index of N=40 generator");
        check(int'(addr40) == qpp(i, 40, 3, 10), $sformatf("N=40 PI(%0d) = %0d", i, addr40));
        if (i < 8) begin
          check(int'(addr8) == qpp(i, 8, 3, 2), $sformatf("N=8 PI(%0d) = %0d", i, addr8));
          if (step) seen8[addr8] = 1;
        end
        if (step) begin
          seen40[addr40] = 1;
          i++;
        end
        @(negedge clk);
      end
      step = 0;
      for (int k = 0; k < 8; k++) check(seen8[k], $sformatf("N=8 address %0d missing", k));
      for (int k = 0; k < 40; k++) check(seen40[k], $sformatf("N=40 address %0d missing", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
