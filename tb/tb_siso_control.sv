// tb_siso_control: the request and processing schedule of one pass. Each
// phase (forward, backward, LLR) must issue the indices 0..N-1 (backward:
// N-1..0) once each, every request must reappear one cycle later as the
// processed index of the same phase, `first` marks each phase's first cycle,
// and `done` must pulse 3*(N+1) cycles after the start edge. A start while
// busy is ignored.
module tb_siso_control;
  import turbo_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic start, first, req_valid, proc_valid, busy, done;
  siso_phase_e phase, proc_phase;
  logic [2:0] req_idx, proc_idx;
  siso_control dut (.*);

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
    int cyc, nreq [4], expi;
    siso_phase_e pph;
    int pidx;
    bit pval;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk);
      check(!busy && !done, "idle before start");
      start = 1;
      @(negedge clk);
      start = (rep % 2 == 0);   // held start must not restart the pass
      cyc = 1;
      nreq = '{default: 0};
      pval = 0;
      while (!done && cyc < 200) begin
        if (pval) check(proc_valid && proc_phase == pph && int'(proc_idx) == pidx,
                        "request reappears as processed index");
        else check(!proc_valid, "no processing without a request");
        check(busy, "busy during the pass");
        if (req_valid) begin
          expi = (phase == PH_BWD) ? N - 1 - nreq[phase] : nreq[phase];
          check(int'(req_idx) == expi, $sformatf("phase %s index %0d expected %0d", phase.name(), req_idx, expi));
          check(first == (nreq[phase] == 0), "first marks the first cycle");
          nreq[phase]++;
        end
        pval = req_valid; pph = phase; pidx = int'(req_idx);
        @(negedge clk);
        cyc++;
      end
      start = 0;
      check(cyc - 1 == 3 * (N + 1), $sformatf("pass took %0d cycles", cyc - 1));
      for (int p = 1; p < 4; p++) check(nreq[p] == N, $sformatf("phase %0d issued %0d requests", p, nreq[p]));
      @(negedge clk);
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
