// tb_turbo_encoder: random 8-bit blocks, back to back, through the turbo
// encoder. Each 24-bit code word is compared with the reference built from
// the QPP formula and the reference constituent encoder, in_ready must be
// low while a block is encoded, and out_valid must rise N+1 cycles after the
// accepting edge.
module tb_turbo_encoder;
  import turbo_ref_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic in_valid, in_ready, out_valid;
  logic [N-1:0] data_in;
  logic [3*N-1:0] data_out;
  turbo_encoder dut (.*);

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
    bvec_t u, ui, p1, p2;
    logic [3*N-1:0] exp_cw;
    int cyc;
    in_valid = 0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      u = '{default: 0};
      for (int k = 0; k < N; k++) u[k] = 1'($urandom_range(1));
      if (b == 0) u = '{default: 0};
      if (b == 1) for (int k = 0; k < N; k++) u[k] = 1;
      for (int k = 0; k < N; k++) ui[k] = u[qpp(k, N, 3, 2)];
      p1 = rsc_encode(u, N);
      p2 = rsc_encode(ui, N);
      for (int k = 0; k < N; k++) begin
        exp_cw[2*N + k] = u[k]; exp_cw[N + k] = p1[k]; exp_cw[k] = p2[k];
        data_in[k] = u[k];
      end
      @(negedge clk);
      check(in_ready, "ready when idle");
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      data_in = ~data_in;   // must not matter after acceptance
      cyc = 1;
      while (!out_valid && cyc < 100) begin
        check(!in_ready, "not ready while encoding");
        @(negedge clk);
        cyc++;
      end
      // cyc counts falling edges from the one after the accepting edge
      check(cyc - 1 == N + 1, $sformatf("latency %0d expected %0d", cyc - 1, N + 1));
      check(data_out == exp_cw, $sformatf("block %0d: %h expected %h", b, data_out, exp_cw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
