// tb_siso_decoder: random soft inputs (3-bit channel values, 7-bit a-priori
// values) for one SISO pass at a time. The testbench answers each read
// request one cycle later, as the decoder's buffers do, and compares every
// output (LLR, extrinsic value, a-priori value echoed, decision) with the
// reference Log-MAP pass. The outputs must come in natural order and `done`
// must pulse 3*(N+1) cycles after the start edge.
module tb_siso_decoder;
  import turbo_ref_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic start, busy, done, rd_en, out_valid, out_hard;
  logic [2:0] rd_idx, out_idx;
  logic signed [2:0] in_sys, in_par;
  logic signed [6:0] in_apr, out_ext, out_apr;
  logic signed [11:0] out_llr;
  siso_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ivec_t ls, lp, la, rllr, rext;

  // memory model: data for the requested index in the next cycle
  always @(posedge clk) begin
    if (rd_en) begin
      in_sys <= 3'(ls[int'(rd_idx)]);
      in_par <= 3'(lp[int'(rd_idx)]);
      in_apr <= 7'(la[int'(rd_idx)]);
    end else begin
      in_sys <= 3'($urandom); in_par <= 3'($urandom); in_apr <= 7'($urandom);
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nout;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 500; b++) begin
      for (int k = 0; k < N; k++) begin
        ls[k] = int'($urandom_range(7)) - 4;
        lp[k] = int'($urandom_range(7)) - 4;
        la[k] = (b % 4 == 0) ? 0 : int'($urandom_range(127)) - 64;
      end
      siso(N, ls, lp, la, 1'b1, 12, 7, rllr, rext);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      nout = 0;
      while (!done && cyc < 200) begin
        if (out_valid) begin
          check(int'(out_idx) == nout, "outputs in natural order");
          check(int'(out_llr) == rllr[int'(out_idx)], $sformatf("block %0d llr[%0d] %0d expected %0d", b, out_idx, out_llr, rllr[int'(out_idx)]));
          check(int'(out_ext) == rext[int'(out_idx)], $sformatf("block %0d ext[%0d] %0d expected %0d", b, out_idx, out_ext, rext[int'(out_idx)]));
          check(int'(out_apr) == la[int'(out_idx)], "a-priori echo");
          check(out_hard == (rllr[int'(out_idx)] > 0), "decision");
          nout++;
        end
        @(negedge clk);
        cyc++;
      end
      check(nout == N, $sformatf("%0d outputs", nout));
      check(cyc - 1 == 3 * (N + 1), $sformatf("pass took %0d cycles", cyc - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
