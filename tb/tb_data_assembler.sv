// tb_data_assembler: random bit triples written at random positions, then
// loaded; the 24-bit word must be {systematic, parity 1, parity 2} with
// bit k of each field from position k, and out_valid must pulse once, one
// cycle after load.
module tb_data_assembler;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic shift, load, out_valid, sys_bit, par1_bit, par2_bit;
  logic [2:0] pos;
  logic [23:0] data_out;
  data_assembler dut (.*);

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
    logic [7:0] s, a, b;
    shift = 0; load = 0; pos = 0; sys_bit = 0; par1_bit = 0; par2_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s = 0; a = 0; b = 0;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 12; k++) begin
        @(negedge clk);
        shift = 1'($urandom_range(1));
        pos = 3'($urandom_range(7));
        sys_bit = 1'($urandom_range(1)); par1_bit = 1'($urandom_range(1)); par2_bit = 1'($urandom_range(1));
        if (shift) begin s[pos] = sys_bit; a[pos] = par1_bit; b[pos] = par2_bit; end
      end
      @(negedge clk); shift = 0; load = 1;
      @(negedge clk); load = 0;
      check(out_valid == 1'b1, "out_valid after load");
      check(data_out == {s, a, b}, $sformatf("word %h expected %h", data_out, {s, a, b}));
      @(negedge clk);
      check(out_valid == 1'b0, "out_valid is a single pulse");
      check(data_out == {s, a, b}, "word holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
