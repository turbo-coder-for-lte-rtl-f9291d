// tb_metric_ram: random accesses against a model array. A read returns the
// last value written to the address one cycle later; while `en` is low
// nothing is written even with `we` high and random address and data on the
// inputs, and `rdata` holds.
module tb_metric_ram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, we;
  logic [2:0] addr;
  logic [7:0] wdata, rdata;
  metric_ram dut (.*);

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
    logic [7:0] model [8];
    logic [7:0] last;
    bit rd;
    en = 1; we = 1;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); addr = 3'(k); wdata = 8'($urandom); model[k] = wdata;
    end
    @(negedge clk); we = 0; addr = 0;
    @(negedge clk);
    last = model[0];
    for (int t = 0; t < 5000; t++) begin
      en = ($urandom_range(2) != 0);
      we = 1'($urandom_range(1));
      addr = 3'($urandom_range(7));
      wdata = 8'($urandom);
      rd = en && !we;
      if (en && we) model[addr] = wdata;
      if (rd) last = model[addr];
      @(negedge clk);
      check(rdata == last, $sformatf("rdata %h expected %h", rdata, last));
    end
    en = 1; we = 0;
    for (int k = 0; k < 8; k++) begin
      addr = 3'(k);
      @(negedge clk);
      check(rdata == model[k], $sformatf("final contents of %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
