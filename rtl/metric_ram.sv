// metric_ram: single-port storage with registered read, used for the branch
// metric (BM), forward state metric (FSM) and backward state metric (BSM)
// storage of the SISO decoder and for the channel and extrinsic buffers of
// the turbo decoder.
//
// One access per cycle when `en` is high: a write when `we` is high,
// otherwise a read whose data appears on `rdata` after the next clock edge.
// Input blocking: the address and write data are ANDed with `en` before
// they reach the array, so when the memory is not accessed its inputs are
// held at 0 instead of following whatever the shared buses carry. This is
// the source description's "blocking of floating inputs" power measure; `rdata` keeps
// its last value while the memory is idle. The array itself is not reset.
module metric_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr_b;
  logic [WIDTH-1:0] wdata_b;

  // Blocking of floating inputs.
  assign addr_b  = addr  & {AW{en}};
  assign wdata_b = wdata & {WIDTH{en}};

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr_b] <= wdata_b;
      else    rdata       <= mem[addr_b];
    end
  end

endmodule
