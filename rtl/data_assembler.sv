// data_assembler: collects the systematic bits and the two parity streams of
// one block and presents them as a single 3*N-bit code word.
//
// While `shift` is high one systematic bit and the two parity bits of the
// current position are written at bit position `pos`. When `load` is high
// the collected bits are copied to the output register as
//   data_out = {systematic[N-1:0], parity1[N-1:0], parity2[N-1:0]}
// and `out_valid` pulses for one cycle. For N = 8 this is the 24-bit output
// of the source description's encoder; the field order is this design's choice.
module data_assembler #(
  parameter int unsigned N = 8,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,
  input  logic [AW-1:0]   pos,
  input  logic            sys_bit,
  input  logic            par1_bit,
  input  logic            par2_bit,
  input  logic            load,
  output logic [3*N-1:0]  data_out,
  output logic            out_valid
);

  logic [N-1:0] sys_q, p1_q, p2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sys_q     <= '0;
      p1_q      <= '0;
      p2_q      <= '0;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load;
      if (shift) begin
        sys_q[pos] <= sys_bit;
        p1_q[pos]  <= par1_bit;
        p2_q[pos]  <= par2_bit;
      end
      if (load) data_out <= {sys_q, p1_q, p2_q};
    end
  end

endmodule
