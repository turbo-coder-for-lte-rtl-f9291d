// turbo_encoder: rate-1/3 parallel concatenated (turbo) encoder for LTE.
//
// An N-bit block arrives in parallel on `data_in` (bit i is information bit
// i). RSC 1 encodes the bits in natural order, RSC 2 encodes the same bits in
// the order given by the QPP interleaver, one bit per clock each. The data
// assembler then puts the systematic bits and both parity sequences into one
// 3*N-bit word: {systematic, parity 1, parity 2}. With the default N = 8 this
// is the 8-bit in / 24-bit out encoder of the source description.
//
// Handshake: a block is accepted on a clock edge where `in_valid` and
// `in_ready` are both high. `out_valid` pulses N+1 cycles later with the
// code word on `data_out`, which holds until the next code word. `in_ready`
// is low while a block is being encoded. Both encoders start each block in
// state 0 and are not terminated.
module turbo_encoder #(
  parameter int unsigned N  = 8,
  parameter int unsigned F1 = 3,
  parameter int unsigned F2 = 2,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   data_in,
  output logic           out_valid,
  output logic [3*N-1:0] data_out
);

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_LOAD} enc_state_e;
  enc_state_e state_q;

  logic [N-1:0]  data_q;
  logic [AW-1:0] idx, pi_addr;
  logic          accept, running;
  logic          u1, u2, p1, p2;

  assign in_ready = (state_q == E_IDLE);
  assign accept   = in_valid && in_ready;
  assign running  = (state_q == E_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= E_IDLE;
      data_q  <= '0;
    end else begin
      unique case (state_q)
        E_IDLE: if (accept) begin
          data_q  <= data_in;
          state_q <= E_RUN;
        end
        E_RUN:  if (idx == AW'(N-1)) state_q <= E_LOAD;
        E_LOAD: state_q <= E_IDLE;
        default: state_q <= E_IDLE;
      endcase
    end
  end

  // Interleaver: natural index idx and interleaved address PI(idx).
  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_interleaver (
    .clk(clk), .rst_n(rst_n), .start(accept), .step(running),
    .addr(pi_addr), .index(idx)
  );

  assign u1 = data_q[idx];
  assign u2 = data_q[pi_addr];

  rsc_encoder u_rsc1 (
    .clk(clk), .rst_n(rst_n), .clear(accept), .en(running),
    .u(u1), .parity(p1), .state()
  );

  rsc_encoder u_rsc2 (
    .clk(clk), .rst_n(rst_n), .clear(accept), .en(running),
    .u(u2), .parity(p2), .state()
  );

  data_assembler #(.N(N)) u_assembler (
    .clk(clk), .rst_n(rst_n),
    .shift(running), .pos(idx),
    .sys_bit(u1), .par1_bit(p1), .par2_bit(p2),
    .load(state_q == E_LOAD),
    .data_out(data_out), .out_valid(out_valid)
  );

endmodule
