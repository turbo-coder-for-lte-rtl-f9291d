// turbo_coder_top: LTE turbo coder, i.e. the rate-1/3 turbo encoder and the
// iterative Log-MAP turbo decoder side by side.
//
// The encoder turns an N-bit block into a 3*N-bit code word
// {systematic, parity 1, parity 2}. The channel (modulation, transmission,
// demodulation, A/D conversion and synchronisation) lies outside this
// design: the decoder receives, per bit position, three IN_W-bit signed soft
// values (systematic, parity 1, parity 2; positive favours a one) and
// returns the decoded N-bit block. Both halves share clock and asynchronous
// active-low reset and are otherwise independent; their handshakes and
// timing are described in turbo_encoder and turbo_decoder. The block size,
// interleaver and decoder parameters must be the same on both sides, which
// is why they are set here once.
module turbo_coder_top #(
  parameter int unsigned N          = 8,
  parameter int unsigned F1         = 3,
  parameter int unsigned F2         = 2,
  parameter int unsigned IN_W       = 3,
  parameter int unsigned EXT_W      = 7,
  parameter int unsigned MW         = 12,
  parameter bit          LOG_MAP    = 1'b1,
  parameter int unsigned MAX_ITER   = 8,
  parameter int unsigned SDR_THRESH = 0,
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // encoder
  input  logic                   enc_in_valid,
  output logic                   enc_in_ready,
  input  logic [N-1:0]           enc_data_in,
  output logic                   enc_out_valid,
  output logic [3*N-1:0]         enc_data_out,
  // decoder
  input  logic                   dec_in_valid,
  output logic                   dec_in_ready,
  input  logic signed [IN_W-1:0] dec_in_sys,
  input  logic signed [IN_W-1:0] dec_in_p1,
  input  logic signed [IN_W-1:0] dec_in_p2,
  output logic                   dec_out_valid,
  output logic [N-1:0]           dec_out_bits,
  output logic [IW-1:0]          dec_out_iters,
  output logic                   dec_out_early,
  output logic                   dec_busy
);

  turbo_encoder #(.N(N), .F1(F1), .F2(F2)) u_encoder (
    .clk(clk), .rst_n(rst_n),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .data_in(enc_data_in),
    .out_valid(enc_out_valid), .data_out(enc_data_out)
  );

  turbo_decoder #(
    .N(N), .F1(F1), .F2(F2), .IN_W(IN_W), .EXT_W(EXT_W), .MW(MW),
    .LOG_MAP(LOG_MAP), .MAX_ITER(MAX_ITER), .SDR_THRESH(SDR_THRESH)
  ) u_decoder (
    .clk(clk), .rst_n(rst_n),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready),
    .in_sys(dec_in_sys), .in_p1(dec_in_p1), .in_p2(dec_in_p2),
    .out_valid(dec_out_valid), .out_bits(dec_out_bits),
    .out_iters(dec_out_iters), .out_early(dec_out_early), .busy(dec_busy)
  );

endmodule
