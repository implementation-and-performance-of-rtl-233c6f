// turbo_top: parallel decodable turbo code (PDTC) transmitter and receiver.
//
// Transmit side: pdtc_encoder codes a 160-bit packet into 512 coded bits
// (N_DEC = 4 upper and 4 lower terminated RSC encoders with the collision-free
// bank interleaver). Its outputs are brought out to feed a modulator/channel.
//
// Receive side: obs_quantiser normalises a packet of 512 raw channel samples
// to the decoder's K-bit observations and writes them into the ping-pong
// observation buffer of pdtc_decoder, which decodes with 4 parallel
// centre-to-top MAP decoders over ITERATIONS iterations (2 cluster runs of
// 48 cycles each). q_lut supplies the quantisation step q from NormMax and
// the SNR for the log-MAP correction table; with the default max-log-MAP
// decoders (LOG_MAP = 0) q is not needed and the table output is unused.
//
// Interfaces:
//   enc_*  info-bit loading, start, coded-bit outputs (see pdtc_encoder)
//   rx_*   raw sample stream in packet order, with valid/ready; norm_max and
//          snr_idx configure the quantisation
//   res_*  result access (see pdtc_decoder); dec_busy/dec_done for status
// Timing: a packet is decoded in 2 * ITERATIONS * 48 cycles once its
// observations are stored; a following packet may be received meanwhile.
module turbo_top
  import turbo_pkg::*;
#(
  parameter bit LOG_MAP    = 1'b0,
  parameter int ITERATIONS = ITER,
  parameter int RAW_W      = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // encoder
  input  logic                    enc_wr_en,
  input  bank_t                   enc_wr_bank,
  input  step_t                   enc_wr_addr,
  input  logic                    enc_wr_bit,
  input  logic                    enc_start,
  output logic                    enc_busy,
  output logic                    enc_out_valid,
  output step_t                   enc_out_step,
  output logic                    enc_out_sys  [N_DEC],
  output logic                    enc_out_p1   [N_DEC],
  output logic                    enc_out_p2   [N_DEC],
  output logic                    enc_out_sys2 [N_DEC],
  output logic                    enc_done,
  // receiver
  input  logic [K-2:0]            norm_max,
  input  logic [5:0]              snr_idx,
  input  logic                    rx_valid,
  input  logic signed [RAW_W-1:0] rx_sample,
  output logic                    rx_ready,
  // decoder results
  output logic                    dec_busy,
  output logic                    dec_done,
  output logic                    res_valid,
  input  logic                    res_ack,
  input  bank_t                   res_bank,
  input  step_t                   res_addr,
  output metric_t                 res_ll,
  output logic                    res_bit
);

  pdtc_encoder u_enc (
    .clk, .rst_n,
    .in_wr_en(enc_wr_en), .in_wr_bank(enc_wr_bank), .in_wr_addr(enc_wr_addr),
    .in_wr_bit(enc_wr_bit), .start(enc_start), .busy(enc_busy),
    .out_valid(enc_out_valid), .out_step(enc_out_step),
    .out_sys(enc_out_sys), .out_p1(enc_out_p1), .out_p2(enc_out_p2),
    .out_sys2(enc_out_sys2), .done(enc_done));

  logic       q_wr_en, q_load_done, load_ready;
  obs_kind_e  q_wr_kind;
  bank_t      q_wr_bank;
  step_t      q_wr_addr;
  metric_t    q_wr_data;
  logic [7:0] q_code;

  obs_quantiser #(.RAW_W(RAW_W)) u_quant (
    .clk, .rst_n, .norm_max,
    .in_valid(rx_valid), .in_sample(rx_sample), .in_ready(rx_ready),
    .out_ready(load_ready),
    .wr_en(q_wr_en), .wr_kind(q_wr_kind), .wr_bank(q_wr_bank),
    .wr_addr(q_wr_addr), .wr_data(q_wr_data), .load_done(q_load_done));

  q_lut u_qlut (.norm_max(5'(norm_max)), .snr_idx, .q_code);

  pdtc_decoder #(.LOG_MAP(LOG_MAP), .ITERATIONS(ITERATIONS)) u_dec (
    .clk, .rst_n, .q_code,
    .wr_en(q_wr_en), .wr_kind(q_wr_kind), .wr_bank(q_wr_bank),
    .wr_addr(q_wr_addr), .wr_data(q_wr_data), .load_done(q_load_done),
    .load_ready,
    .busy(dec_busy), .done(dec_done), .res_valid, .res_ack,
    .res_bank, .res_addr, .res_ll, .res_bit);

endmodule
