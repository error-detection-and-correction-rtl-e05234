// fire_codec_top: the encoder/decoder pairs of the Fire-code mechanizations,
// side by side.
//
// Each link l has its own bit-serial encoder (symbol enable, information bit
// in, code bit out) and decoder (received bit in, corrected information bit
// and status out); the links share only clock and reset. Nothing connects
// an encoder to a decoder inside: the channel between them is outside.
//
//   link 0  (279,265) Fire code, p(X) = X^5+X^2+1, c = 9, corrects bursts <= 5
//   link 1  (214,200) shortening of link 0's code (65 symbols omitted)
//   link 2  (35,27)   Fire code, p(X) = X^3+X+1,   c = 5, corrects bursts <= 3
//   link 3  (23,15)   shortening of link 2's code (12 symbols omitted)
//   link 4  (7,4)     cyclic code g(X) = X^3+X+1, corrects single errors
//
// The generators are formed from p(X) and c at elaboration time, and the
// natural code length lcm(e, c) is computed from the order e of p(X); the
// codes, burst lengths and shortenings are the document's. Encoder and
// decoder timing are described in fire_encoder and fire_decoder: the encoder
// emits one code symbol per enabled clock; the decoder takes a whole block,
// then emits its K corrected information symbols on K consecutive clocks.
module fire_codec_top
  import fire_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // encoders
  input  logic [4:0]            enc_sym_en,
  input  logic [4:0]            enc_info_in,
  output logic [4:0]            enc_info_req,
  output logic [4:0]            enc_code_out,
  output logic [4:0]            enc_code_sop,
  output logic [4:0]            enc_code_eop,
  // decoders
  input  logic [4:0]            dec_rx_valid,
  input  logic [4:0]            dec_rx_bit,
  output logic [4:0]            dec_rx_ready,
  output logic [4:0]            dec_out_valid,
  output logic [4:0]            dec_out_bit,
  output logic [4:0]            dec_out_first,
  output logic [4:0]            dec_out_last,
  output dec_status_t [4:0]     dec_status
);

  localparam poly_t       P5     = poly_t'(64'h25);   // X^5 + X^2 + 1
  localparam int unsigned C9     = 9;
  localparam poly_t       G279   = fire_generator(P5, C9);
  localparam int unsigned N279   = fire_length(P5, C9);
  localparam int unsigned K279   = N279 - poly_degree(G279);

  localparam poly_t       P3     = poly_t'(64'h0B);   // X^3 + X + 1
  localparam int unsigned C5     = 5;
  localparam poly_t       G35    = fire_generator(P3, C5);
  localparam int unsigned N35    = fire_length(P3, C5);
  localparam int unsigned K35    = N35 - poly_degree(G35);

  localparam poly_t       G7     = poly_t'(64'h0B);   // 1 + X + X^3

  // ---------------------------------------------------------------- link 0
  fire_encoder #(.G(G279), .K(K279)) u_enc0 (
    .clk, .rst_n, .sym_en(enc_sym_en[0]), .info_in(enc_info_in[0]),
    .info_req(enc_info_req[0]), .code_out(enc_code_out[0]),
    .code_sop(enc_code_sop[0]), .code_eop(enc_code_eop[0]));

  fire_decoder #(.G(G279), .K(K279), .B(5)) u_dec0 (
    .clk, .rst_n, .rx_valid(dec_rx_valid[0]), .rx_bit(dec_rx_bit[0]),
    .rx_ready(dec_rx_ready[0]), .out_valid(dec_out_valid[0]),
    .out_bit(dec_out_bit[0]), .out_first(dec_out_first[0]),
    .out_last(dec_out_last[0]), .status(dec_status[0]));

  // ---------------------------------------------------------------- link 1
  fire_encoder #(.G(G279), .K(200)) u_enc1 (
    .clk, .rst_n, .sym_en(enc_sym_en[1]), .info_in(enc_info_in[1]),
    .info_req(enc_info_req[1]), .code_out(enc_code_out[1]),
    .code_sop(enc_code_sop[1]), .code_eop(enc_code_eop[1]));

  fire_shortened_decoder #(.G(G279), .N_FULL(N279), .K(200), .B(5)) u_dec1 (
    .clk, .rst_n, .rx_valid(dec_rx_valid[1]), .rx_bit(dec_rx_bit[1]),
    .rx_ready(dec_rx_ready[1]), .out_valid(dec_out_valid[1]),
    .out_bit(dec_out_bit[1]), .out_first(dec_out_first[1]),
    .out_last(dec_out_last[1]), .status(dec_status[1]));

  // ---------------------------------------------------------------- link 2
  fire_encoder #(.G(G35), .K(K35)) u_enc2 (
    .clk, .rst_n, .sym_en(enc_sym_en[2]), .info_in(enc_info_in[2]),
    .info_req(enc_info_req[2]), .code_out(enc_code_out[2]),
    .code_sop(enc_code_sop[2]), .code_eop(enc_code_eop[2]));

  fire_decoder #(.G(G35), .K(K35), .B(3)) u_dec2 (
    .clk, .rst_n, .rx_valid(dec_rx_valid[2]), .rx_bit(dec_rx_bit[2]),
    .rx_ready(dec_rx_ready[2]), .out_valid(dec_out_valid[2]),
    .out_bit(dec_out_bit[2]), .out_first(dec_out_first[2]),
    .out_last(dec_out_last[2]), .status(dec_status[2]));

  // ---------------------------------------------------------------- link 3
  fire_encoder #(.G(G35), .K(15)) u_enc3 (
    .clk, .rst_n, .sym_en(enc_sym_en[3]), .info_in(enc_info_in[3]),
    .info_req(enc_info_req[3]), .code_out(enc_code_out[3]),
    .code_sop(enc_code_sop[3]), .code_eop(enc_code_eop[3]));

  fire_shortened_decoder #(.G(G35), .N_FULL(N35), .K(15), .B(3)) u_dec3 (
    .clk, .rst_n, .rx_valid(dec_rx_valid[3]), .rx_bit(dec_rx_bit[3]),
    .rx_ready(dec_rx_ready[3]), .out_valid(dec_out_valid[3]),
    .out_bit(dec_out_bit[3]), .out_first(dec_out_first[3]),
    .out_last(dec_out_last[3]), .status(dec_status[3]));

  // ---------------------------------------------------------------- link 4
  fire_encoder #(.G(G7), .K(4)) u_enc4 (
    .clk, .rst_n, .sym_en(enc_sym_en[4]), .info_in(enc_info_in[4]),
    .info_req(enc_info_req[4]), .code_out(enc_code_out[4]),
    .code_sop(enc_code_sop[4]), .code_eop(enc_code_eop[4]));

  fire_decoder #(.G(G7), .K(4), .B(1)) u_dec4 (
    .clk, .rst_n, .rx_valid(dec_rx_valid[4]), .rx_bit(dec_rx_bit[4]),
    .rx_ready(dec_rx_ready[4]), .out_valid(dec_out_valid[4]),
    .out_bit(dec_out_bit[4]), .out_first(dec_out_first[4]),
    .out_last(dec_out_last[4]), .status(dec_status[4]));

endmodule
