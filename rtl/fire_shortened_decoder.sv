// fire_shortened_decoder: decoder for a shortened Fire code.
//
// A code of natural length N_FULL is shortened to N = K + R symbols by
// taking its Z = N_FULL - N highest-order information symbols as zero and not
// sending them. Encoding is unchanged (fire_encoder with the smaller K), but
// the decoder must behave as if it had shifted Z extra zeros, i.e. it must
// form X^(R+Z) f(X) mod g(X) instead of X^R f(X) mod g(X). This module
// computes, at elaboration time, the pre-multiplier X^(R+Z) mod g(X) and
// uses it as the input taps of the division register while the feedback
// keeps the taps of g(X). The register length is unchanged; only modulo-two
// adders are added. Burst trapping and timing are those of fire_decoder.
//
// Defaults: the (214,200) shortening of the (279,265) code, Z = 65, whose
// input taps are X^79 mod g(X) = X^13+X^11+X^10+X^9+X^7+X^4+X^2+X+1.
// The shortening scheme is the document's; computing the residue in
// SystemVerilog rather than by hand is this design's choice.
module fire_shortened_decoder
  import fire_pkg::*;
#(
  parameter poly_t       G      = fire_generator(poly_t'(64'h25), 9),
  parameter int unsigned N_FULL = 279,
  parameter int unsigned K      = 200,
  parameter int unsigned B      = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic        rx_bit,
  output logic        rx_ready,
  output logic        out_valid,
  output logic        out_bit,
  output logic        out_first,
  output logic        out_last,
  output dec_status_t status
);

  localparam int unsigned R        = poly_degree(G);
  localparam int unsigned Z        = N_FULL - R - K;
  localparam poly_t       PRE_MULT = xpow_mod(R + Z, G);

  initial assert (N_FULL > R + K) else $fatal(1, "fire_shortened_decoder: code is not shortened");

  fire_decoder #(
    .G       (G),
    .K       (K),
    .B       (B),
    .IN_TAPS (PRE_MULT)
  ) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_valid  (rx_valid),
    .rx_bit    (rx_bit),
    .rx_ready  (rx_ready),
    .out_valid (out_valid),
    .out_bit   (out_bit),
    .out_first (out_first),
    .out_last  (out_last),
    .status    (status)
  );

endmodule
