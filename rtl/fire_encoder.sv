// fire_encoder: (n-k) shift-register systematic encoder for a cyclic code
// with generator g(X) of degree R = n-k, in particular a Fire code
// g(X) = p(X)(X^c + 1).
//
// A code block is N = K + R symbols, one per clock in which sym_en is high.
// During the first K symbols (info_req high) the information bit info_in is
// passed straight to the channel (code_out = info_in) and at the same time
// enters the division register through Gate 1, so that after K symbols the
// register holds the remainder r(X) = X^R q(X) mod g(X). For the next R
// symbols Gate 1 is closed, nothing is fed in, and the register shifts the
// check bits out of its last stage, highest order first. The transmitted
// block is X^R q(X) + r(X), a multiple of g(X). The register is empty again
// when the block ends, so blocks follow back to back.
//
// Bit order: the first information bit of a block is the highest-order
// coefficient; check bits follow the information bits. code_out is
// combinational from info_in in the information slots (zero latency) and
// from the register in the check slots. code_sop/code_eop mark the first and
// last symbol of the block. The register structure and sequence are the
// document's; the enable/marker interface is this design's choice.
//
// Defaults: the (279,265) Fire code, g(X) = X^14+X^11+X^9+X^5+X^2+1. Any
// shortened code of the same g(X) uses the same encoder with a smaller K.
module fire_encoder
  import fire_pkg::*;
#(
  parameter poly_t       G = fire_generator(poly_t'(64'h25), 9),
  parameter int unsigned K = 265
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,
  input  logic info_in,
  output logic info_req,
  output logic code_out,
  output logic code_sop,
  output logic code_eop
);

  localparam int unsigned R  = poly_degree(G);
  localparam int unsigned N  = K + R;
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] cnt;
  logic [R-1:0]  state;
  logic          msb;

  initial assert (G[0] && R >= 2 && K >= 1) else $fatal(1, "fire_encoder: bad generator or K");

  assign info_req = (cnt < CW'(K));
  assign code_sop = (cnt == '0);
  assign code_eop = (cnt == CW'(N - 1));
  assign code_out = info_req ? info_in : msb;

  // Every check bit has left the register by the end of a block.
  always_comb
    if (code_sop) assert (state == '0) else $error("fire_encoder: register not empty at block start");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (sym_en) cnt <= code_eop ? '0 : cnt + 1'b1;
  end

  poly_div_register #(
    .R       (R),
    .FB_TAPS (G[R-1:0]),
    .IN_TAPS (G[R-1:0])
  ) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (1'b0),
    .shift (sym_en),
    .gate  (info_req),
    .din   (info_req & info_in),
    .state (state),
    .msb   (msb)
  );

endmodule
