// poly_div_register: the (n-k)-stage shift register that divides by a
// generator polynomial g(X) of degree R, as used by every Fire-code encoder
// and decoder in this design.
//
// Stage i of the drawings (1..R) is state[i-1]; stage R, state[R-1], holds the
// highest-order remainder coefficient and is the register output. On each
// enabled clock the register multiplies its contents by X and reduces modulo
// g(X); the input bit is added through its own set of taps:
//
//   fb     = gate & state[R-1]                  (Gate 1 on the feedback path)
//   state' = {state[R-2:0], 0} ^ (fb ? FB_TAPS : 0) ^ (din ? IN_TAPS : 0)
//
// FB_TAPS are the coefficients of g(X) below X^R (one modulo-two adder in
// front of stage i+1 for each set bit i). For a normal encoder or decoder
// IN_TAPS equals FB_TAPS, which is the "input added to the output, then fed
// back" arrangement of the drawings, and after a sequence of inputs the
// register holds X^R f(X) mod g(X). A shortened-code decoder sets IN_TAPS to
// the pre-multiplier X^(R+z) mod g(X); taps present in both sets are the
// "both" connections, the rest are "feedback" or "input" only. With gate low
// and din low the register is a plain shift register that shifts its
// contents out of stage R and fills stage 1 with zeros.
//
// clear is a synchronous reset to all zeros and has priority over shift. The
// tap arrangement follows the document; the clear and enable pins are this
// design's choice.
module poly_div_register #(
  parameter int unsigned    R       = 14,
  parameter logic [R-1:0]   FB_TAPS = R'(14'h0A25),
  parameter logic [R-1:0]   IN_TAPS = FB_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift,
  input  logic         gate,
  input  logic         din,
  output logic [R-1:0] state,
  output logic         msb
);

  logic         fb;
  logic [R-1:0] nxt;

  initial assert (R >= 2) else $fatal(1, "poly_div_register needs R >= 2");

  always_comb begin
    fb  = gate & state[R-1];
    nxt = {state[R-2:0], 1'b0};
    if (fb)  nxt ^= FB_TAPS;
    if (din) nxt ^= IN_TAPS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (shift) state <= nxt;
  end

  assign msb = state[R-1];

endmodule
