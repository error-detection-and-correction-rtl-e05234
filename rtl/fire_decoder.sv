// fire_decoder: (n-k) shift-register burst-trapping decoder for a cyclic
// burst-correcting code, in particular a Fire code g(X) = p(X)(X^c + 1),
// normal or shortened.
//
// Operation per block, in two phases:
//  1. Receive (rx_ready high): N = K + R received symbols enter, one per
//     clock with rx_valid, highest order first. Each enters the division
//     register through Gate 1; the first K (the information symbols) are also
//     written into the K-bit buffer. Afterwards the register holds the
//     syndrome, X^(R+Z) f(X) mod g(X).
//  2. Correct (out_valid high, K clocks, no stall): each clock one buffered
//     symbol leaves and the register shifts once with no input. The TEST
//     watches the leading R-B stages; when they are all zero the error burst
//     sits in the last B stages, lined up with the symbol leaving the buffer.
//     From then on Gate 1 (feedback) stays closed and Gate 2 adds the
//     register's last stage to each leaving symbol, which corrects it.
// out_last marks the final symbol; status is valid with it: detected (the
// syndrome was non-zero), corrected (a burst was trapped) and uncorrectable
// (non-zero syndrome never trapped while the information symbols left; the
// symbols are then passed on unchanged). A burst lying wholly in the check
// symbols is never trapped in this window and is reported uncorrectable,
// although the information symbols are intact.
//
// The first output follows the last received symbol by one clock, and a block
// occupies the decoder for N + K clocks. The register is cleared when the
// correction phase ends.
//
// For a shortened code (Z high-order information symbols omitted, N = n - Z)
// the input taps IN_TAPS are the pre-multiplier X^(R+Z) mod g(X) instead of
// the feedback taps; see fire_shortened_decoder, which computes them. The
// gates, buffer, TEST and sequence are the document's; the handshake,
// counters, status flags and the clearing of the register are this design's
// choice. Defaults: the (279,265) Fire code correcting bursts up to 5.
module fire_decoder
  import fire_pkg::*;
#(
  parameter poly_t       G       = fire_generator(poly_t'(64'h25), 9),
  parameter int unsigned K       = 265,
  parameter int unsigned B       = 5,
  parameter poly_t       IN_TAPS = xpow_mod(poly_degree(G), G)
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

  localparam int unsigned R  = poly_degree(G);
  localparam int unsigned N  = K + R;
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic { RECEIVE, CORRECT } phase_t;

  phase_t        phase;
  logic [CW-1:0] cnt;
  logic [R-1:0]  state;
  logic          msb;
  logic          lead_zero, nonzero;
  logic          trapped_q, detected_q;
  logic          closed;      // Gate 1 closed / Gate 2 open
  logic          buf_out;
  logic          rx_take;
  logic          shift;
  logic          detected_now, corrected_now;

  initial assert (G[0] && R >= 2 && K >= 2 && B >= 1 && B < R)
    else $fatal(1, "fire_decoder: bad parameters");

  assign rx_ready  = (phase == RECEIVE);
  assign rx_take   = rx_ready & rx_valid;
  assign out_valid = (phase == CORRECT);
  assign out_first = out_valid & (cnt == '0);
  assign out_last  = out_valid & (cnt == CW'(K - 1));

  // Gate 1 is closed, and Gate 2 open, from the clock the TEST first sees
  // the leading stages zero until the end of the block.
  assign closed  = out_valid & (trapped_q | lead_zero);
  assign shift   = rx_take | out_valid;
  assign out_bit = buf_out ^ (closed & msb);

  assign detected_now  = (cnt == '0) ? nonzero : detected_q;
  assign corrected_now = trapped_q | (lead_zero & nonzero);
  always_comb begin
    status               = '0;
    status.detected      = detected_now;
    status.corrected     = detected_now & corrected_now;
    status.uncorrectable = detected_now & ~corrected_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= RECEIVE;
      cnt        <= '0;
      trapped_q  <= 1'b0;
      detected_q <= 1'b0;
    end else if (phase == RECEIVE) begin
      trapped_q <= 1'b0;
      if (rx_take) begin
        if (cnt == CW'(N - 1)) begin
          phase <= CORRECT;
          cnt   <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end else begin
      if (cnt == '0) detected_q <= nonzero;
      if (lead_zero & nonzero) trapped_q <= 1'b1;
      if (cnt == CW'(K - 1)) begin
        phase <= RECEIVE;
        cnt   <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  poly_div_register #(
    .R       (R),
    .FB_TAPS (G[R-1:0]),
    .IN_TAPS (IN_TAPS[R-1:0])
  ) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (out_last),
    .shift (shift),
    .gate  (~closed),
    .din   (rx_take & rx_bit),
    .state (state),
    .msb   (msb)
  );

  burst_trap_test #(
    .R (R),
    .B (B)
  ) u_test (
    .state     (state),
    .lead_zero (lead_zero),
    .nonzero   (nonzero)
  );

  buffer_storage #(
    .DEPTH (K)
  ) u_buf (
    .clk  (clk),
    .wr   (rx_take & (cnt < CW'(K))),
    .din  (rx_bit),
    .rd   (out_valid),
    .dout (buf_out)
  );

  // The status flags are exclusive, and a correction needs a detection.
  always_comb
    if (out_last) assert (!(status.corrected && status.uncorrectable))
      else $error("fire_decoder: inconsistent status");

endmodule
