// dec_driver: stimulus and checking for one burst-trapping decoder.
//
// Sends BLOCKS code blocks of N = K + R symbols (random information, encoded
// by long division) with errors added, one symbol per rx_valid clock with
// random idle clocks between, and compares the K symbols that come back and
// the status with the reference decoder of fire_ref_pkg. Error mix per
// block, in rotation: none; a burst of length <= B ending in the information
// part (must be corrected and the original information returned); a burst of
// length <= B anywhere, half the time inside the check symbols; a burst longer than B; several scattered bit errors.
// Timing: the first output must follow the last received symbol by one clock,
// the K outputs must come on consecutive clocks, rx_ready must be low during
// them and high otherwise. Counts how often each decoder outcome was seen.
module dec_driver
  import fire_pkg::*;
  import fire_ref_pkg::*;
#(
  parameter int     N      = 35,
  parameter int     K      = 27,
  parameter int     B      = 3,
  parameter gpoly_t G      = 64'h16B,
  parameter int     BLOCKS = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        rx_valid,
  output logic        rx_bit,
  input  logic        rx_ready,
  input  logic        out_valid,
  input  logic        out_bit,
  input  logic        out_first,
  input  logic        out_last,
  input  dec_status_t status,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          n_clean,
  output int          n_corrected,
  output int          n_uncorrectable,
  output int          n_check_only
);
  localparam int R = N - K;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d K=%0d) %s", N, K, what);
    end
  endtask

  initial begin
    rx_valid = 0; rx_bit = 0; done = 0;
    checks = 0; failures = 0;
    n_clean = 0; n_corrected = 0; n_uncorrectable = 0; n_check_only = 0;
    @(posedge rst_n);
    for (int blk = 0; blk < BLOCKS; blk++) begin
      automatic vec_t        info = '0, cw, err = '0, rx, got = '0;
      automatic ref_result_t exp;
      automatic int          kind = blk % 5;
      automatic int          len, pos;
      automatic bit          must_restore = 0;
      automatic dec_status_t st = '0;
      for (int i = 0; i < K; i++) info[i] = 1'($urandom);
      cw = encode(info, K, G);
      case (kind)
        0: ;
        1: begin
          len = $urandom_range(1, B);
          pos = $urandom_range(R - len + 1, N - len);
          err = burst(pos, len);
          must_restore = 1;
        end
        2: begin
          len = $urandom_range(1, B);
          pos = ($urandom_range(1) == 0) ? $urandom_range(0, R - len) : $urandom_range(0, N - len);
          err = burst(pos, len);
          must_restore = (pos + len - 1 >= R);
        end
        3: begin
          len = $urandom_range(B + 1, (R < 2 * B + 1) ? R : 2 * B + 1);
          pos = $urandom_range(0, N - len);
          err = burst(pos, len);
        end
        default: begin
          automatic int ne = $urandom_range(2, 5);
          for (int i = 0; i < ne; i++) err[$urandom_range(0, N - 1)] = 1'b1;
        end
      endcase
      rx  = cw ^ err;
      exp = ref_decode(rx, N, K, B, G);

      for (int t = 0; t < N; t++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          rx_valid = 0; rx_bit = 1'($urandom);
        end
        @(negedge clk);
        check(rx_ready && !out_valid, $sformatf("blk %0d ready while receiving", blk));
        rx_valid = 1; rx_bit = rx[N - 1 - t];
      end
      for (int j = 0; j < K; j++) begin
        @(negedge clk);
        rx_valid = 0; rx_bit = 1'($urandom);
        check(out_valid && !rx_ready, $sformatf("blk %0d output slot %0d", blk, j));
        check(out_first == (j == 0), $sformatf("blk %0d out_first at %0d", blk, j));
        check(out_last == (j == K - 1), $sformatf("blk %0d out_last at %0d", blk, j));
        got[K - 1 - j] = out_bit;
        if (j == K - 1) st = status;
      end
      @(negedge clk);
      check(rx_ready && !out_valid, $sformatf("blk %0d ready after output", blk));

      check(got[K-1:0] == exp.info[K-1:0], $sformatf("blk %0d kind %0d data", blk, kind));
      if (must_restore)
        check(got[K-1:0] == info[K-1:0], $sformatf("blk %0d kind %0d restored", blk, kind));
      check(st.detected == exp.detected && st.corrected == exp.corrected &&
            st.uncorrectable == exp.uncorrectable,
            $sformatf("blk %0d kind %0d status %b exp %b%b%b", blk, kind, st,
                      exp.detected, exp.corrected, exp.uncorrectable));
      if (!st.detected) n_clean++;
      if (st.corrected) n_corrected++;
      if (st.uncorrectable) n_uncorrectable++;
      if (kind == 2 && !must_restore) n_check_only++;
    end
    done = 1;
  end
endmodule
