// tb_fire_decoder: runs the default (279,265) decoder (bursts <= 5) and the
// (35,27) (bursts <= 3) and (7,4) (single errors) decoders against the
// reference decoder through dec_driver, and requires that every outcome
// (clean block, corrected burst, uncorrectable pattern, burst confined to
// the check symbols) occurred on each.
module tb_fire_decoder;
  import fire_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [2:0] rx_valid, rx_bit, rx_ready, out_valid, out_bit, out_first, out_last, done;
  dec_status_t [2:0] status;
  int c[3], f[3], nc[3], nk[3], nu[3], nx[3];

  fire_decoder dut0 (.clk, .rst_n, .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]),
    .rx_ready(rx_ready[0]), .out_valid(out_valid[0]), .out_bit(out_bit[0]),
    .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]));
  dec_driver #(.N(279), .K(265), .B(5), .G(64'h4A25), .BLOCKS(40)) drv0 (.clk, .rst_n,
    .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]), .rx_ready(rx_ready[0]), .out_valid(out_valid[0]),
    .out_bit(out_bit[0]), .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]),
    .done(done[0]), .checks(c[0]), .failures(f[0]), .n_clean(nc[0]), .n_corrected(nk[0]),
    .n_uncorrectable(nu[0]), .n_check_only(nx[0]));

  fire_decoder #(.G(64'h16B), .K(27), .B(3)) dut1 (.clk, .rst_n, .rx_valid(rx_valid[1]),
    .rx_bit(rx_bit[1]), .rx_ready(rx_ready[1]), .out_valid(out_valid[1]), .out_bit(out_bit[1]),
    .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]));
  dec_driver #(.N(35), .K(27), .B(3), .G(64'h16B), .BLOCKS(200)) drv1 (.clk, .rst_n,
    .rx_valid(rx_valid[1]), .rx_bit(rx_bit[1]), .rx_ready(rx_ready[1]), .out_valid(out_valid[1]),
    .out_bit(out_bit[1]), .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]),
    .done(done[1]), .checks(c[1]), .failures(f[1]), .n_clean(nc[1]), .n_corrected(nk[1]),
    .n_uncorrectable(nu[1]), .n_check_only(nx[1]));

  fire_decoder #(.G(64'hB), .K(4), .B(1)) dut2 (.clk, .rst_n, .rx_valid(rx_valid[2]),
    .rx_bit(rx_bit[2]), .rx_ready(rx_ready[2]), .out_valid(out_valid[2]), .out_bit(out_bit[2]),
    .out_first(out_first[2]), .out_last(out_last[2]), .status(status[2]));
  dec_driver #(.N(7), .K(4), .B(1), .G(64'hB), .BLOCKS(300)) drv2 (.clk, .rst_n,
    .rx_valid(rx_valid[2]), .rx_bit(rx_bit[2]), .rx_ready(rx_ready[2]), .out_valid(out_valid[2]),
    .out_bit(out_bit[2]), .out_first(out_first[2]), .out_last(out_last[2]), .status(status[2]),
    .done(done[2]), .checks(c[2]), .failures(f[2]), .n_clean(nc[2]), .n_corrected(nk[2]),
    .n_uncorrectable(nu[2]), .n_check_only(nx[2]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    for (int i = 0; i < 3; i++) begin
      $display("decoder %0d: clean %0d corrected %0d uncorrectable %0d check-only bursts %0d",
               i, nc[i], nk[i], nu[i], nx[i]);
      checks += c[i] + 4;
      failures += f[i];
      if (nc[i] == 0) failures++;
      if (nk[i] == 0) failures++;
      if (nu[i] == 0) failures++;
      if (nx[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
