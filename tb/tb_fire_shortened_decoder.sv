// tb_fire_shortened_decoder: runs the default (214,200) shortened decoder
// (from the (279,265) code, bursts <= 5) and the (23,15) shortened decoder
// (from the (35,27) code, bursts <= 3) against the reference decoder through
// dec_driver. It also checks the residue function that forms the decoders'
// input pre-multipliers against
// the residues X^79 mod g(X) = X^13+X^11+X^10+X^9+X^7+X^4+X^2+X+1 and
// X^20 mod g(X) = X^7+X^6+X^5+X^2+X, and requires every outcome to occur.
module tb_fire_shortened_decoder;
  import fire_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [1:0] rx_valid, rx_bit, rx_ready, out_valid, out_bit, out_first, out_last, done;
  dec_status_t [1:0] status;
  int c[2], f[2], nc[2], nk[2], nu[2], nx[2];

  fire_shortened_decoder dut0 (.clk, .rst_n, .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]),
    .rx_ready(rx_ready[0]), .out_valid(out_valid[0]), .out_bit(out_bit[0]),
    .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]));
  dec_driver #(.N(214), .K(200), .B(5), .G(64'h4A25), .BLOCKS(60)) drv0 (.clk, .rst_n,
    .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]), .rx_ready(rx_ready[0]), .out_valid(out_valid[0]),
    .out_bit(out_bit[0]), .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]),
    .done(done[0]), .checks(c[0]), .failures(f[0]), .n_clean(nc[0]), .n_corrected(nk[0]),
    .n_uncorrectable(nu[0]), .n_check_only(nx[0]));

  fire_shortened_decoder #(.G(64'h16B), .N_FULL(35), .K(15), .B(3)) dut1 (.clk, .rst_n,
    .rx_valid(rx_valid[1]), .rx_bit(rx_bit[1]), .rx_ready(rx_ready[1]), .out_valid(out_valid[1]),
    .out_bit(out_bit[1]), .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]));
  dec_driver #(.N(23), .K(15), .B(3), .G(64'h16B), .BLOCKS(300)) drv1 (.clk, .rst_n,
    .rx_valid(rx_valid[1]), .rx_bit(rx_bit[1]), .rx_ready(rx_ready[1]), .out_valid(out_valid[1]),
    .out_bit(out_bit[1]), .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]),
    .done(done[1]), .checks(c[1]), .failures(f[1]), .n_clean(nc[1]), .n_corrected(nk[1]),
    .n_uncorrectable(nu[1]), .n_check_only(nx[1]));

  initial begin
    checks += 2;
    if (xpow_mod(79, 64'h4A25) != 64'h2E97) begin
      failures++;
      $display("FAIL (214,200) pre-multiplier %h", xpow_mod(79, 64'h4A25));
    end
    if (xpow_mod(20, 64'h16B) != 64'hE6) begin
      failures++;
      $display("FAIL (23,15) pre-multiplier %h", xpow_mod(20, 64'h16B));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    for (int i = 0; i < 2; i++) begin
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
