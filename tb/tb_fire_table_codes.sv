// tb_fire_table_codes: decoders for Fire codes taken from the code tables
// (burst correction 3 and 4), generated from p(X) and c by fire_pkg and run
// against the reference decoder through dec_driver:
//   (42,33)   p = X^3+X+1,  c = 6, b = 3
//   (155,145) p = X^5+X^2+1, c = 5, b = 3
//   (105,94)  p = X^4+X+1,  c = 7, b = 4   (the first code for b = 4)
//   (120,108) p = X^4+X+1,  c = 8, b = 4   (the second, one more check bit)
// It also checks the code parameters the generator functions produce: the
// length lcm(e, c), the number of check bits c + m, and the number of
// feedback taps of g(X) for the two degree-4 polynomials of the first b = 4
// code (5 with X^4+X+1, 9 with X^4+X^3+X^2+X+1), and that c = 7 with
// p = X^3+X+1 gives length 7, not e*c = 49, since 7 divides c.
module tb_fire_table_codes;
  import fire_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  localparam poly_t P3  = 64'hB;    // X^3+X+1
  localparam poly_t P4  = 64'h13;   // X^4+X+1
  localparam poly_t P4N = 64'h1F;   // X^4+X^3+X^2+X+1
  localparam poly_t P5  = 64'h25;   // X^5+X^2+1

  localparam poly_t G0 = fire_generator(P3, 6);
  localparam poly_t G1 = fire_generator(P5, 5);
  localparam poly_t G2 = fire_generator(P4, 7);
  localparam poly_t G3 = fire_generator(P4, 8);
  localparam int N0 = fire_length(P3, 6), K0 = N0 - poly_degree(G0);
  localparam int N1 = fire_length(P5, 5), K1 = N1 - poly_degree(G1);
  localparam int N2 = fire_length(P4, 7), K2 = N2 - poly_degree(G2);
  localparam int N3 = fire_length(P4, 8), K3 = N3 - poly_degree(G3);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [3:0] rx_valid, rx_bit, rx_ready, out_valid, out_bit, out_first, out_last, done;
  dec_status_t [3:0] status;
  int c[4], f[4], nc[4], nk[4], nu[4], nx[4];

  fire_decoder #(.G(G0), .K(K0), .B(3)) dut0 (.clk, .rst_n, .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]),
    .rx_ready(rx_ready[0]), .out_valid(out_valid[0]), .out_bit(out_bit[0]),
    .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]));
  dec_driver #(.N(N0), .K(K0), .B(3), .G(G0), .BLOCKS(150)) drv0 (.clk, .rst_n,
    .rx_valid(rx_valid[0]), .rx_bit(rx_bit[0]), .rx_ready(rx_ready[0]), .out_valid(out_valid[0]),
    .out_bit(out_bit[0]), .out_first(out_first[0]), .out_last(out_last[0]), .status(status[0]),
    .done(done[0]), .checks(c[0]), .failures(f[0]), .n_clean(nc[0]), .n_corrected(nk[0]),
    .n_uncorrectable(nu[0]), .n_check_only(nx[0]));

  fire_decoder #(.G(G1), .K(K1), .B(3)) dut1 (.clk, .rst_n, .rx_valid(rx_valid[1]), .rx_bit(rx_bit[1]),
    .rx_ready(rx_ready[1]), .out_valid(out_valid[1]), .out_bit(out_bit[1]),
    .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]));
  dec_driver #(.N(N1), .K(K1), .B(3), .G(G1), .BLOCKS(60)) drv1 (.clk, .rst_n,
    .rx_valid(rx_valid[1]), .rx_bit(rx_bit[1]), .rx_ready(rx_ready[1]), .out_valid(out_valid[1]),
    .out_bit(out_bit[1]), .out_first(out_first[1]), .out_last(out_last[1]), .status(status[1]),
    .done(done[1]), .checks(c[1]), .failures(f[1]), .n_clean(nc[1]), .n_corrected(nk[1]),
    .n_uncorrectable(nu[1]), .n_check_only(nx[1]));

  fire_decoder #(.G(G2), .K(K2), .B(4)) dut2 (.clk, .rst_n, .rx_valid(rx_valid[2]), .rx_bit(rx_bit[2]),
    .rx_ready(rx_ready[2]), .out_valid(out_valid[2]), .out_bit(out_bit[2]),
    .out_first(out_first[2]), .out_last(out_last[2]), .status(status[2]));
  dec_driver #(.N(N2), .K(K2), .B(4), .G(G2), .BLOCKS(80)) drv2 (.clk, .rst_n,
    .rx_valid(rx_valid[2]), .rx_bit(rx_bit[2]), .rx_ready(rx_ready[2]), .out_valid(out_valid[2]),
    .out_bit(out_bit[2]), .out_first(out_first[2]), .out_last(out_last[2]), .status(status[2]),
    .done(done[2]), .checks(c[2]), .failures(f[2]), .n_clean(nc[2]), .n_corrected(nk[2]),
    .n_uncorrectable(nu[2]), .n_check_only(nx[2]));

  fire_decoder #(.G(G3), .K(K3), .B(4)) dut3 (.clk, .rst_n, .rx_valid(rx_valid[3]), .rx_bit(rx_bit[3]),
    .rx_ready(rx_ready[3]), .out_valid(out_valid[3]), .out_bit(out_bit[3]),
    .out_first(out_first[3]), .out_last(out_last[3]), .status(status[3]));
  dec_driver #(.N(N3), .K(K3), .B(4), .G(G3), .BLOCKS(80)) drv3 (.clk, .rst_n,
    .rx_valid(rx_valid[3]), .rx_bit(rx_bit[3]), .rx_ready(rx_ready[3]), .out_valid(out_valid[3]),
    .out_bit(out_bit[3]), .out_first(out_first[3]), .out_last(out_last[3]), .status(status[3]),
    .done(done[3]), .checks(c[3]), .failures(f[3]), .n_clean(nc[3]), .n_corrected(nk[3]),
    .n_uncorrectable(nu[3]), .n_check_only(nx[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int taps(input poly_t g);
    int t = 0;
    for (int i = 0; i < poly_degree(g); i++) t += int'(g[i]);
    return t;
  endfunction

  initial begin
    check(N0 == 42  && K0 == 33,  $sformatf("(42,33) gave (%0d,%0d)", N0, K0));
    check(N1 == 155 && K1 == 145, $sformatf("(155,145) gave (%0d,%0d)", N1, K1));
    check(N2 == 105 && K2 == 94,  $sformatf("(105,94) gave (%0d,%0d)", N2, K2));
    check(N3 == 120 && K3 == 108, $sformatf("(120,108) gave (%0d,%0d)", N3, K3));
    check(fire_length(P3, 7) == 7, "c = 7 with e = 7 must give length 7");
    check(taps(fire_generator(P4, 7)) == 5, "feedback taps with X^4+X+1");
    check(taps(fire_generator(P4N, 7)) == 9, "feedback taps with X^4+X^3+X^2+X+1");
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    for (int i = 0; i < 4; i++) begin
      $display("code %0d: clean %0d corrected %0d uncorrectable %0d check-only bursts %0d",
               i, nc[i], nk[i], nu[i], nx[i]);
      checks += c[i] + 3;
      failures += f[i];
      if (nc[i] == 0) failures++;
      if (nk[i] == 0) failures++;
      if (nu[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
