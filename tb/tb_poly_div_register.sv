// tb_poly_div_register: checks the division register against long division.
//
// Three registers are fed the same random bit sequences, highest order
// first: the default (279,265) register (expected X^14 f(X) mod g(X)), the
// (35,27) register (X^8 f(X) mod g(X)) and the same register with the
// (23,15) shortening pre-multiplier as input taps (X^20 f(X) mod g(X)).
// Then, with Gate 1 closed, the contents must shift out unchanged with zeros
// behind, and clear must empty the register.
module tb_poly_div_register;
  import fire_ref_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  localparam gpoly_t G14 = 64'h4A25;  // X^14+X^11+X^9+X^5+X^2+1
  localparam gpoly_t G8  = 64'h16B;   // X^8+X^6+X^5+X^3+X+1

  logic clk = 0, rst_n = 0, clear = 0, shift = 0, gate = 1, din = 0;
  logic [13:0] s14; logic m14;
  logic [7:0]  s8;  logic m8;
  logic [7:0]  s8s; logic m8s;

  poly_div_register dut14 (.clk, .rst_n, .clear, .shift, .gate, .din, .state(s14), .msb(m14));
  poly_div_register #(.R(8), .FB_TAPS(8'h6B)) dut8
    (.clk, .rst_n, .clear, .shift, .gate, .din, .state(s8), .msb(m8));
  poly_div_register #(.R(8), .FB_TAPS(8'h6B), .IN_TAPS(8'hE6)) dut8s
    (.clk, .rst_n, .clear, .shift, .gate, .din, .state(s8s), .msb(m8s));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic vec_t       f = '0;
      automatic int         len = $urandom_range(1, 300);
      automatic logic [13:0] before14;
      automatic logic [7:0]  before8;
      // clear
      @(negedge clk); clear = 1; shift = 1; din = 1; gate = 1;
      @(negedge clk); clear = 0; shift = 0;
      check(64'(s14), 0, "clear14");
      check(64'(s8s), 0, "clear8s");
      for (int i = len - 1; i >= 0; i--) begin
        f[i] = 1'($urandom);
        while ($urandom_range(4) == 0) begin
          shift = 0; din = 1'($urandom);
          @(negedge clk);
        end
        shift = 1; din = f[i];
        @(negedge clk);
      end
      shift = 0; din = 0;
      check(64'(s14), rem(f << 14, len + 14, G14), "divide14");
      check(64'(s8),  rem(f << 8,  len + 8,  G8),  "divide8");
      check(64'(s8s), rem(f << 20, len + 20, G8),  "premult8");
      check(64'(m14), 64'(s14[13]), "msb14");
      // Gate 1 closed: plain shift
      before14 = s14; before8 = s8;
      gate = 0; shift = 1;
      @(negedge clk);
      check(64'(s14), 64'({before14[12:0], 1'b0}), "gated14");
      check(64'(s8),  64'({before8[6:0], 1'b0}), "gated8");
      gate = 1; shift = 0;
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
