// tb_fire_encoder: encodes random information blocks with the default
// (279,265) encoder and with (35,27) and (7,4) encoders, symbol enables
// with random gaps, and checks every transmitted block against long
// division: the information bits pass unchanged, the check bits equal
// X^R q(X) mod g(X), and the block is exactly N enabled symbols long with
// information requested for the first K of them.
module tb_fire_encoder;
  import fire_ref_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [2:0] en = '0, info = '0;
  logic [2:0] req, code, sop, eop;

  fire_encoder dut0 (.clk, .rst_n, .sym_en(en[0]), .info_in(info[0]),
                     .info_req(req[0]), .code_out(code[0]), .code_sop(sop[0]), .code_eop(eop[0]));
  fire_encoder #(.G(64'h16B), .K(27)) dut1 (.clk, .rst_n, .sym_en(en[1]), .info_in(info[1]),
                     .info_req(req[1]), .code_out(code[1]), .code_sop(sop[1]), .code_eop(eop[1]));
  fire_encoder #(.G(64'hB), .K(4)) dut2 (.clk, .rst_n, .sym_en(en[2]), .info_in(info[2]),
                     .info_req(req[2]), .code_out(code[2]), .code_sop(sop[2]), .code_eop(eop[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int l, input int n, input int k, input gpoly_t g, input int blocks);
    for (int b = 0; b < blocks; b++) begin
      vec_t infov = '0, got = '0, exp;
      for (int i = 0; i < k; i++) infov[i] = 1'($urandom);
      exp = encode(infov, k, g);
      for (int t = 0; t < n; t++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk); en[l] = 0; info[l] = 1'($urandom);
        end
        @(negedge clk);
        en[l] = 1;
        info[l] = (t < k) ? infov[k - 1 - t] : 1'($urandom);
        #1;
        got[n - 1 - t] = code[l];
        check(req[l] == (t < k), $sformatf("link %0d info_req at %0d", l, t));
        check(sop[l] == (t == 0), $sformatf("link %0d sop at %0d", l, t));
        check(eop[l] == (t == n - 1), $sformatf("link %0d eop at %0d", l, t));
      end
      @(negedge clk); en[l] = 0;
      check(got == exp, $sformatf("link %0d block %0d code word", l, b));
      check(rem(got, n, g) == 0, $sformatf("link %0d block %0d divisible", l, b));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      run(0, 279, 265, 64'h4A25, 20);
      run(1, 35, 27, 64'h16B, 50);
      run(2, 7, 4, 64'hB, 50);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
