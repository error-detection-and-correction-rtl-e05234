// tb_burst_trap_test: exhaustive check of the TEST zero detector for the
// three register/burst sizes used in the design: (R,B) = (14,5), (8,3), (3,1).
module tb_burst_trap_test;
  int checks = 0, failures = 0;

  logic [13:0] s14; logic lz14, nz14;
  logic [7:0]  s8;  logic lz8,  nz8;
  logic [2:0]  s3;  logic lz3,  nz3;

  burst_trap_test                dut14 (.state(s14), .lead_zero(lz14), .nonzero(nz14));
  burst_trap_test #(.R(8), .B(3)) dut8 (.state(s8),  .lead_zero(lz8),  .nonzero(nz8));
  burst_trap_test #(.R(3), .B(1)) dut3 (.state(s3),  .lead_zero(lz3),  .nonzero(nz3));

  task automatic expect_eq(input bit got, input bit exp, input string what, input int v);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s state=%0h got %0b exp %0b", what, v, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      s14 = 14'(v); s8 = 8'(v); s3 = 3'(v);
      #1;
      expect_eq(lz14, (v % (1 << 9)) == 0, "lz14", v);
      expect_eq(nz14, v != 0, "nz14", v);
      if (v < 256) begin
        expect_eq(lz8, (v % (1 << 5)) == 0, "lz8", v);
        expect_eq(nz8, v != 0, "nz8", v);
      end
      if (v < 8) begin
        expect_eq(lz3, (v % 4) == 0, "lz3", v);
        expect_eq(nz3, v != 0, "nz3", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
