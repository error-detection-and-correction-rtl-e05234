// tb_buffer_storage: writes DEPTH random bits into the default 265-bit
// buffer, with idle clocks mixed in, reads them back and checks they leave
// in arrival order, one per read, for several blocks.
module tb_buffer_storage;
  localparam int DEPTH = 265;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, wr = 0, din = 0, rd = 0, dout;
  bit   ref_q[$];

  buffer_storage dut (.clk, .wr, .din, .rd, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2) @(posedge clk);
    for (int blk = 0; blk < 6; blk++) begin
      ref_q.delete();
      for (int i = 0; i < DEPTH; i++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk); wr = 0; rd = 0;
        end
        @(negedge clk);
        wr = 1; rd = 0; din = 1'($urandom);
        ref_q.push_back(din);
      end
      @(negedge clk); wr = 0;
      repeat ($urandom_range(4)) @(negedge clk);
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        rd = 1;
        #1;
        checks++;
        if (dout !== ref_q[i]) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d bit %0d got %0b exp %0b", blk, i, dout, ref_q[i]);
        end
      end
      @(negedge clk); rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
