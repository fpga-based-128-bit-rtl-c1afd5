// tb_write_controller: after reset the address is 10; each write step moves
// it down by one to 0; rewind returns it to 10.
module tb_write_controller;
  logic clk = 0, reset, we, rewind;
  logic [3:0] waddr;
  int checks = 0, failures = 0;
  write_controller dut (.clk, .reset, .we, .rewind, .waddr);
  always #5 clk = ~clk;
  task automatic expect_addr(int e);
    checks++;
    if (waddr !== 4'(e)) begin failures++; $display("FAIL addr %0d exp %0d", waddr, e); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    reset = 1; we = 0; rewind = 0;
    @(negedge clk) reset = 0;
    for (int pass = 0; pass < 3; pass++) begin
      expect_addr(10);
      for (int i = 10; i >= 0; i--) begin
        expect_addr(i);
        we = 1;
        @(negedge clk);
        // Idle cycles must hold the address.
        we = 0;
        if (i == 5) begin expect_addr(4); @(negedge clk); expect_addr(4); end
      end
      rewind = 1; @(negedge clk); rewind = 0;
      expect_addr(10);
    end
    // Rewind in the middle of an expansion.
    we = 1; repeat (3) @(negedge clk); we = 0; expect_addr(7);
    rewind = 1; @(negedge clk); rewind = 0; expect_addr(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
