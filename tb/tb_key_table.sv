// tb_key_table: fills all 11 entries with random keys, then reads them back
// through the asynchronous port in random order; checks that a write only
// lands at its own address and that reads need no clock.
module tb_key_table;
  logic clk = 0, we;
  logic [3:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [11];
  int checks = 0, failures = 0;
  key_table dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 11; a++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a); wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int i = 0; i < 40; i++) begin
        raddr = 4'($urandom_range(0, 10));
        #1 checks++;
        if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      end
      // Write one entry with we low: nothing must change.
      @(negedge clk) we = 0; waddr = 4'd3; wdata = ~model[3];
      @(negedge clk) raddr = 4'd3;
      #1 checks++;
      if (rdata !== model[3]) begin failures++; $display("FAIL write without we"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
