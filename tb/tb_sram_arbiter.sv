// tb_sram_arbiter: with go = 1 the SRAM pins must carry the VGA's read and
// the VGA sees the SRAM data; with go = 0 the processor's access reaches the
// pins (enables, byte lanes, write data) and the VGA keeps the last word it
// read before the switch.
module tb_sram_arbiter;
  logic clk = 0, reset, go, cpu_cs, cpu_read, cpu_write;
  logic [17:0] cpu_addr, vga_addr, sram_addr;
  logic [15:0] cpu_wdata, cpu_rdata, vga_data, sram_dq_o, sram_dq_i;
  logic [1:0]  cpu_be;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  int checks = 0, failures = 0;
  sram_arbiter dut (.*);
  always #10 clk = ~clk;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] last;
    reset = 1; go = 1; cpu_cs = 0; cpu_read = 0; cpu_write = 0;
    cpu_addr = 0; vga_addr = 0; cpu_wdata = 0; cpu_be = 0; sram_dq_i = 0;
    @(negedge clk) reset = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      go = (i / 20) % 2 == 0;
      cpu_cs = 1'($urandom); cpu_read = 1'($urandom); cpu_write = !cpu_read && 1'($urandom);
      cpu_addr = 18'($urandom); vga_addr = 18'($urandom); cpu_wdata = 16'($urandom);
      cpu_be = 2'($urandom); sram_dq_i = 16'($urandom);
      #1;
      if (go) begin
        chk(sram_addr == vga_addr && !sram_ce_n && !sram_oe_n && sram_we_n && !sram_ub_n && !sram_lb_n && !sram_dq_oe,
            "VGA owns the SRAM");
        chk(vga_data == sram_dq_i, "VGA sees SRAM data");
        last = sram_dq_i;
      end else begin
        chk(sram_addr == cpu_addr, "processor address");
        chk(sram_ce_n == !cpu_cs && sram_we_n == !(cpu_cs && cpu_write) && sram_oe_n == !(cpu_cs && cpu_read),
            "processor strobes");
        chk(sram_ub_n == !cpu_be[1] && sram_lb_n == !cpu_be[0], "byte lanes");
        chk(sram_dq_oe == (cpu_cs && cpu_write) && sram_dq_o == cpu_wdata, "write data");
        chk(cpu_rdata == sram_dq_i, "read data");
        chk(vga_data == last, "VGA holds its last word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
