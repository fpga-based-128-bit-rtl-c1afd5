// sram_arbiter: shares the single-port external SRAM between the VGA raster
// and the processor.
//
// Toggling the SRAM between the two users every clock is avoided: a `go` flag
// set by the processor decides who owns it. With go = 1 the VGA reads (its
// address on the pins, chip and output enables on, both bytes); with go = 0
// the processor's bus signals drive the SRAM directly (write data on the
// pins only while it writes). While cut off, the VGA keeps receiving the last
// word it did read, a register that follows the SRAM data whenever go = 1,
// so the screen shows a held pixel value instead of garbage.
//
// The SRAM data pins are split into dq_o / dq_oe / dq_i; a pad ring or the
// top level joins them into the bidirectional bus.
//
// From the document: the processor cuts the VGA off the SRAM while it writes,
// and the VGA holds the last value it read. My own choice: a register holds
// that word; the original relied on the bus floating.
module sram_arbiter (
  input  logic        clk,
  input  logic        reset,
  input  logic        go,
  // processor side
  input  logic        cpu_cs,
  input  logic        cpu_read,
  input  logic        cpu_write,
  input  logic [17:0] cpu_addr,
  input  logic [15:0] cpu_wdata,
  input  logic [1:0]  cpu_be,
  output logic [15:0] cpu_rdata,
  // VGA side
  input  logic [17:0] vga_addr,
  output logic [15:0] vga_data,
  // SRAM pins
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_we_n,
  output logic        sram_ce_n,
  output logic        sram_oe_n
);

  logic [15:0] last_vga;

  always_ff @(posedge clk) begin
    if (reset)   last_vga <= '0;
    else if (go) last_vga <= sram_dq_i;
  end

  always_comb begin
    if (go) begin
      sram_addr  = vga_addr;
      sram_ub_n  = 1'b0;
      sram_lb_n  = 1'b0;
      sram_we_n  = 1'b1;
      sram_ce_n  = 1'b0;
      sram_oe_n  = 1'b0;
      sram_dq_oe = 1'b0;
    end else begin
      sram_addr  = cpu_addr;
      sram_ub_n  = !cpu_be[1];
      sram_lb_n  = !cpu_be[0];
      sram_we_n  = !(cpu_cs && cpu_write);
      sram_ce_n  = !cpu_cs;
      sram_oe_n  = !(cpu_cs && cpu_read);
      sram_dq_oe = cpu_cs && cpu_write;
    end
    sram_dq_o = cpu_wdata;
    cpu_rdata = sram_dq_i;
    vga_data  = go ? sram_dq_i : last_vga;
  end

endmodule
