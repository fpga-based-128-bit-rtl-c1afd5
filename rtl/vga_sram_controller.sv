// vga_sram_controller: the VGA / SRAM peripheral on the processor bus.
//
// Combines vga_raster and sram_arbiter, divides the 50 MHz system clock by
// two for the 25 MHz pixel rate (a toggle register used as clock enable and
// sent out as VGA_CLK), and decodes the processor's 16-bit Avalon-MM slave
// port (21-bit word address, registered readdata, one cycle latency):
//   address[20] = 1, read : bit 0 = `safe`, the beam is outside the image
//                           and the SRAM may be written
//   address[19] = 1, write: bit 0 = go; 1 gives the SRAM to the VGA (reset
//                           value), 0 gives it to the processor
//   otherwise            : SRAM word address[17:0], read or write with
//                           byte enables (only effective while go = 0)
//
// From the document's program listing: the go/no-go word (bit 19) and the
// busy read (bit 20). My own choices: the 16-bit slave width and go = 1 after
// reset. Lint reports address bit 18 as unused; it selects nothing in this
// map, so the SRAM and the go flag are not decoded on it.
module vga_sram_controller (
  input  logic        clk,
  input  logic        reset,
  // processor bus
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [20:0] address,
  input  logic [15:0] writedata,
  input  logic [1:0]  byteenable,
  output logic [15:0] readdata,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // SRAM
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

  logic        clk25, go, safe;
  logic [17:0] vga_addr;
  logic [15:0] vga_data, cpu_rdata;
  logic        sram_sel;

  always_ff @(posedge clk) begin
    if (reset) clk25 <= 1'b0;
    else       clk25 <= !clk25;
  end
  always_comb vga_clk = clk25;

  always_comb sram_sel = chipselect && !address[19] && !address[20];

  always_ff @(posedge clk) begin
    if (reset) begin
      go       <= 1'b1;
      readdata <= '0;
    end else begin
      if (chipselect && write && address[19]) go <= writedata[0];
      if (chipselect && read)
        readdata <= address[20] ? {15'b0, safe} : cpu_rdata;
    end
  end

  vga_raster u_raster (
    .clk, .reset, .pix_en(clk25), .sram_addr(vga_addr), .sram_data(vga_data),
    .safe, .vga_hs_n, .vga_vs_n, .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b
  );

  sram_arbiter u_arb (
    .clk, .reset, .go,
    .cpu_cs(sram_sel), .cpu_read(read), .cpu_write(write), .cpu_addr(address[17:0]),
    .cpu_wdata(writedata), .cpu_be(byteenable), .cpu_rdata,
    .vga_addr, .vga_data,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ub_n, .sram_lb_n, .sram_we_n, .sram_ce_n, .sram_oe_n
  );

endmodule
