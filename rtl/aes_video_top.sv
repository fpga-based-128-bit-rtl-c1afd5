// aes_video_top: the hardware side of the encrypted-video player. It puts the
// three processor peripherals of the system on one processor bus: the AES
// decryption core, the SD card reader and the VGA / SRAM frame-buffer
// controller.
//
// The processor (outside this module) reads an encrypted file block by block
// from the SD card, passes it 128 bits at a time through the AES core, and
// stores the plaintext image in the SRAM, from which the VGA raster shows
// it. All data moves through the processor; the peripherals never talk to
// each other directly.
//
// Processor bus: one Avalon-MM style slave port with a 23-bit word address,
// 32-bit write and read data and registered read data (one clock of read
// latency, the same for every region). Address bits [22:21] pick the
// peripheral:
//   00  VGA / SRAM controller, address[20:0], data in bits [15:0] with
//       byteenable[1:0] (see vga_sram_controller)
//   01  SD card reader, address[7:0] (see spi_sd_controller)
//   10  AES core, address[2:0] (see aes_avalon)
//   11  unused, reads return 0
// The document gives each peripheral its own slave on the system bus; the
// bus fabric that does the decoding there is not part of the design, so the
// decoding here, and the region numbers, are my own choice.
//
// Timing: every bus write takes one clock; a read returns its data on the
// clock after it is issued. aes_eoc mirrors the AES end-of-conversion flag.
//
// Outputs with no logic behind them: sram_dq_o is the bus write data passed
// straight through (it reaches the pins only while sram_dq_oe is high), and
// vga_sync_n is tied low because no sync is sent on green.
module aes_video_top (
  input  logic        clk,          // 50 MHz system clock
  input  logic        reset,        // synchronous, active high
  // processor bus
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [22:0] address,
  input  logic [31:0] writedata,
  input  logic [1:0]  byteenable,
  output logic [31:0] readdata,
  output logic        aes_eoc,
  // SD card (SPI mode)
  output logic        sd_cs_n,
  output logic        sd_mosi,
  input  logic        sd_miso,
  output logic        sd_sclk,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // SRAM (512 KB, 256K x 16)
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

  typedef enum logic [1:0] {R_VIDEO = 2'd0, R_SD = 2'd1, R_AES = 2'd2, R_NONE = 2'd3} region_e;

  region_e     region, region_q;
  logic [31:0] aes_rdata, sd_rdata;
  logic [15:0] video_rdata;

  assign region = region_e'(address[22:21]);

  aes_avalon u_aes (
    .clk, .reset,
    .chipselect (chipselect && region == R_AES),
    .read, .write,
    .address    (address[2:0]),
    .writedata,
    .readdata   (aes_rdata),
    .eoc        (aes_eoc)
  );

  spi_sd_controller u_sd (
    .clk, .reset,
    .chipselect (chipselect && region == R_SD),
    .read, .write,
    .address    (address[7:0]),
    .writedata,
    .readdata   (sd_rdata),
    .cs_n       (sd_cs_n),
    .mosi       (sd_mosi),
    .miso       (sd_miso),
    .sclk       (sd_sclk)
  );

  vga_sram_controller u_video (
    .clk, .reset,
    .chipselect (chipselect && region == R_VIDEO),
    .read, .write,
    .address    (address[20:0]),
    .writedata  (writedata[15:0]),
    .byteenable,
    .readdata   (video_rdata),
    .vga_clk, .vga_hs_n, .vga_vs_n, .vga_blank_n, .vga_sync_n,
    .vga_r, .vga_g, .vga_b,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ub_n, .sram_lb_n, .sram_we_n, .sram_ce_n, .sram_oe_n
  );

  // The slaves register their read data; remember which one was read so the
  // right one is returned on the next clock.
  always_ff @(posedge clk) begin
    if (reset)                      region_q <= R_NONE;
    else if (chipselect && read)    region_q <= region;
  end

  always_comb begin
    unique case (region_q)
      R_VIDEO: readdata = {16'h0000, video_rdata};
      R_SD:    readdata = sd_rdata;
      R_AES:   readdata = aes_rdata;
      default: readdata = '0;
    endcase
  end

endmodule
