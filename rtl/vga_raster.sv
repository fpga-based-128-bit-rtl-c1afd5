// vga_raster: 640x480 VGA timing generator that shows a 320x240, 8-bit
// grayscale image held in the 16-bit SRAM frame buffer.
//
// Runs on the system clock with a pixel-clock enable `pix_en` (every second
// clock, 25 MHz from 50 MHz). Horizontal line: sync 96, back porch 48, active
// 640, front porch 16 pixels (800); frame: sync 2, back porch 33, active 480,
// front porch 10 lines (525). The image rectangle is the top-left 320x240
// pixels of the screen, the rest of the screen is black.
//
// Frame-buffer addressing: each 16-bit SRAM word holds two horizontally
// adjacent pixels, the left one in the high byte. Pixel (x,y) is in word
//   y * IMG_W/2 + x/2 + HEADER_WORDS
// (HEADER_WORDS = 539 words skips the 1078-byte bitmap header stored ahead of
// the pixels); outside the rectangle the address is 0. The word is fetched at
// even x: its high byte is shown at once and its low byte is kept for the odd
// pixel that follows, so the SRAM is needed only every second pixel.
// sram_data is expected in the same clock as sram_addr (asynchronous SRAM).
//
// `safe` tells the processor that it may take the SRAM without disturbing the
// picture: the beam is below the image (or in vertical blanking), or to the
// right of it for the next SAFE_MARGIN pixels, which leaves time for a burst
// of writes before the beam returns to the rectangle.
//
// Outputs are registered (one pixel of latency): sync pulses active low,
// blank_n low outside the active 640x480 area, R=G=B = pixel value << 2.
//
// From the document: 640x480 screen, 320x240 grayscale image, two pixels per
// SRAM word, header skipped in the address, 25 MHz pixel rate from a
// divider. My own choices: the standard porch and sync widths, the image at
// the top-left corner, the pixel clock used as an enable, and SAFE_MARGIN.
module vga_raster #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33,
  parameter int unsigned IMG_W    = 320,
  parameter int unsigned IMG_H    = 240,
  parameter int unsigned HEADER_WORDS = 539,
  parameter int unsigned SAFE_MARGIN  = 256
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        pix_en,
  output logic [17:0] sram_addr,
  input  logic [15:0] sram_data,
  output logic        safe,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);

  localparam int unsigned H_TOTAL = H_SYNC + H_BACK + H_ACTIVE + H_FRONT;
  localparam int unsigned V_TOTAL = V_SYNC + V_BACK + V_ACTIVE + V_FRONT;

  logic [10:0] hcount, vcount;
  logic [10:0] x, y;          // position relative to the active area (wraps)
  logic        in_image, active;
  logic [7:0]  hold, pixel;

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (hcount == 11'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 11'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  always_comb begin
    x      = hcount - 11'(H_SYNC + H_BACK);
    y      = vcount - 11'(V_SYNC + V_BACK);
    active = (x < 11'(H_ACTIVE)) && (y < 11'(V_ACTIVE));
    in_image = (x < 11'(IMG_W)) && (y < 11'(IMG_H));
    sram_addr = in_image ? 18'(32'(y) * (IMG_W / 2) + 32'(x >> 1) + HEADER_WORDS) : '0;
    pixel  = x[0] ? hold : sram_data[15:8];
    safe   = (y >= 11'(IMG_H)) || ((x >= 11'(IMG_W)) && (x < 11'(IMG_W + SAFE_MARGIN)));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      hold        <= '0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs_n    <= 1'b1;
      vga_vs_n    <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_en) begin
      if (!x[0]) hold <= sram_data[7:0];
      vga_r       <= in_image ? {pixel, 2'b00} : '0;
      vga_g       <= in_image ? {pixel, 2'b00} : '0;
      vga_b       <= in_image ? {pixel, 2'b00} : '0;
      vga_hs_n    <= !(hcount < 11'(H_SYNC));
      vga_vs_n    <= !(vcount < 11'(V_SYNC));
      vga_blank_n <= active;
    end
  end

  always_comb vga_sync_n = 1'b0;

endmodule
