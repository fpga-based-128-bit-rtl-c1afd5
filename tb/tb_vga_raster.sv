// tb_vga_raster: runs the raster for one full frame plus a little, with a
// frame buffer whose word at address a is a fixed function of a. An
// independent position counter checks every pixel clock: the SRAM address
// inside the image, the safe flag, the displayed gray value (high byte for
// even x, low byte for odd x), black outside the image, the sync pulse widths
// and the line and frame lengths.
module tb_vga_raster;
  logic clk = 0, reset, pix_en;
  logic [17:0] sram_addr;
  logic [15:0] sram_data;
  logic safe, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0, errs = 0;
  vga_raster dut (.*);
  always #10 clk = ~clk;

  function automatic logic [15:0] word_at(logic [17:0] a);
    return {a[7:0] ^ 8'h5a, a[15:8] + a[7:0]};
  endfunction
  always_comb sram_data = word_at(sram_addr);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (errs++ < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int h = 0, v = 0, ph, pv;
  bit pending = 0;
  int hs_len = 0, vs_lines = 0, frames = 0, lines = 0, image_pixels = 0, safe_pixels = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int x, y;
  bit img, s;
  logic [15:0] w;
  logic [7:0] e;

  initial begin
    reset = 1; pix_en = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (2 * 800 * 530) begin
      @(negedge clk);
      if (pending) begin
        x = ph - 144; y = pv - 35;
        img = x >= 0 && x < 320 && y >= 0 && y < 240;
        w = word_at(18'(y * 160 + x / 2 + 539));
        e = img ? ((x % 2) ? w[7:0] : w[15:8]) : 8'h00;
        chk(vga_r == {e, 2'b00} && vga_g == vga_r && vga_b == vga_r, $sformatf("pixel (%0d,%0d)", x, y));
        chk(vga_hs_n == !(ph < 96), "hsync");
        chk(vga_vs_n == !(pv < 2), "vsync");
        chk(vga_blank_n == (x >= 0 && x < 640 && y >= 0 && y < 480), "blank");
        if (img) image_pixels++;
        pending = 0;
      end
      pix_en = !pix_en;
      if (pix_en) begin
        x = h - 144; y = v - 35;
        img = x >= 0 && x < 320 && y >= 0 && y < 240;
        s = (y >= 240 || y < 0) || (x >= 320 && x < 576);
        chk(sram_addr == (img ? 18'(y * 160 + x / 2 + 539) : 18'd0), "sram address");
        chk(safe == s, $sformatf("safe at (%0d,%0d)", x, y));
        if (s) safe_pixels++;
        ph = h; pv = v; pending = 1;
        h++;
        if (h == 800) begin h = 0; v++; lines++; end
        if (v == 525) begin v = 0; frames++; end
      end
    end
    chk(frames == 1 && image_pixels == 320 * 240, $sformatf("frame of %0d image pixels", image_pixels));
    chk(safe_pixels > 0, "safe window seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
