// tb_vga_sram_controller: the processor takes the SRAM (go = 0), writes an
// image with byte enables, reads words back, then hands the SRAM to the VGA
// (go = 1). One displayed frame is compared pixel by pixel with the image;
// the position is recovered from the blank and sync outputs only. The safe
// status must be seen both set and clear, and while the processor holds the
// SRAM the picture must repeat the last word read.
module tb_vga_sram_controller;
  logic clk = 0, reset, chipselect, read, write;
  logic [20:0] address;
  logic [15:0] writedata, readdata;
  logic [1:0] byteenable;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  int checks = 0, failures = 0, errs = 0;

  vga_sram_controller dut (.*);
  sram_model sram (.addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
                   .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n), .ce_n(sram_ce_n), .oe_n(sram_oe_n));
  always #10 clk = ~clk;

  function automatic logic [7:0] pix(int x, int y);
    return 8'(x * 7 + y * 3 + (x ^ y));
  endfunction
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (errs++ < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic bus_write(int a, logic [15:0] d, logic [1:0] be = 2'b11);
    @(negedge clk) chipselect = 1; write = 1; address = 21'(a); writedata = d; byteenable = be;
    @(negedge clk) chipselect = 0; write = 0;
  endtask
  task automatic bus_read(int a, output logic [15:0] d);
    @(negedge clk) chipselect = 1; read = 1; address = 21'(a); byteenable = 2'b11;
    @(negedge clk) chipselect = 0; read = 0; d = readdata;
  endtask

  // Pixel sampler: position from blank/sync only.
  int line = -1, px = 0, frame_pixels = 0, frame_bad = 0;
  bit checking = 0, prev_blank = 0, prev_vs = 1, held_mode = 0;
  logic [7:0] held_vals [$];
  logic [7:0] a, b;
  bit ok;
  always @(posedge clk) if (vga_clk) begin
    #1;
    if (prev_vs && !vga_vs_n) line = -1;
    if (vga_blank_n && !prev_blank) begin line++; px = 0; end
    if (vga_blank_n) begin
      if (checking && line < 240 && px < 320) begin
        frame_pixels++;
        if (vga_r != {pix(px, line), 2'b00}) frame_bad++;
      end
      if (held_mode && line < 240 && px < 320) held_vals.push_back(vga_r[9:2]);
      px++;
    end
    prev_blank = vga_blank_n; prev_vs = vga_vs_n;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d;
    bit seen_safe = 0, seen_busy = 0;
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0; byteenable = 0;
    repeat (3) @(negedge clk); reset = 0;
    bus_write(1 << 19, 0);                      // processor takes the SRAM
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x += 2) begin
        // High byte and low byte in separate byte-lane writes for one pixel pair per line.
        if (x == 8) begin
          bus_write(y * 160 + x / 2 + 539, {pix(x, y), 8'h00}, 2'b10);
          bus_write(y * 160 + x / 2 + 539, {8'h00, pix(x + 1, y)}, 2'b01);
        end else
          bus_write(y * 160 + x / 2 + 539, {pix(x, y), pix(x + 1, y)});
      end
    for (int i = 0; i < 50; i++) begin
      int x = 2 * $urandom_range(0, 159), y = $urandom_range(0, 239);
      bus_read(y * 160 + x / 2 + 539, d);
      chk(d == {pix(x, y), pix(x + 1, y)}, "SRAM read-back");
    end
    bus_write(1 << 19, 1);                      // give it to the VGA
    @(negedge vga_vs_n); @(posedge vga_vs_n);
    checking = 1;
    for (int i = 0; i < 525 * 800 * 2 / 50; i++) begin
      bus_read(1 << 20, d);
      if (d[0]) seen_safe = 1; else seen_busy = 1;
      repeat (48) @(negedge clk);
    end
    @(negedge vga_vs_n);
    checking = 0;
    chk(frame_pixels > 0 && frame_pixels % (320 * 240) == 0, $sformatf("%0d image pixels shown", frame_pixels));
    chk(frame_bad == 0, $sformatf("%0d wrong pixels", frame_bad));
    chk(seen_safe && seen_busy, "safe status toggles");
    // Cut the VGA off in the middle of the image for one line.
    @(posedge vga_vs_n); repeat (800 * 2 * 100) @(negedge clk);
    bus_write(1 << 19, 0);
    repeat (2) @(negedge clk);
    held_mode = 1;
    repeat (800 * 2) @(negedge clk);
    held_mode = 0;
    bus_write(1 << 19, 1);
    chk(held_vals.size() >= 300, "pixels shown while cut off");
    begin
      a = held_vals[4];
      b = held_vals[5];
      ok = 1;
      foreach (held_vals[i]) if (i >= 4 && held_vals[i] != a && held_vals[i] != b) ok = 0;
      chk(ok, "held word repeated while the processor owns the SRAM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
