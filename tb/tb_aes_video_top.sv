// tb_aes_video_top: end-to-end test of the encrypted-video player at full
// size, with the top module at its default parameters.
//
// The testbench plays the processor's program. The card model holds an
// encrypted stream of 320x240 grayscale frames (1078-byte bitmap header plus
// 76800 pixel bytes, padded to 77888 bytes = 4868 AES blocks per frame),
// encrypted here with an independent AES-128 model. The program:
//   1. writes the key and waits for the key expansion (eoc),
//   2. waits for the card power-up, then reads 153 blocks of 512 bytes:
//      152 whole blocks and 64 bytes of the 153rd make frame 0; the other
//      448 bytes of that block are the start of frame 1 and are kept (spill),
//   3. decrypts every 16 bytes: the four buffer words go straight in as the
//      rows of the state (the file is stored in that row order), polling
//      `safe` before every second one; waits for eoc, reads the 4 rows and
//      checks the plaintext,
//   4. stores each plaintext row as two SRAM words, high half first,
//      between taking the SRAM (go = 0) and giving it back (go = 1),
//   5. lets the VGA show a whole frame and compares every image pixel,
//   6. reads past the end of the card and expects the error flag.
// Each mechanism is counted and must have happened at least once; cycle
// counts are checked for the AES latency (eoc 12 clocks after the last
// write), the SD read (one bit per two clocks) and the 16-clock gap before
// each block read.
module tb_aes_video_top;
  import aes_ref_pkg::*;

  localparam int unsigned FRAME_BYTES  = 77888;
  localparam int unsigned HEADER_BYTES = 1078;
  localparam int unsigned BLOCKS       = 153;
  localparam int unsigned CARD_BYTES   = BLOCKS * 512;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  localparam int A_VIDEO = 0, A_SD = 1 << 21, A_AES = 2 << 21;

  logic clk = 0, reset, chipselect, read, write;
  logic [22:0] address;
  logic [31:0] writedata, readdata;
  logic [1:0]  byteenable;
  logic aes_eoc, sd_cs_n, sd_mosi, sd_miso, sd_sclk;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  int checks = 0, failures = 0, errs = 0;

  aes_video_top dut (.*);
  sd_card_model #(.MEM_BYTES(CARD_BYTES), .CMD0_IGNORE(1), .CMD1_BUSY(3)) card (
    .cs_n(sd_cs_n), .sclk(sd_sclk), .mosi(sd_mosi), .miso(sd_miso));
  sram_model sram (.addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
                   .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n), .ce_n(sram_ce_n), .oe_n(sram_oe_n));

  always #10 clk = ~clk;   // 50 MHz

  // Plain stream: frame 0 and the first 448 bytes of frame 1.
  logic [7:0] plain_stream [CARD_BYTES];
  logic [7:0] file_bytes [FRAME_BYTES + 512];   // what the program collected from the card

  // Mechanism counters.
  int n_key = 0, n_dec = 0, n_eoc_key = 0, n_eoc_dec = 0, n_blocks = 0, n_spill = 0;
  int n_safe_wait = 0, n_safe_ok = 0, n_go = 0, n_sram_writes = 0, n_unsafe_writes = 0;
  int n_err = 0, n_pixels = 0, n_bad_pixels = 0, n_plain_bad = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (errs++ < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic bus_write(int a, logic [31:0] d, logic [1:0] be = 2'b11);
    @(negedge clk) chipselect = 1; write = 1; address = 23'(a); writedata = d; byteenable = be;
    @(negedge clk) chipselect = 0; write = 0;
  endtask
  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk) chipselect = 1; read = 1; address = 23'(a); byteenable = 2'b11;
    @(negedge clk) chipselect = 0; read = 0; d = readdata;
  endtask

  // Four row writes; returns the clocks from the last write to eoc.
  task automatic aes_load(logic [127:0] rows, bit cipher, output int cycles);
    for (int r = 0; r < 4; r++) bus_write(A_AES + (cipher ? 4 : 0) + r, rows[127 - 32*r -: 32]);
    cycles = 1;
    while (!aes_eoc && cycles < 100) begin @(negedge clk); cycles++; end
  endtask

  task automatic sd_wait(output int cycles, output logic err);
    logic [31:0] s;
    cycles = 0;
    do begin bus_read(A_SD + 16, s); cycles += 2; end while (!s[0] && cycles < 100000);
    err = s[1];
  endtask

  // Pixel sampler: beam position from blank and sync only.
  int line = -1, px = 0;
  bit checking = 0, prev_blank = 0, prev_vs = 1;
  always @(posedge clk) if (vga_clk) begin
    #1;
    if (prev_vs && !vga_vs_n) line = -1;
    if (vga_blank_n && !prev_blank) begin line++; px = 0; end
    if (vga_blank_n) begin
      if (checking && line < 240 && px < 320) begin
        n_pixels++;
        if (vga_r != {plain_stream[HEADER_BYTES + line * 320 + px], 2'b00}) n_bad_pixels++;
      end
      px++;
    end
    prev_blank = vga_blank_n; prev_vs = vga_vs_n;
  end

  // The SRAM may only be written while the beam is outside the image (a
  // burst started while `safe` is high ends before the beam is back).
  always @(posedge clk) if (!sram_we_n && !sram_ce_n) begin
    n_sram_writes++;
    if (vga_blank_n && line >= 0 && line < 240 && px < 320) n_unsafe_writes++;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    $display("watchdog");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    logic [127:0] ct, pt;
    bit to_sram;
    int cycles, words;
    logic err;

    // Build the plain stream and the encrypted card image.
    for (int i = 0; i < CARD_BYTES; i++) plain_stream[i] = 8'($urandom);
    plain_stream[0] = 8'h42; plain_stream[1] = 8'h4d;   // "BM"
    for (int b = 0; b < CARD_BYTES / 16; b++) begin
      // The file holds each block in row order, bytes 0..3 = row 0.
      for (int k = 0; k < 16; k++) pt[127 - 8*k -: 8] = plain_stream[16*b + k];
      ct = to_rows(encrypt(KEY, from_rows(pt)));
      for (int k = 0; k < 16; k++) card.mem[16*b + k] = ct[127 - 8*k -: 8];
    end

    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0; byteenable = 0;
    repeat (3) @(negedge clk); reset = 0;

    // 1. Key.
    aes_load(to_rows(KEY), 0, cycles);
    n_key++;
    if (aes_eoc) n_eoc_key++;
    chk(cycles == 12, $sformatf("key expansion done %0d clocks after the last write", cycles));

    // 2. Card reads: power-up first, then 153 blocks.
    sd_wait(cycles, err);
    chk(!err, "card power-up without error");
    chk(card.n_cmd[0] >= 2, "CMD0 repeated after the ignored first one");
    chk(card.n_cmd[1] == 4, "CMD1 repeated while the card is busy");
    chk(card.n_cmd[16] == 1 && card.block_len == 512, "CMD16 sets 512-byte blocks");
    chk(card.wake_clocks >= 74, $sformatf("%0d wake-up clocks", card.wake_clocks));
    for (int blk = 0; blk < BLOCKS; blk++) begin
      bus_write(A_SD + 2, blk * 512);
      bus_write(A_SD + 1, 1);           // start
      bus_write(A_SD + 1, 0);           // end of the request, ignored by the reader
      sd_wait(cycles, err);
      chk(!err, "block read without error");
      chk(cycles >= 512 * 8 * 2 && cycles <= 512 * 8 * 2 + 800,
          $sformatf("block read took %0d clocks", cycles));
      for (int k = 0; k < 512; k += 4) begin
        bus_write(A_SD + 64, k);
        bus_read(A_SD + 128, d);
        for (int j = 0; j < 4; j++) file_bytes[blk * 512 + k + j] = d[31 - 8*j -: 8];
      end
      n_blocks++;
    end
    chk(card.blocks_sent == BLOCKS, "every block read came from the card");
    chk(card.min_gap_cmd17 >= 16 && card.min_gap_cmd17 < 100, $sformatf("%0d idle clocks before CMD17", card.min_gap_cmd17));
    chk(card.n_bad_frame == 0, "well-formed command frames");

    // 3./4. Decrypt frame 0 and the spilled start of frame 1; frame 0 goes to
    // the SRAM. As in the player's program: each buffer word goes straight
    // into the core as a row, `safe` is polled before every second word, and
    // each plaintext row is stored as two SRAM words (high half first)
    // between a go = 0 and a go = 1 write.
    for (int b = 0; b < CARD_BYTES / 16; b++) begin
      to_sram = (16*b < FRAME_BYTES);
      repeat ($urandom_range(0, 40)) @(negedge clk);   // program time varies
      for (int r = 0; r < 4; r++) begin
        if (to_sram && r % 2 == 0) begin
          bus_read(A_VIDEO + (1 << 20), d);
          while (!d[0]) begin n_safe_wait++; bus_read(A_VIDEO + (1 << 20), d); end
          n_safe_ok++;
        end
        for (int j = 0; j < 4; j++) d[31 - 8*j -: 8] = file_bytes[16*b + 4*r + j];
        bus_write(A_AES + 4 + r, d);
      end
      cycles = 1;
      while (!aes_eoc && cycles < 100) begin @(negedge clk); cycles++; end
      chk(cycles == 12, $sformatf("decryption done %0d clocks after the last write", cycles));
      n_dec++;
      if (aes_eoc) n_eoc_dec++;
      for (int r = 0; r < 4; r++) begin
        bus_read(A_AES + 4 + r, d);
        for (int j = 0; j < 4; j++)
          if (d[31 - 8*j -: 8] != plain_stream[16*b + 4*r + j]) n_plain_bad++;
        if (!to_sram) continue;
        bus_write(A_VIDEO + (1 << 19), 0);
        bus_write(A_VIDEO + 8*b + 2*r,     {16'h0, d[31:16]});
        bus_write(A_VIDEO + 8*b + 2*r + 1, {16'h0, d[15:0]});
        bus_write(A_VIDEO + (1 << 19), 1);
        n_go += 2;
      end
      if (!to_sram) n_spill++;
    end
    chk(n_plain_bad == 0, $sformatf("%0d wrong plaintext bytes", n_plain_bad));
    chk(n_unsafe_writes == 0, $sformatf("%0d SRAM writes while the beam was in the image", n_unsafe_writes));
    words = 0;
    for (int i = 0; i < FRAME_BYTES / 2; i++)
      if (sram.mem[i] != {plain_stream[2*i], plain_stream[2*i + 1]}) words++;
    chk(words == 0, $sformatf("%0d wrong SRAM words", words));

    // 5. One whole frame on the screen.
    @(negedge vga_vs_n); @(posedge vga_vs_n);
    checking = 1;
    @(negedge vga_vs_n);
    checking = 0;
    chk(n_pixels == 320 * 240, $sformatf("%0d image pixels shown", n_pixels));
    chk(n_bad_pixels == 0, $sformatf("%0d wrong pixels", n_bad_pixels));

    // 6. Read past the end of the card.
    bus_write(A_SD + 2, CARD_BYTES);
    bus_write(A_SD + 1, 1);
    sd_wait(cycles, err);
    if (err) n_err++;
    chk(err && card.error_tokens == 1, "read past the end of the card reports an error");

    $display("mechanisms: key=%0d eoc_key=%0d decrypt=%0d eoc_dec=%0d cmd0=%0d cmd1=%0d blocks=%0d spill=%0d",
             n_key, n_eoc_key, n_dec, n_eoc_dec, card.n_cmd[0], card.n_cmd[1], n_blocks, n_spill);
    $display("mechanisms: gap=%0d safe_wait=%0d safe_ok=%0d go=%0d sram_writes=%0d pixels=%0d err=%0d",
             card.min_gap_cmd17, n_safe_wait, n_safe_ok, n_go, n_sram_writes, n_pixels, n_err);
    chk(n_key >= 1 && n_eoc_key >= 1, "key expansion happened");
    chk(n_dec == CARD_BYTES / 16 && n_eoc_dec == n_dec, "every decryption ended with eoc");
    chk(n_blocks == BLOCKS, "all blocks read");
    chk(n_spill == 28, "spilled bytes of the next frame decrypted");
    chk(n_safe_wait >= 1 && n_safe_ok == FRAME_BYTES / 8, "safe polling both waited and passed");
    chk(n_go == FRAME_BYTES / 2 && n_sram_writes == FRAME_BYTES / 2, "go switched around every SRAM burst");
    chk(n_err >= 1, "error flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
