// tb_spi_sd_controller: runs the SPI reader against the behavioural card.
// Checks the power-up sequence (wake-up clocks, CMD0 retried after a missing
// answer, CMD1 repeated while the card is busy, CMD16 with 512), then several
// block reads at different card addresses, comparing every buffer word read
// over the bus with the card contents; the gap of idle clocks before each
// CMD17; the read time (one bit per two clocks); and the data error token.
module tb_spi_sd_controller;
  localparam int unsigned MEM = 8192;
  logic clk = 0, reset, chipselect, read, write;
  logic [7:0] address;
  logic [31:0] writedata, readdata;
  logic cs_n, mosi, miso, sclk;
  int checks = 0, failures = 0;

  spi_sd_controller dut (.*);
  sd_card_model #(.MEM_BYTES(MEM), .CMD0_IGNORE(1), .CMD1_BUSY(3)) card (.cs_n, .sclk, .mosi, .miso);

  always #10 clk = ~clk;   // 50 MHz
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk) chipselect = 1; write = 1; address = 8'(a); writedata = d;
    @(negedge clk) chipselect = 0; write = 0;
  endtask
  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk) chipselect = 1; read = 1; address = 8'(a);
    @(negedge clk) chipselect = 0; read = 0; d = readdata;
  endtask
  task automatic wait_eor(output int cycles, output logic err);
    logic [31:0] s;
    cycles = 0;
    do begin bus_read(16, s); cycles += 2; end while (!s[0]);
    err = s[1];
  endtask
  task automatic read_block(int unsigned addr);
    int cycles; logic err; logic [31:0] d, e;
    bus_write(2, addr);
    bus_write(1, 1);
    wait_eor(cycles, err);
    chk(!err, "no error on a valid read");
    chk(cycles >= 512*8*2 && cycles <= 512*8*2 + 800,
        $sformatf("block read of %0d clocks, expected one bit per two clocks", cycles));
    for (int k = 0; k < 512; k += 4) begin
      bus_write(64, k);
      bus_read(128, d);
      e = {card.mem[addr+k], card.mem[addr+k+1], card.mem[addr+k+2], card.mem[addr+k+3]};
      chk(d === e, $sformatf("addr %0d byte %0d: got %h exp %h", addr, k, d, e));
    end
  endtask

  initial begin
    int cycles; logic err;
    for (int i = 0; i < MEM; i++) card.mem[i] = 8'($urandom);
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    repeat (3) @(negedge clk); reset = 0;
    chk(cs_n, "nCS high during wake-up");
    wait_eor(cycles, err);
    chk(card.wake_clocks >= 74, $sformatf("%0d wake-up clocks", card.wake_clocks));
    chk(card.n_cmd[0] == 2, "CMD0 sent again after no answer");
    chk(card.n_cmd[1] == 4, "CMD1 repeated until ready");
    chk(card.n_cmd[16] == 1 && card.block_len == 512, "CMD16 sets 512-byte blocks");
    chk(card.n_bad_frame == 0, "well-formed command frames");
    read_block(0);
    read_block(512);
    read_block(4096 + 1024);
    read_block(100);
    read_block(MEM - 512);
    chk(card.n_cmd[17] == 5 && card.blocks_sent == 5, "five CMD17 reads");
    chk(card.min_gap_cmd17 >= 16 && card.min_gap_cmd17 < 100, $sformatf("%0d idle clocks between block reads", card.min_gap_cmd17));
    // Out of range: the card answers with a data error token.
    bus_write(2, MEM);
    bus_write(1, 1);
    wait_eor(cycles, err);
    chk(err && card.error_tokens == 1, "data error token reported");
    read_block(1536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
