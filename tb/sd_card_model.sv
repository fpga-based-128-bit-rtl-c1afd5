// sd_card_model: behavioural model of an MMC/SD card in SPI mode, for
// simulation only (not synthesizable).
//
// Samples MOSI on rising SCLK while nCS is low, recognises 6-byte command
// frames (a 0 start bit after idle ones), and shifts its answers out on
// falling SCLK, MSB first, MISO high when it has nothing to say. Answers:
// after one idle byte an R1 byte; CMD0 -> 01h (the first CMD0_IGNORE CMD0s
// get no answer at all), CMD1 -> 01h for the first CMD1_BUSY tries, then
// 00h; CMD16 -> 00h; CMD17 -> 00h, NAC_BYTES idle bytes, the start token FEh,
// the block from `mem` and two CRC bytes, or, for an address past the end of
// `mem`, the data error token 08h (out of range). It counts what it saw so
// that a testbench can check the protocol.
module sd_card_model #(
  parameter int unsigned MEM_BYTES   = 4096,
  parameter int unsigned CMD0_IGNORE = 1,
  parameter int unsigned CMD1_BUSY   = 3,
  parameter int unsigned NAC_BYTES   = 5
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [MEM_BYTES];
  int unsigned block_len = 512;

  // Protocol statistics.
  int unsigned wake_clocks = 0;      // rising edges with nCS high before the first command
  int unsigned n_cmd [64];
  int unsigned n_bad_frame = 0;
  int unsigned ones_before_cmd = 0;  // idle ones seen before the current command
  int unsigned min_gap_cmd17 = 1000; // fewest idle clocks, card silent, before a CMD17
  int unsigned blocks_sent = 0, error_tokens = 0;
  bit          seen_cmd = 0;

  bit out_q [$];
  logic [47:0] sh;
  int          nbits = 0;   // 0 = waiting for a start bit

  initial begin
    miso = 1'b1;
    foreach (n_cmd[i]) n_cmd[i] = 0;
  end

  task automatic push_byte(logic [7:0] b);
    for (int i = 7; i >= 0; i--) out_q.push_back(b[i]);
  endtask

  task automatic respond(logic [47:0] f);
    int unsigned idx = f[45:40];
    logic [31:0] arg = f[39:8];
    n_cmd[idx]++;
    if (f[47:46] != 2'b01 || !f[0]) n_bad_frame++;
    if (idx == 0 && n_cmd[0] <= CMD0_IGNORE) return;
    push_byte(8'hff);
    unique case (idx)
      0:  push_byte(8'h01);
      1:  push_byte(n_cmd[1] <= CMD1_BUSY ? 8'h01 : 8'h00);
      16: begin block_len = arg; push_byte(8'h00); end
      17: begin
        if (ones_before_cmd < min_gap_cmd17) min_gap_cmd17 = ones_before_cmd;
        push_byte(8'h00);
        repeat (NAC_BYTES) push_byte(8'hff);
        if (arg + block_len > MEM_BYTES) begin
          push_byte(8'h08);
          error_tokens++;
        end else begin
          push_byte(8'hfe);
          for (int unsigned i = 0; i < block_len; i++) push_byte(mem[arg + i]);
          push_byte(8'h5a); push_byte(8'ha5);
          blocks_sent++;
        end
      end
      default: push_byte(8'h04);   // illegal command
    endcase
  endtask

  always @(posedge sclk) begin
    if (cs_n) begin
      if (!seen_cmd) wake_clocks++;
      nbits = 0;
    end else if (nbits == 0) begin
      if (!mosi && out_q.size() == 0) begin
        sh = 48'(mosi);
        nbits = 1;
      end else if (mosi && out_q.size() == 0) ones_before_cmd++;
    end else begin
      sh = {sh[46:0], mosi};
      nbits++;
      if (nbits == 48) begin
        seen_cmd = 1;
        respond(sh);
        nbits = 0;
        ones_before_cmd = 0;
      end
    end
  end

  always @(negedge sclk) begin
    if (out_q.size() != 0) miso <= out_q.pop_front();
    else                   miso <= 1'b1;
  end
endmodule
