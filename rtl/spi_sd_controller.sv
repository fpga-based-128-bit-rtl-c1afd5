// spi_sd_controller: SD/MMC card reader in SPI mode, with a one-block buffer
// and a processor-bus (Avalon-MM slave) port.
//
// The card is driven with SCLK at half the system clock (one toggle per
// clock): MOSI changes as SCLK falls, MISO is sampled as it rises. Commands
// are 6-byte frames sent MSB first (start bits 01, 6-bit index, 32-bit
// argument, CRC7 and end bit), each preceded by idle clocks with MOSI high.
//
// Power-up sequence (runs by itself after reset):
//   WAKE_CLOCKS clocks with nCS high, then nCS low and EXTRA_CLOCKS more
//   (the extra pulses some cards need), CMD0 with its fixed CRC 95h until the
//   card answers R1 = 01h (idle), CMD1 until it answers 00h (ready), CMD16 to
//   set the block length to BLOCK_BYTES. A command that gets no response
//   within RESP_TIMEOUT clocks is sent again. Then the reader is idle, with
//   SCLK stopped and the end-of-read flag `eor` set.
// Block read: CMD17 with the card byte address, preceded by READ_GAP_CLOCKS
//   idle clocks (16: 8 proved too few between consecutive block reads);
//   wait for the data start token FEh, reading whole bytes aligned to the
//   R1 response (any other byte but FFh is a data error token and ends the
//   read with the error flag set), store BLOCK_BYTES bytes in the buffer,
//   clock past the 16-bit CRC, and set eor.
//
// Bus map (32-bit word addresses, registered readdata, one cycle latency):
//   1   write: bit 0 = 1 requests a block read (and clears eor)
//   2   write: card byte address for the read
//   16  read : bit 0 = eor (read finished / reader idle), bit 1 = error
//   64  write: buffer byte address (multiple of 4)
//   128 read : four buffer bytes from that address, the first in bits 31:24
//
// From the document: 80 wake-up clocks, the extra pulses before
// initialisation, CMD0 with CRC 95h retried without an answer, CMD1 until
// ready, 8 delay clocks between commands, 512-byte blocks, and the start/eor
// handshake with the processor. My own choices: the 25 MHz SCLK, the error
// flag, the bus addresses, the time-out and the 16-clock gap before CMD17.
// Lint reports unused bits: rx[7] and window[7] are shifted out before they
// are read, and the low two bits of buf_addr are dropped because the buffer is
// read a 32-bit word at a time.
module spi_sd_controller #(
  parameter int unsigned BLOCK_BYTES     = 512,
  parameter int unsigned WAKE_CLOCKS     = 80,
  parameter int unsigned EXTRA_CLOCKS    = 16,
  parameter int unsigned CMD_GAP_CLOCKS  = 8,
  parameter int unsigned READ_GAP_CLOCKS = 16,
  parameter int unsigned RESP_TIMEOUT    = 64
) (
  input  logic        clk,
  input  logic        reset,
  // processor bus
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [7:0]  address,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // card
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso,
  output logic        sclk
);

  localparam int unsigned BW = $clog2(BLOCK_BYTES);
  localparam int unsigned WORDS = BLOCK_BYTES / 4;

  typedef enum logic [3:0] {
    ST_WAKE, ST_EXTRA, ST_SEND, ST_RESP_WAIT, ST_RESP_BYTE,
    ST_IDLE, ST_TOKEN, ST_DATA, ST_CRC
  } state_e;

  typedef enum logic [1:0] {C_GO_IDLE, C_SEND_OP, C_SET_BLOCKLEN, C_READ} cmd_e;

  state_e      state;
  cmd_e        cmd;
  logic        sclk_q;
  logic [79:0] tx;
  logic [6:0]  bits_left;
  logic [7:0]  rx;
  logic [2:0]  rx_bits;
  logic [7:0]  window;
  logic [BW:0] cnt;          // clock, byte or bit counter, by state
  logic [7:0]  timeout;
  logic        eor, err, req;
  logic [31:0] card_addr;
  logic [BW-1:0] buf_addr;
  logic [31:0] buf_mem [WORDS];

  wire active = (state != ST_IDLE);
  wire rise   = active && !sclk_q;   // this clock edge raises SCLK: sample MISO
  wire fall   = active &&  sclk_q;   // this clock edge lowers SCLK: next MOSI bit

  function automatic logic [47:0] frame(cmd_e c, logic [31:0] a);
    unique case (c)
      C_GO_IDLE:      return {2'b01, 6'd0,  32'h0,               8'h95};
      C_SEND_OP:      return {2'b01, 6'd1,  32'h0,               8'h01};
      C_SET_BLOCKLEN: return {2'b01, 6'd16, 32'(BLOCK_BYTES),    8'h01};
      default:        return {2'b01, 6'd17, a,                   8'h01};
    endcase
  endfunction

  // Loads a command: one dummy bit (consumed by the first falling edge),
  // `gap` idle ones, the 48-bit frame, ones after it.
  task automatic load_cmd(cmd_e c, int unsigned gap);
    tx        <= ({1'b1, 16'hffff, frame(c, card_addr), 15'h7fff} << (16 - gap))
               | ((80'd1 << (16 - gap)) - 80'd1);
    bits_left <= 7'(gap + 49);
    cmd       <= c;
    timeout   <= '0;
    state     <= ST_SEND;
  endtask

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= ST_WAKE;
      cmd     <= C_GO_IDLE;
      sclk_q  <= 1'b0;
      cs_n    <= 1'b1;
      tx      <= '1;
      bits_left <= '0;
      rx      <= '0;
      rx_bits <= '0;
      window  <= '1;
      cnt     <= '0;
      timeout <= '0;
      eor     <= 1'b0;
      err     <= 1'b0;
    end else begin
      sclk_q <= active ? ~sclk_q : 1'b0;
      unique case (state)
        ST_WAKE: if (rise) begin
          if (cnt == (BW+1)'(WAKE_CLOCKS - 1)) begin
            cnt   <= '0;
            cs_n  <= 1'b0;
            state <= ST_EXTRA;
          end else cnt <= cnt + 1'b1;
        end
        ST_EXTRA: if (rise) begin
          if (cnt == (BW+1)'(EXTRA_CLOCKS - 1)) begin
            cnt <= '0;
            load_cmd(C_GO_IDLE, CMD_GAP_CLOCKS);
          end else cnt <= cnt + 1'b1;
        end
        ST_SEND: if (fall) begin
          tx        <= {tx[78:0], 1'b1};
          bits_left <= bits_left - 1'b1;
          if (bits_left == 7'd1) state <= ST_RESP_WAIT;
        end
        ST_RESP_WAIT: if (rise) begin
          if (!miso) begin
            rx      <= '0;
            rx_bits <= 3'd1;
            state   <= ST_RESP_BYTE;
          end else if (timeout == 8'(RESP_TIMEOUT - 1)) begin
            load_cmd(cmd, CMD_GAP_CLOCKS);      // no answer: send it again
          end else timeout <= timeout + 1'b1;
        end
        ST_RESP_BYTE: if (rise) begin
          rx      <= {rx[6:0], miso};
          rx_bits <= rx_bits + 1'b1;
          if (rx_bits == 3'd7) begin
            unique case (cmd)
              C_GO_IDLE:
                if ({rx[6:0], miso} == 8'h01) load_cmd(C_SEND_OP, CMD_GAP_CLOCKS);
                else                          load_cmd(C_GO_IDLE, CMD_GAP_CLOCKS);
              C_SEND_OP:
                if ({rx[6:0], miso} == 8'h00) load_cmd(C_SET_BLOCKLEN, CMD_GAP_CLOCKS);
                else                          load_cmd(C_SEND_OP, CMD_GAP_CLOCKS);
              C_SET_BLOCKLEN:
                if ({rx[6:0], miso} == 8'h00) begin
                  state <= ST_IDLE;
                  eor   <= 1'b1;
                end else load_cmd(C_SET_BLOCKLEN, CMD_GAP_CLOCKS);
              default:
                if ({rx[6:0], miso} == 8'h00) begin
                  window <= '1;
                  state  <= ST_TOKEN;
                end else begin
                  state <= ST_IDLE;
                  eor   <= 1'b1;
                  err   <= 1'b1;
                end
            endcase
          end
        end
        ST_IDLE: if (req) begin
          err <= 1'b0;
          load_cmd(C_READ, READ_GAP_CLOCKS);
        end
        ST_TOKEN: if (rise) begin
          // Bytes stay aligned to the R1 response: look at whole bytes.
          window  <= {window[6:0], miso};
          rx_bits <= rx_bits + 1'b1;
          if (rx_bits == 3'd7) begin
            if ({window[6:0], miso} == 8'hfe) begin
              cnt   <= '0;
              state <= ST_DATA;
            end else if ({window[6:0], miso} != 8'hff) begin   // data error token
              state <= ST_IDLE;
              eor   <= 1'b1;
              err   <= 1'b1;
            end
          end
        end
        ST_DATA: if (rise) begin
          rx      <= {rx[6:0], miso};
          rx_bits <= rx_bits + 1'b1;
          if (rx_bits == 3'd7) begin
            if (cnt == (BW+1)'(BLOCK_BYTES - 1)) begin
              cnt   <= '0;
              state <= ST_CRC;
            end else cnt <= cnt + 1'b1;
          end
        end
        ST_CRC: if (rise) begin
          if (cnt == (BW+1)'(15)) begin
            cnt   <= '0;
            state <= ST_IDLE;
            eor   <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= ST_WAKE;
      endcase
      // A new read request clears eor at once, so that polling never sees
      // the flag of the previous read.
      if (chipselect && write && address == 8'd1 && writedata[0]) eor <= 1'b0;
    end
  end

  // Block buffer: byte k of the block lands in word k/4, big-endian.
  always_ff @(posedge clk)
    if (state == ST_DATA && rise && rx_bits == 3'd7)
      buf_mem[cnt[BW-1:2]][31 - 8*cnt[1:0] -: 8] <= {rx[6:0], miso};

  // Bus registers.
  always_ff @(posedge clk) begin
    if (reset) begin
      req       <= 1'b0;
      card_addr <= '0;
      buf_addr  <= '0;
      readdata  <= '0;
    end else begin
      if (state == ST_IDLE) req <= 1'b0;
      if (chipselect && write) begin
        unique case (address)
          8'd1:    if (writedata[0]) req <= 1'b1;
          8'd2:    card_addr <= writedata;
          8'd64:   buf_addr  <= writedata[BW-1:0];
          default: ;
        endcase
      end
      if (chipselect && read) begin
        unique case (address)
          8'd16:   readdata <= {30'b0, err, eor};
          8'd128:  readdata <= buf_mem[buf_addr[BW-1:2]];
          default: readdata <= '0;
        endcase
      end
    end
  end

  always_comb begin
    sclk = sclk_q;
    mosi = tx[79];
  end

endmodule
