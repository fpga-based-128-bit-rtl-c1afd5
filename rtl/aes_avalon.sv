// aes_avalon: processor-bus (Avalon-MM slave) wrapper of the AES core, with
// the 32-bit to 128-bit input buffer.
//
// The processor bus is 32 bits wide, so key and ciphertext share one 32-bit
// write port and are assembled in a 128-bit input buffer, one state row per
// bus word (word 0 = row 0 = bits [127:96]). Word address bit 2 selects what
// is being written: addresses 0..3 are key rows, 4..7 ciphertext rows.
// Writing row 3 starts the core on the following clock (key expansion for a
// key, decryption for a ciphertext): four bus writes to fill the buffer, then
// start, as in the buffering timing of the design. Writing rows 0..2 returns
// the core to idle and drops eoc.
//
// Reads (address bits [1:0] pick the row) return the input buffer while the
// selected unit has not finished and the output buffer (plaintext) once eoc
// is high; readdata is registered, one cycle of read latency. eoc is also
// brought out as a signal. A decryption ends 11 clocks after its start, a
// key expansion likewise; the processor is expected to wait for eoc (or for
// at least that long) before reading the plaintext.
//
// From the document: one shared 32-bit input for key and ciphertext, four
// bus transfers to fill the 128-bit buffer, then start. My own choices: the
// address map, the clear pulse on rows 0..2, and returning the input buffer
// while eoc is low.
module aes_avalon
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [2:0]  address,
  input  word_t       writedata,
  output word_t       readdata,
  output logic        eoc
);

  state_t in_buf, plain;
  logic   is_cipher, start, clear;

  always_ff @(posedge clk) begin
    if (reset) begin
      in_buf    <= '0;
      is_cipher <= 1'b0;
      start     <= 1'b0;
      clear     <= 1'b0;
      readdata  <= '0;
    end else begin
      start <= 1'b0;
      clear <= 1'b0;
      if (chipselect && write) begin
        in_buf[127 - 32*address[1:0] -: 32] <= writedata;
        is_cipher <= address[2];
        if (address[1:0] == 2'd3) start <= 1'b1;
        else                      clear <= 1'b1;
      end
      if (chipselect && read)
        readdata <= eoc ? plain[127 - 32*address[1:0] -: 32]
                        : in_buf[127 - 32*address[1:0] -: 32];
    end
  end

  aes_decrypto u_core (
    .clk, .reset, .data_in(in_buf), .is_cipher, .start, .clear, .plain, .eoc
  );

endmodule
