// key_table: the "expansion keys" RAM of the AES core.
//
// Holds the original key and the ten round keys, one 128-bit entry each.
// Key expansion writes it once per key (synchronous write, one entry per
// clock); the decryption datapath reads it every clock through an
// asynchronous read port addressed by its round counter. Round key i is
// stored at address 10-i, so that decryption iteration n simply reads
// address n: the last round key is needed first.
//
// From the document: a table of the expanded keys read by the decryption
// iteration. My own choices: 11 entries, asynchronous read and the reversed
// order.
module key_table
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_KEYS   // 11 entries for AES-128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  state_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output state_t                   rdata
);

  state_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
