// write_controller: key-table write address generator.
//
// A down counter. While key expansion is not writing it rests at the top
// address (DEPTH-1 = 10); every key-table write then moves it down by one, so
// the original key goes to address 10 and round key i to address 10-i.
// `rewind` returns it to the top address once an expansion has ended.
//
// From the document: only the block's name and its place beside the key
// table. My own choice: the down counter and the rewind input.
module write_controller
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_KEYS
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     we,      // a key-table write happens this cycle
  input  logic                     rewind,  // expansion finished or aborted
  output logic [$clog2(DEPTH)-1:0] waddr
);

  localparam logic [$clog2(DEPTH)-1:0] TOP = ($clog2(DEPTH))'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (reset || rewind) waddr <= TOP;
    else if (we)         waddr <= (waddr == '0) ? TOP : waddr - 1'b1;
  end

endmodule
