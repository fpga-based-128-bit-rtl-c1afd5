// generate_roundkey: one step of the AES-128 key schedule, purely
// combinational.
//
// From the previous round key (row-major 4x4 state, see aes_pkg) it forms the
// next one: column 3 is rotated up by one byte (RotWord), passed through the
// forward S-box (SubWord) and XORed with column 0 and with the round constant
// Rcon[round] in the top byte; every further column is the XOR of the new
// column to its left with the old column in its place. This is the procedure
// the design describes for its "generate roundkey" block; the round number is
// supplied by the key controller's counter (1..10).
//
// From the document: RotWord, SubWord, Rcon and the XOR chain. My own choice:
// one round key per call, combinational, with the S-box computed at
// elaboration.
module generate_roundkey
  import aes_pkg::*;
(
  input  state_t      prev_key,  // round key i-1
  input  logic [3:0]  round,     // i, 1..10
  output state_t      next_key   // round key i
);

  logic [7:0] rot [4];
  logic [7:0] rc;

  always_comb begin
    // RotWord of column 3: each element moves up one row.
    for (int r = 0; r < 4; r++) rot[r] = get_byte(prev_key, (r + 1) % 4, 3);
    rc = rcon(32'(round));

    next_key = '0;
    for (int r = 0; r < 4; r++)
      next_key = set_byte(next_key, r, 0,
                          get_byte(prev_key, r, 0) ^ SBOX[rot[r]] ^ ((r == 0) ? rc : 8'h00));
    for (int c = 1; c < 4; c++)
      for (int r = 0; r < 4; r++)
        next_key = set_byte(next_key, r, c,
                            get_byte(prev_key, r, c) ^ get_byte(next_key, r, c - 1));
  end

endmodule
