// inv_shiftrow_subbytes: InvShiftRows and InvSubBytes in one combinational
// block.
//
// InvShiftRows rotates row r of the state r places to the right. Following
// the design, it costs no logic of its own: the output byte (r,c) is simply
// wired from input byte (r,(c-r) mod 4) before it enters its inverse S-box.
// The sixteen inverse S-boxes are 256-entry constant ROMs (aes_pkg::INV_SBOX).
//
// From the document: inverse shift rows done by swapping wires ahead of the
// inverse S-boxes. My own choice: S-box contents computed at elaboration.
module inv_shiftrow_subbytes
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    state_out = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out = set_byte(state_out, r, c,
                             INV_SBOX[get_byte(state_in, r, (c - r + 4) % 4)]);
  end

endmodule
