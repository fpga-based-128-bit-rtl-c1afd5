// inv_mix_columns: InvMixColumns step of AES decryption, combinational.
//
// Each column (a0..a3) of the row-major state is multiplied in GF(2^8) by the
// circulant matrix rows {0e,0b,0d,09}, {09,0e,0b,0d}, {0d,09,0e,0b},
// {0b,0d,09,0e}. As the design calls for, no general multiplier is used:
// 2a, 4a and 8a come from a chain of three xtime steps (a shift and a
// conditional XOR with 8'h1b), and the constants are sums of those:
// 09 = 8+1, 0b = 8+2+1, 0d = 8+4+1, 0e = 8+4+2.
//
// From the document: products by shifts and comparisons instead of
// multipliers. My own choice: the particular 8+4+2+1 decomposition.
module inv_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  // Products of one byte with the four constants.
  typedef struct packed {
    logic [7:0] m09, m0b, m0d, m0e;
  } products_t;

  function automatic products_t products(logic [7:0] a);
    logic [7:0] a2 = xtime(a);
    logic [7:0] a4 = xtime(a2);
    logic [7:0] a8 = xtime(a4);
    products_t  p;
    p.m09 = a8 ^ a;
    p.m0b = a8 ^ a2 ^ a;
    p.m0d = a8 ^ a4 ^ a;
    p.m0e = a8 ^ a4 ^ a2;
    return p;
  endfunction

  products_t p [4];

  always_comb begin
    state_out = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) p[r] = products(get_byte(state_in, r, c));
      state_out = set_byte(state_out, 0, c, p[0].m0e ^ p[1].m0b ^ p[2].m0d ^ p[3].m09);
      state_out = set_byte(state_out, 1, c, p[0].m09 ^ p[1].m0e ^ p[2].m0b ^ p[3].m0d);
      state_out = set_byte(state_out, 2, c, p[0].m0d ^ p[1].m09 ^ p[2].m0e ^ p[3].m0b);
      state_out = set_byte(state_out, 3, c, p[0].m0b ^ p[1].m0d ^ p[2].m09 ^ p[3].m0e);
    end
  end

endmodule
