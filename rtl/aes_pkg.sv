// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// decryption core.
//
// State layout. The core holds the 4x4 AES state as one 128-bit word in
// row-major order: bits [127:96] are row 0 (columns 0..3, column 0 in the most
// significant byte), bits [95:64] row 1, and so on. This is the order in which
// the processor writes the state, one 32-bit row per bus word; a 128-bit block
// in the usual FIPS-197 byte order (column-major) is converted with
// fips_to_rows() / rows_to_fips().
//
// S-boxes. The forward and inverse S-box tables are computed at elaboration
// from their definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^
// rotl(b,3) ^ rotl(b,4) ^ 8'h63), so no table is typed in by hand. They end up
// as 256-entry constant ROMs, as in the described hardware.
//
// The AES constants and the S-box definition follow FIPS-197. The row-major
// layout and the helper functions are my own choice. Lint reports SBOX,
// INV_SBOX and NUM_KEYS as unused when a module that does not need them is
// checked alone; each is used elsewhere in the design.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [255:0][7:0] byte_table_t;

  localparam int unsigned NUM_ROUNDS = 10;             // AES-128
  localparam int unsigned NUM_KEYS   = NUM_ROUNDS + 1; // original key + 10 round keys

  // Byte (r,c) of a row-major state.
  function automatic logic [7:0] get_byte(state_t s, int unsigned r, int unsigned c);
    return s[127 - 8*(4*r + c) -: 8];
  endfunction

  function automatic state_t set_byte(state_t s, int unsigned r, int unsigned c, logic [7:0] v);
    state_t t = s;
    t[127 - 8*(4*r + c) -: 8] = v;
    return t;
  endfunction

  // FIPS-197 byte i sits at row i%4, column i/4.
  function automatic state_t fips_to_rows(state_t f);
    state_t s = '0;
    for (int unsigned i = 0; i < 16; i++)
      s = set_byte(s, i % 4, i / 4, f[127 - 8*i -: 8]);
    return s;
  endfunction

  function automatic state_t rows_to_fips(state_t s);
    state_t f = '0;
    for (int unsigned i = 0; i < 16; i++)
      f[127 - 8*i -: 8] = get_byte(s, i % 4, i / 4);
    return f;
  endfunction

  // Multiplication by x: a shift, and a conditional XOR with 8'h1b.
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // a^254 = a^2 * a^4 * ... * a^128 is the multiplicative inverse (0 maps to 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r  = 8'h01;
    logic [7:0] sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox_value(logic [7:0] x);
    logic [7:0] b = gf_inv(x);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_table_t make_sbox();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_value(8'(i));
    return t;
  endfunction

  function automatic byte_table_t make_inv_sbox();
    byte_table_t f = make_sbox();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = 8'(i);
    return t;
  endfunction

  localparam byte_table_t SBOX     = make_sbox();
  localparam byte_table_t INV_SBOX = make_inv_sbox();

  // Round constants: x^(i-1) in GF(2^8), for rounds i = 1..10.
  function automatic logic [7:0] rcon(int unsigned round);
    logic [7:0] r = 8'h01;
    for (int unsigned i = 1; i < round; i++) r = xtime(r);
    return r;
  endfunction

endpackage
