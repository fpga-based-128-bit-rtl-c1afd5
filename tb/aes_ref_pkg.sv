// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is derived from exponent and
// logarithm tables of the generator 3 in GF(2^8), and the cipher works on
// a FIPS-197 byte array (byte i = row i%4, column i/4). to_rows()/from_rows()
// convert to and from the row-major 128-bit layout the hardware uses.
package aes_ref_pkg;

  typedef logic [7:0] block_t [16];

  function automatic logic [7:0] mul2(logic [7:0] a);
    return a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
  endfunction

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return r;
  endfunction

  logic [7:0] sb_tab  [256];
  logic [7:0] isb_tab [256];
  bit         tab_ready = 0;

  function automatic void build_tables();
    logic [7:0]  e [256];
    logic [7:0]  l [256];
    logic [7:0]  inv, s;
    logic [15:0] d;
    e[0] = 8'h01;
    for (int i = 1; i < 256; i++) e[i] = mul(e[i-1], 8'h03);
    for (int i = 0; i < 255; i++) l[e[i]] = 8'(i);
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : e[(255 - int'(l[x])) % 255];
      d = {inv, inv};
      s = 8'h63;
      for (int k = 0; k < 5; k++) s ^= d[15-k -: 8];   // inv rotated left by k
      sb_tab[x]  = s;
      isb_tab[s] = 8'(x);
    end
    tab_ready = 1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    if (!tab_ready) build_tables();
    return sb_tab[x];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    if (!tab_ready) build_tables();
    return isb_tab[y];
  endfunction

  function automatic block_t from_hex(logic [127:0] h);
    block_t b;
    for (int i = 0; i < 16; i++) b[i] = h[127-8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] to_hex(block_t b);
    logic [127:0] h;
    for (int i = 0; i < 16; i++) h[127-8*i -: 8] = b[i];
    return h;
  endfunction

  // FIPS byte order -> hardware row-major word (row r in bits [127-32r -: 32]).
  function automatic logic [127:0] to_rows(logic [127:0] fips);
    logic [127:0] r;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        r[127 - 32*row - 8*col -: 8] = fips[127 - 8*(4*col + row) -: 8];
    return r;
  endfunction

  function automatic logic [127:0] from_rows(logic [127:0] rows);
    logic [127:0] f;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        f[127 - 8*(4*col + row) -: 8] = rows[127 - 32*row - 8*col -: 8];
    return f;
  endfunction

  // Round keys 0..10 in FIPS byte order.
  function automatic void expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])} ^ {rc, 24'h0};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    block_t s, t;
    expand(key, rk);
    s = from_hex(pt ^ rk[0]);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      for (int i = 0; i < 16; i++) t[i] = s[(i + 4 * (i % 4)) % 16];   // ShiftRows
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
          s[4*c+3] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
        end
      s = from_hex(to_hex(s) ^ rk[r]);
    end
    return to_hex(s);
  endfunction

endpackage
