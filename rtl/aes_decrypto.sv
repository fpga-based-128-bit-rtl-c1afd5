// aes_decrypto: iterative AES-128 decryption core with on-chip key expansion.
//
// One 128-bit input serves both the key and the ciphertext; `is_cipher`
// steers it (the demux) to the key-expansion side (0) or the decryption side
// (1), and a `start` pulse launches the selected unit.
//
// Key side (11 cycles): key_controller, generate_roundkey, the round-key
// register with its feedback mux, write_controller and the key table. The
// second mux writes the user key itself as the first table entry.
//
// Decryption side (11 cycles to eoc): input mux (ciphertext / feedback),
// inv_add_round_key, inv_mix_columns with its bypass mux, the round-state
// register, and inv_shiftrow_subbytes on the feedback path. The final
// AddRoundKey result is captured in the output buffer `plain`.
//
// eoc is the done flag of whichever unit is selected by `is_cipher`.
// All states are in the row-major order of aes_pkg. `clear` returns both
// controllers to idle (the bus wrapper pulses it when a new block begins).
//
// From the document (datapath figure): the demux of the shared input, the two
// key-side muxes, the key register, the key table, the round datapath, the
// feedback mux and the eoc mux. My own choices: zeros on the unselected
// demux output and the clear input.
module aes_decrypto
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  state_t data_in,    // key or ciphertext
  input  logic   is_cipher,  // demux select: 0 = key, 1 = ciphertext
  input  logic   start,      // one-cycle pulse
  input  logic   clear,
  output state_t plain,      // output buffer
  output logic   eoc
);

  localparam int unsigned AW = $clog2(NUM_KEYS);

  // Demux of the shared input.
  state_t user_key, cipher;
  always_comb begin
    user_key = is_cipher ? '0 : data_in;
    cipher   = is_cipher ? data_in : '0;
  end

  // ---------------- key expansion ----------------
  logic [3:0] k_count;
  logic       k_sel_user, k_reg_en, k_we, k_rewind, k_eoc;
  logic [AW-1:0] k_waddr;
  state_t     k_reg, k_gen_in, k_next, k_wdata;

  key_controller u_key_ctrl (
    .clk, .reset, .start(start && !is_cipher), .clear,
    .count(k_count), .sel_user_key(k_sel_user), .reg_en(k_reg_en),
    .table_we(k_we), .rewind(k_rewind), .eoc(k_eoc)
  );

  always_comb begin
    k_gen_in = k_sel_user ? user_key : k_reg;   // mux 1
    k_wdata  = k_sel_user ? user_key : k_reg;   // mux 2
  end

  generate_roundkey u_genkey (
    .prev_key(k_gen_in), .round(k_count + 4'd1), .next_key(k_next)
  );

  always_ff @(posedge clk)
    if (k_reg_en) k_reg <= k_next;

  write_controller u_wctrl (
    .clk, .reset, .we(k_we), .rewind(k_rewind), .waddr(k_waddr)
  );

  // ---------------- decryption ----------------
  logic [3:0] d_count;
  logic       d_sel_fb, d_mix_en, d_state_en, d_out_en, d_eoc;
  state_t     round_key, d_mux_in, d_ark, d_mix, d_next, d_state, d_isb;

  key_table u_table (
    .clk, .we(k_we), .waddr(k_waddr), .wdata(k_wdata),
    .raddr(AW'(d_count)), .rdata(round_key)
  );

  aes_dec_controller u_dec_ctrl (
    .clk, .reset, .start(start && is_cipher), .clear,
    .count(d_count), .sel_feedback(d_sel_fb), .mix_en(d_mix_en),
    .state_en(d_state_en), .out_en(d_out_en), .eoc(d_eoc)
  );

  always_comb d_mux_in = d_sel_fb ? d_isb : cipher;

  inv_add_round_key u_ark (.state_in(d_mux_in), .round_key(round_key), .state_out(d_ark));
  inv_mix_columns   u_imc (.state_in(d_ark), .state_out(d_mix));

  always_comb d_next = d_mix_en ? d_mix : d_ark;

  always_ff @(posedge clk)
    if (d_state_en) d_state <= d_next;

  inv_shiftrow_subbytes u_isb (.state_in(d_state), .state_out(d_isb));

  always_ff @(posedge clk) begin
    if (reset)         plain <= '0;
    else if (d_out_en) plain <= d_ark;
  end

  // End-of-computation mux.
  always_comb eoc = is_cipher ? d_eoc : k_eoc;

endmodule
