// tb_inv_mix_columns: applies the reference forward MixColumns to random
// states and checks that the block undoes it; also the textbook column
// db 13 53 45 <-> 8e 4d a1 bc.
module tb_inv_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;
  inv_mix_columns dut (.state_in, .state_out);

  // Forward MixColumns on a FIPS-ordered block.
  function automatic logic [127:0] mix(logic [127:0] f);
    block_t s = from_hex(f);
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
      s[4*c]   = mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3;
      s[4*c+1] = a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3;
      s[4*c+2] = a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3);
      s[4*c+3] = mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2);
    end
    return to_hex(s);
  endfunction

  initial begin
    logic [127:0] orig;
    orig = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    state_in = to_rows(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    #1 checks++;
    if (from_rows(state_out) !== orig) begin failures++; $display("FAIL textbook columns %h", from_rows(state_out)); end
    for (int i = 0; i < 300; i++) begin
      orig = {$urandom, $urandom, $urandom, $urandom};
      state_in = to_rows(mix(orig));
      #1 checks++;
      if (from_rows(state_out) !== orig) begin
        failures++; $display("FAIL got %h exp %h", from_rows(state_out), orig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
