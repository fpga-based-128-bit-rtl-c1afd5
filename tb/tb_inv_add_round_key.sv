// tb_inv_add_round_key: random states and keys, compared with their XOR, plus
// the FIPS-197 initial AddRoundKey of the decryption example.
module tb_inv_add_round_key;
  logic [127:0] state_in, round_key, state_out;
  int checks = 0, failures = 0;
  inv_add_round_key dut (.state_in, .round_key, .state_out);
  initial begin
    // Inverse cipher of FIPS-197 C.1: output XOR round key 10 = istart of round 1.
    state_in  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    round_key = 128'h13111d7fe3944a17f307a78b4d2b30c5;
    #1 checks++;
    if (state_out !== 128'h7ad5fda789ef4e272bca100b3d9ff59f) begin failures++; $display("FAIL FIPS"); end
    for (int i = 0; i < 200; i++) begin
      logic [127:0] a, b;
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      state_in = a; round_key = b;
      #1 checks++;
      for (int k = 0; k < 128; k++)
        if (state_out[k] !== (a[k] != b[k])) begin failures++; $display("FAIL bit %0d", k); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
