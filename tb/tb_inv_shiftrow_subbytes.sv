// tb_inv_shiftrow_subbytes: random states; expected byte (r,c) is the
// reference inverse S-box of input byte (r, c-r mod 4). Also the first step
// of the FIPS-197 C.1 inverse cipher.
module tb_inv_shiftrow_subbytes;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;
  inv_shiftrow_subbytes dut (.state_in, .state_out);

  function automatic logic [127:0] expect_of(logic [127:0] rows);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 32*r - 8*c -: 8] = inv_sbox(rows[127 - 32*r - 8*((c - r + 4) % 4) -: 8]);
    return o;
  endfunction

  initial begin
    state_in = to_rows(128'h7ad5fda789ef4e272bca100b3d9ff59f);
    #1 checks++;
    if (from_rows(state_out) !== 128'hbd6e7c3df2b5779e0b61216e8b10b689) begin
      failures++; $display("FAIL FIPS C.1 round 1: %h", from_rows(state_out));
    end
    for (int i = 0; i < 300; i++) begin
      state_in = {$urandom, $urandom, $urandom, $urandom};
      #1 checks++;
      if (state_out !== expect_of(state_in)) begin
        failures++; $display("FAIL got %h exp %h", state_out, expect_of(state_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
