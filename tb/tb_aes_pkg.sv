// tb_aes_pkg: checks the elaboration-time S-box tables and helper functions of
// aes_pkg against the independent reference model and FIPS-197 values.
module tb_aes_pkg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    for (int i = 0; i < 256; i++) begin
      check(128'(SBOX[i]), 128'(aes_ref_pkg::sbox(8'(i))), $sformatf("SBOX[%0d]", i));
      check(128'(INV_SBOX[aes_ref_pkg::sbox(8'(i))]), 128'(i), $sformatf("INV_SBOX[%0d]", i));
    end
    check(128'(SBOX[8'h53]), 128'hed, "FIPS S-box example");
    check(128'(gf_mul(8'h57, 8'h83)), 128'hc1, "FIPS multiply example");
    for (int r = 1; r <= 10; r++) check(128'(rcon(r)), 128'({8'h01,8'h02,8'h04,8'h08,8'h10,8'h20,8'h40,8'h80,8'h1b,8'h36} >> (8*(10-r))) & 128'hff, "rcon");
    check(fips_to_rows(128'h2b7e151628aed2a6abf7158809cf4f3c), 128'h2b28ab097eaef7cf15d2154f16a6883c, "row-major key");
    check(rows_to_fips(128'h2b28ab097eaef7cf15d2154f16a6883c), 128'h2b7e151628aed2a6abf7158809cf4f3c, "back to FIPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
