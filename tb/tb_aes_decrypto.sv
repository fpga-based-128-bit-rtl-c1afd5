// tb_aes_decrypto: loads a key (11-cycle expansion, eoc through the key side
// of the eoc mux), then decrypts FIPS-197 examples and random blocks
// encrypted by the reference model; checks the plaintext and that eoc comes
// exactly 11 cycles after each start.
module tb_aes_decrypto;
  import aes_ref_pkg::*;
  logic clk = 0, reset, is_cipher, start, clear, eoc;
  logic [127:0] data_in, plain;
  int checks = 0, failures = 0;
  aes_decrypto dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(logic [127:0] d, logic cipher, output int cycles);
    @(negedge clk);
    data_in = d; is_cipher = cipher; start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!eoc && cycles < 100) begin @(negedge clk); cycles++; end
  endtask
  task automatic load_key(logic [127:0] key_fips);
    int c;
    clear = 1; @(negedge clk) clear = 0;
    run(to_rows(key_fips), 0, c);
    checks++;
    if (c != 11) begin failures++; $display("FAIL key expansion took %0d cycles", c); end
  endtask
  task automatic decrypt(logic [127:0] ct_fips, logic [127:0] pt_fips);
    int c;
    run(to_rows(ct_fips), 1, c);
    checks++;
    if (c != 11) begin failures++; $display("FAIL decryption took %0d cycles", c); end
    checks++;
    if (from_rows(plain) !== pt_fips) begin
      failures++; $display("FAIL ct %h: got %h exp %h", ct_fips, from_rows(plain), pt_fips);
    end
  endtask
  initial begin
    reset = 1; start = 0; clear = 0; is_cipher = 0; data_in = 0;
    repeat (2) @(negedge clk); reset = 0;
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    decrypt(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    // eoc mux: with the key side selected eoc shows the key unit's flag.
    @(negedge clk) is_cipher = 0; #1 checks++;
    if (!eoc) begin failures++; $display("FAIL eoc mux key side"); end
    for (int k = 0; k < 5; k++) begin
      logic [127:0] key, pt;
      key = {$urandom, $urandom, $urandom, $urandom};
      load_key(key);
      for (int i = 0; i < 20; i++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        decrypt(encrypt(key, pt), pt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
