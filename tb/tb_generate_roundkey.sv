// tb_generate_roundkey: chains the combinational round-key step ten times and
// compares every round key with the reference key schedule (FIPS-197 key and
// random keys), including FIPS-197's printed round-key-1 value.
module tb_generate_roundkey;
  import aes_ref_pkg::*;
  logic [127:0] prev_key, next_key;
  logic [3:0]   round;
  int checks = 0, failures = 0;

  generate_roundkey dut (.prev_key, .round, .next_key);

  task automatic run_key(logic [127:0] key_fips);
    logic [127:0] rk [11];
    expand(key_fips, rk);
    prev_key = to_rows(key_fips);
    for (int r = 1; r <= 10; r++) begin
      round = 4'(r);
      #1;
      checks++;
      if (next_key !== to_rows(rk[r])) begin
        failures++;
        $display("FAIL key %h round %0d: got %h exp %h", key_fips, r, next_key, to_rows(rk[r]));
      end
      prev_key = next_key;
    end
  endtask

  initial begin
    logic [127:0] rk [11];
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c, rk);
    checks++;
    if (rk[1] !== 128'ha0fafe1788542cb123a339392a6c7605) begin
      failures++; $display("FAIL reference model round key 1");
    end
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run_key(128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 20; i++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
