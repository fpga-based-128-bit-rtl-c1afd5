// tb_aes_avalon: drives the AES wrapper as the processor would: four 32-bit
// key writes, four ciphertext writes, then four plaintext reads. Checks the
// read-back of the input buffer before completion, that start follows the
// fourth word (eoc 12 clocks after the last write), and the plaintext of
// FIPS-197 and random blocks.
module tb_aes_avalon;
  import aes_ref_pkg::*;
  logic clk = 0, reset, chipselect, read, write, eoc;
  logic [2:0] address;
  logic [31:0] writedata, readdata;
  int checks = 0, failures = 0;
  aes_avalon dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = 3'(a); writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask
  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = 3'(a);
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask
  task automatic write_block(logic [127:0] rows, bit cipher, output int cycles);
    for (int w = 0; w < 4; w++) bus_write((cipher ? 4 : 0) + w, rows[127-32*w -: 32]);
    cycles = 1;   // the clock edge that took the fourth word
    while (!eoc && cycles < 100) begin @(negedge clk); cycles++; end
  endtask
  task automatic decrypt(logic [127:0] ct_fips, logic [127:0] pt_fips);
    logic [31:0] d;
    logic [127:0] got;
    int cycles;
    // Partly written block: reads return the input buffer.
    bus_write(4, 32'hdeadbeef);
    bus_read(4, d);
    checks++;
    if (d !== 32'hdeadbeef || eoc) begin failures++; $display("FAIL input buffer readback %h", d); end
    write_block(to_rows(ct_fips), 1, cycles);
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL eoc %0d clocks after last write", cycles); end
    for (int w = 0; w < 4; w++) begin bus_read(4 + w, d); got[127-32*w -: 32] = d; end
    checks++;
    if (from_rows(got) !== pt_fips) begin failures++; $display("FAIL plaintext %h exp %h", from_rows(got), pt_fips); end
  endtask
  initial begin
    int cycles;
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    repeat (2) @(negedge clk); reset = 0;
    // The key as the processor writes it: one row per word.
    write_block(128'h2b28ab09_7eaef7cf_15d2154f_16a6883c, 0, cycles);
    checks++;
    if (cycles != 12) begin failures++; $display("FAIL key expansion eoc after %0d", cycles); end
    decrypt(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    for (int k = 0; k < 3; k++) begin
      logic [127:0] key, pt;
      key = {$urandom, $urandom, $urandom, $urandom};
      write_block(to_rows(key), 0, cycles);
      for (int i = 0; i < 10; i++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        decrypt(encrypt(key, pt), pt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
