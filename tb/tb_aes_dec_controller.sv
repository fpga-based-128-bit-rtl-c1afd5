// tb_aes_dec_controller: checks the control sequence of one decryption:
// start cycle (ciphertext selected, no InvMixColumns, state load), nine full
// rounds, the final round that loads the output buffer, and eoc 11 cycles
// after the start cycle.
module tb_aes_dec_controller;
  logic clk = 0, reset, start, clear;
  logic [3:0] count;
  logic sel_feedback, mix_en, state_en, out_en, eoc;
  int checks = 0, failures = 0;
  aes_dec_controller dut (.*);
  always #5 clk = ~clk;
  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cycles;
    reset = 1; start = 0; clear = 0;
    @(negedge clk) reset = 0;
    repeat (4) begin
      @(negedge clk);
      chk(!eoc && !state_en && !out_en, "idle");
      start = 1; #1;
      chk(count == 0 && !sel_feedback && !mix_en && state_en && !out_en, "initial AddRoundKey cycle");
      @(negedge clk) start = 0;
      for (int i = 1; i <= 9; i++) begin
        chk(count == 4'(i) && sel_feedback && mix_en && state_en && !out_en && !eoc, $sformatf("round %0d", i));
        @(negedge clk);
      end
      chk(count == 10 && sel_feedback && !mix_en && out_en && !eoc, "final round");
      cycles = 10;
      @(negedge clk); cycles++;
      chk(eoc && !out_en && !state_en && cycles == 11, "eoc 11 cycles after start");
      @(negedge clk) chk(eoc, "eoc held");
      // Back-to-back start from DONE.
      start = 1; #1 chk(state_en && !sel_feedback, "restart from done"); @(negedge clk) start = 0;
      chk(!eoc, "eoc drops on restart");
      repeat (10) @(negedge clk);
      chk(eoc, "second block done");
      clear = 1; @(negedge clk) clear = 0;
      chk(!eoc, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
