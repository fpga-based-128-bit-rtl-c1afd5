// tb_key_controller: checks the cycle-by-cycle control sequence of one key
// expansion: the start cycle writes the user key, then count runs 1..10 with
// a table write and register load each cycle, and eoc rises 11 cycles after
// the start cycle and stays until clear.
module tb_key_controller;
  logic clk = 0, reset, start, clear;
  logic [3:0] count;
  logic sel_user_key, reg_en, table_we, rewind, eoc;
  int checks = 0, failures = 0;
  key_controller dut (.*);
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
    reset = 1; start = 0; clear = 0;
    @(negedge clk) reset = 0;
    repeat (3) begin
      @(negedge clk);
      chk(!eoc && !table_we && sel_user_key, "idle outputs");
      start = 1; #1;
      chk(table_we && reg_en && sel_user_key, "start cycle writes user key");
      @(negedge clk) start = 0;
      for (int i = 1; i <= 10; i++) begin
        chk(count == 4'(i), $sformatf("count %0d", i));
        chk(table_we && reg_en && !sel_user_key && !eoc, "run outputs");
        @(negedge clk);
      end
      chk(eoc && !table_we && rewind, "eoc after 11 cycles");
      repeat (5) @(negedge clk);
      chk(eoc, "eoc held");
      clear = 1; @(negedge clk) clear = 0;
      chk(!eoc, "clear drops eoc");
    end
    // clear in the middle aborts.
    start = 1; @(negedge clk) start = 0; repeat (4) @(negedge clk);
    clear = 1; #1 chk(!table_we && rewind, "clear blocks writes"); @(negedge clk) clear = 0;
    repeat (12) @(negedge clk);
    chk(!eoc && !table_we, "aborted run stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
