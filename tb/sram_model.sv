// sram_model: behavioural model of the 256K x 16 asynchronous SRAM, for
// simulation only. Reads are combinational while nCE and nOE are low (0
// otherwise, standing in for a floating bus); a write happens whenever nCE
// and nWE are low and the controller drives the data pins, byte lanes by
// nUB / nLB.
module sram_model (
  input  logic [17:0] addr,
  input  logic [15:0] dq_o,
  input  logic        dq_oe,
  output logic [15:0] dq_i,
  input  logic        ub_n,
  input  logic        lb_n,
  input  logic        we_n,
  input  logic        ce_n,
  input  logic        oe_n
);
  logic [15:0] mem [1 << 18];
  int unsigned writes = 0;

  always @* begin
    if (!ce_n && !we_n && dq_oe) begin
      if (!ub_n) mem[addr][15:8] = dq_o[15:8];
      if (!lb_n) mem[addr][7:0]  = dq_o[7:0];
    end
  end
  always @(negedge we_n) if (!ce_n && dq_oe) writes++;

  always_comb dq_i = (!ce_n && !oe_n && we_n) ? mem[addr] : 16'h0000;
endmodule
