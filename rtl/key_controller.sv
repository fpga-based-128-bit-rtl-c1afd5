// key_controller: sequencer of the AES-128 key expansion.
//
// A start pulse in IDLE begins an expansion in that same cycle: the user key
// is written to the key table and, through the input mux (sel_user_key = 1),
// fed to generate_roundkey, whose result round key 1 is captured in the key
// register (reg_en). In the ten RUN cycles that follow, count = i = 1..10, the
// register's round key i is written to the table and fed back to generate
// round key i+1. The expansion therefore takes 11 cycles, after which the
// controller sits in DONE with eoc high until `clear` or a new start.
// The round number for generate_roundkey is count+1.
//
// From the document: key expansion ahead of decryption, one round key per
// clock into the key table. My own choices: the state machine, the clear
// input, and the table order (last key at address 0).
module key_controller
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,         // one-cycle pulse
  input  logic       clear,         // abandon / acknowledge, back to IDLE
  output logic [3:0] count,         // round key number being written
  output logic       sel_user_key,  // mux: 1 = user key, 0 = key register
  output logic       reg_en,        // load the round-key register
  output logic       table_we,      // write a key-table entry
  output logic       rewind,        // return the write address to the top
  output logic       eoc            // all 11 keys are in the table
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      state <= IDLE;
      count <= '0;
    end else begin
      unique case (state)
        IDLE, DONE: if (start) begin
          state <= RUN;
          count <= 4'd1;
        end
        RUN: begin
          if (count == 4'(NUM_ROUNDS)) begin
            state <= DONE;
            count <= '0;
          end else begin
            count <= count + 4'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    sel_user_key = (state != RUN);
    table_we     = !clear && ((state == RUN) || start);
    reg_en       = table_we;
    eoc          = (state == DONE);
    rewind       = clear || ((state == DONE) && !start);
  end

endmodule
