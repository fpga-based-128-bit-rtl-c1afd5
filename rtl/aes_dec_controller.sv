// aes_dec_controller: sequencer of the iterative AES-128 decryption datapath.
//
// A start pulse in IDLE (or DONE) is itself the first working cycle, count=0:
// the input mux takes the ciphertext (sel_feedback = 0), the state register
// loads ciphertext XOR key-table[0] (the last round key), and mix_en = 0 so
// InvMixColumns is bypassed. Then count = 1..9 are the nine full rounds
// (feedback through InvShiftRows/InvSubBytes, AddRoundKey with key-table[n],
// InvMixColumns, register load). At count = 10 the final round runs without
// InvMixColumns and its result is loaded into the output buffer (out_en).
// From the following cycle the controller is in DONE and eoc is high, i.e.
// 1 + 9 cycles of computation, one more to fill the output buffer, and eoc
// 11 cycles after the start cycle. The key-table read address is `count`.
//
// From the document: 1 + 9 round cycles, the plaintext stored after 10 and
// eoc one cycle later. My own choice: the three-state machine and the
// synchronous active-high reset.
module aes_dec_controller
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,        // one-cycle pulse
  input  logic       clear,        // back to IDLE, drop eoc
  output logic [3:0] count,        // iteration number = key-table read address
  output logic       sel_feedback, // mux: 0 = ciphertext, 1 = previous round
  output logic       mix_en,       // 1 = use InvMixColumns output
  output logic       state_en,     // load the round state register
  output logic       out_en,       // load the output buffer
  output logic       eoc
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
    sel_feedback = (state == RUN);
    mix_en       = (state == RUN) && (count != 4'(NUM_ROUNDS));
    state_en     = !clear && ((state == RUN) ? (count != 4'(NUM_ROUNDS)) : start);
    out_en       = !clear && (state == RUN) && (count == 4'(NUM_ROUNDS));
    eoc          = (state == DONE);
  end

endmodule
