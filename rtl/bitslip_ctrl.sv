`timescale 1ns / 1ps
// bitslip_ctrl: word alignment of the deserializer (SerDes clock domain).
//
// The transmitter sends the K28.7 training pattern whenever it is idle. This
// controller watches the raw 10-bit word q_i of the deserializer:
//   INIT     waits INIT_CYCLES+1 cycles after reset;
//   BITSLIP  raises bitslip_o for exactly one cycle, moving the word
//            boundary of the deserializer by one bit;
//   WAIT     waits WAIT_CYCLES+1 cycles for the shifted word to appear, then
//            compares q_i with K28.7 in its negative-disparity form
//            (0011111000); on a match it goes to IDLE, otherwise back to
//            BITSLIP;
//   IDLE     the channel is aligned. If q_i equals K28.7 rotated by one bit
//            in either direction (the receiver clock has drifted by one bit)
//            it starts a new BITSLIP/WAIT search.
// aligned_o is high in IDLE only; the receive deframer uses it to decide
// whether a start character can be trusted.
// The states, counts (16 init cycles, one-cycle pulse, 3-cycle wait) and the
// drift patterns follow the documented controller chart. The chart also
// accepts the positive-disparity form 1100000111 as aligned; this design
// does not, because that word is exactly what an RD- K28.7 stream looks like
// five bits off. the state
// numbering (INIT 0, BITSLIP 1, WAIT 2, IDLE 3) matches the recorded
// waveforms for BITSLIP and WAIT and is otherwise this design's choice.
module bitslip_ctrl
  import serdes_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 15,
  parameter int unsigned WAIT_CYCLES = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [9:0]     q_i,
  output logic           bitslip_o,
  output bitslip_state_t state_o,
  output logic           aligned_o
);

  bitslip_state_t state;
  logic [4:0]     counter;
  logic           is_train, is_shifted;

  // Only the RD- form: a stream of RD- K28.7 seen five bits off reads as the
  // RD+ form, so accepting both would allow a half-word misalignment. The
  // transmitter keeps its idle stream in the RD- form (see oserdes_ctrl).
  assign is_train   = (q_i == K28_7_NEG);
  // K28.7 rotated left or right by one bit
  assign is_shifted = (q_i == {K28_7_NEG[8:0], K28_7_NEG[9]}) ||
                      (q_i == {K28_7_NEG[0], K28_7_NEG[9:1]}) ||
                      (q_i == {K28_7_POS[8:0], K28_7_POS[9]}) ||
                      (q_i == {K28_7_POS[0], K28_7_POS[9:1]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= BS_INIT;
      counter <= '0;
    end else begin
      unique case (state)
        BS_INIT: begin
          if (counter == 5'(INIT_CYCLES)) begin
            counter <= '0;
            state   <= BS_BITSLIP;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        BS_BITSLIP: state <= BS_WAIT;
        BS_WAIT: begin
          if (counter == 5'(WAIT_CYCLES)) begin
            counter <= '0;
            state   <= is_train ? BS_IDLE : BS_BITSLIP;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        BS_IDLE: if (is_shifted) state <= BS_BITSLIP;
        default: state <= BS_INIT;
      endcase
    end
  end

  assign bitslip_o = (state == BS_BITSLIP);
  assign aligned_o = (state == BS_IDLE);
  assign state_o   = state;

endmodule
