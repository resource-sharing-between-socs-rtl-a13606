`timescale 1ns / 1ps
// oserdes_ctrl: transmit framer of the SerDes link (SerDes clock domain).
//
// Decides, every SerDes clock cycle, which character goes to the 8b/10b
// encoder and from there to the serializer:
//   INIT        sends K28.7 for INIT_CYCLES+1 cycles after reset;
//   IDLE        sends the K28.7 training pattern while the TX FIFO is empty;
//               if the running disparity is positive (after a frame) it
//               first sends one K28.5, which turns it negative, so that the
//               training stream is always 0011111000 repeated;
//   SEND_START  sends the K27.7 start character once the FIFO holds data;
//   SAMPLE_CMD  pops the command byte and sends it as data; the command
//               fixes how many bytes follow (write 0x03: 9, read 0x04: 5);
//   SAMPLE      pops and sends that many bytes;
//   SEND_STOP   sends the K28.4 stop character and returns to IDLE.
// With resp_only = 1 (the passive chip, whose TX FIFO only carries read
// data) every frame is four bytes and the first byte is not interpreted.
// A byte whose value is neither command opens a one-byte frame.
//
// Timing: char_o/k_o are registered and change one cycle after the state
// that chose them; one character per cycle, so a write frame occupies 12
// consecutive cycles when the FIFO keeps up. fifo_ren is combinational and
// pops the FIFO head (show-ahead FIFO) in the cycle its byte is chosen.
// The state sequence, the 15-cycle INIT count, the characters and the
// command codes follow the documented controller. This design's own choices:
// the K28.5 disparity fix in IDLE (K28.7 is disparity-neutral, and its two
// forms are each other rotated by five bits, so the receiver could not
// otherwise tell a correct alignment from one five bits off);
// while the FIFO runs dry inside a frame the controller pauses and sends
// K28.7 as filler (the receiver drops control characters inside a frame),
// the counts are of bytes after the command rather than the counter values
// of the documented chart, and the resp_only mode.
// A lint tool reports rst_n as used both asynchronously and synchronously:
// the second use is only the disable condition of the built-in assertion.
module oserdes_ctrl
  import serdes_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       resp_only,
  input  logic       disp_i,      // running disparity after char_o (1 = +)
  input  logic [7:0] fifo_dout,
  input  logic       fifo_empty,
  output logic       fifo_ren,
  output logic [7:0] char_o,
  output logic       k_o,
  output logic [2:0] state_o
);

  typedef enum logic [2:0] {
    INIT       = 3'd0,
    IDLE       = 3'd1,
    SEND_START = 3'd2,
    SAMPLE_CMD = 3'd3,
    SAMPLE     = 3'd4,
    SEND_STOP  = 3'd5
  } state_t;

  state_t     state, state_n;
  logic [4:0] counter, counter_n;
  logic [3:0] target, target_n;
  logic [7:0] char_n;
  logic       k_n;

  always_comb begin
    state_n   = state;
    counter_n = counter;
    target_n  = target;
    char_n    = K28_7_TRAIN;
    k_n       = 1'b1;
    fifo_ren  = 1'b0;
    unique case (state)
      INIT: begin
        if (counter == 5'(INIT_CYCLES)) begin
          counter_n = '0;
          state_n   = IDLE;
        end else begin
          counter_n = counter + 1'b1;
        end
      end
      IDLE: begin
        // keep the idle stream in the RD- form of K28.7: K28.5 flips RD
        if (disp_i) char_n = K28_5_COMMA;
        if (!fifo_empty) state_n = SEND_START;
      end
      SEND_START: begin
        char_n  = K27_7_START;
        state_n = SAMPLE_CMD;
      end
      SAMPLE_CMD: begin
        if (!fifo_empty) begin
          fifo_ren  = 1'b1;
          char_n    = fifo_dout;
          k_n       = 1'b0;
          counter_n = '0;
          if (resp_only)                   target_n = 4'(RESP_TAIL);
          else if (fifo_dout == CMD_WRITE) target_n = 4'(WRITE_TAIL);
          else if (fifo_dout == CMD_READ)  target_n = 4'(READ_TAIL);
          else                             target_n = 4'd0;
          if (!resp_only && fifo_dout != CMD_WRITE && fifo_dout != CMD_READ)
            state_n = SEND_STOP;
          else
            state_n = SAMPLE;
        end
      end
      SAMPLE: begin
        if (!fifo_empty) begin
          fifo_ren  = 1'b1;
          char_n    = fifo_dout;
          k_n       = 1'b0;
          counter_n = counter + 1'b1;
          if (counter + 1'b1 == 5'(target)) begin
            counter_n = '0;
            state_n   = SEND_STOP;
          end
        end
      end
      SEND_STOP: begin
        char_n  = K28_4_STOP;
        state_n = IDLE;
      end
      default: state_n = INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= INIT;
      counter <= '0;
      target  <= '0;
      char_o  <= K28_7_TRAIN;
      k_o     <= 1'b1;
    end else begin
      state   <= state_n;
      counter <= counter_n;
      target  <= target_n;
      char_o  <= char_n;
      k_o     <= k_n;
    end
  end

  assign state_o = state;

  // A pop is only ever requested while the FIFO holds data
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_ren |-> !fifo_empty);

endmodule
