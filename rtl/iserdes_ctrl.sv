`timescale 1ns / 1ps
// iserdes_ctrl: receive deframer of the SerDes link (SerDes clock domain).
//
// Every cycle the decoded character and its K flag are registered (r_dat,
// r_k). In IDLE the controller waits for the K27.7 start character, and
// accepts it only while the bitslip controller reports the channel aligned,
// so that a misaligned channel cannot open a frame. In DATA each data
// character (K = 0) is presented on dat_o with fifo_valid high, which is the
// write enable of the RX FIFO. The K28.4 stop character ends the frame
// without being forwarded and returns the controller to IDLE.
//
// Timing: dat_o/fifo_valid are driven from the registered character, one
// cycle after the character leaves the decoder. The two states, the start
// and stop characters and the alignment gate follow the documented
// controller. Dropping other control characters inside a frame (the
// transmitter's K28.7 filler) is this design's choice; the alignment gate
// uses a single "aligned" input, true in the bitslip controller's IDLE state.
module iserdes_ctrl
  import serdes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] dat_i,
  input  logic       k_i,
  input  logic       aligned_i,
  output logic [7:0] dat_o,
  output logic       fifo_valid,
  output logic       state_o     // 0 = IDLE, 1 = DATA
);

  typedef enum logic {IDLE = 1'b0, DATA = 1'b1} state_t;

  state_t     state;
  logic [7:0] r_dat;
  logic       r_k;
  logic       is_start, is_stop;

  assign is_start = r_k && (r_dat == K27_7_START);
  assign is_stop  = r_k && (r_dat == K28_4_STOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      r_dat <= '0;
      r_k   <= 1'b0;
    end else begin
      r_dat <= dat_i;
      r_k   <= k_i;
      unique case (state)
        IDLE: if (is_start && aligned_i) state <= DATA;
        DATA: if (is_stop)               state <= IDLE;
        default:                         state <= IDLE;
      endcase
    end
  end

  assign fifo_valid = (state == DATA) && !r_k;
  assign dat_o      = fifo_valid ? r_dat : 8'h00;
  assign state_o    = state;

endmodule
