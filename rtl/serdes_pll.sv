`timescale 1ns / 1ps
// serdes_pll: behavioural model (not synthesizable as a clock source) of the
// SerDes clock manager, a PLLE2_BASE with its output dividers in the FPGA.
//
// The real part multiplies a board clock up to the bit clock. The model
// takes the bit clock itself on clk_in (37.5 MHz for the link: DDR gives
// 75 Mbit/s) and passes it on as clk_5x (CLK of the serializers). It
// divides it by DIVIDE (5) into the word clock clk_1x (CLKDIV, 7.5 MHz, one
// 10-bit word per cycle) and its inverse clk_1x_n. clk_1x is high for
// DIVIDE/2 clk_5x periods and rises on a rising clk_5x edge, so the two
// clocks keep the phase relation of outputs of one PLL. locked rises
// LOCK_CYCLES clk_1x cycles after rst (active high) falls and drops with
// rst; the clocks stop while rst is high.
// Frequencies follow the link; the lock delay and the duty cycle of clk_1x
// are this model's own.
module serdes_pll #(
  parameter int unsigned DIVIDE      = 5,
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_1x,
  output logic clk_1x_n,
  output logic clk_5x,
  output logic locked
);

  logic [3:0] div_cnt;
  logic [3:0] lock_cnt;

  assign clk_5x   = clk_in & ~rst;
  assign clk_1x_n = ~clk_1x;

  always @(posedge clk_in or posedge rst) begin
    if (rst) begin
      div_cnt  <= '0;
      clk_1x   <= 1'b0;
      lock_cnt <= '0;
      locked   <= 1'b0;
    end else begin
      if (div_cnt == 4'(DIVIDE - 1)) div_cnt <= '0;
      else                           div_cnt <= div_cnt + 4'd1;
      // high during counts 0 .. DIVIDE/2-1 of the next period
      clk_1x <= (div_cnt == 4'(DIVIDE - 1)) || (div_cnt < 4'(DIVIDE / 2 - 1));
      if (div_cnt == 4'(DIVIDE - 1)) begin
        if (lock_cnt == 4'(LOCK_CYCLES)) locked   <= 1'b1;
        else                            lock_cnt <= lock_cnt + 4'd1;
      end
    end
  end

endmodule
