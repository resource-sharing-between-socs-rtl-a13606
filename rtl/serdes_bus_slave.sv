`timescale 1ns / 1ps
// serdes_bus_slave: Wishbone slave through which the CPU of the active chip
// reaches the bus of the other chip (SoC clock domain).
//
// A local memory of 14 bytes holds one transaction:
//   mem[0]      command, 0x03 write / 0x04 read
//   mem[1]      length, 0x01 (one 32-bit word)
//   mem[2..5]   remote byte address, MSB first: REMOTE_BASE + 4*wb_adr_i
//   mem[6..9]   write data, MSB first
//   mem[10..13] read data returned by the other chip, MSB first
// State machine (state numbers as in the recorded waveforms):
//   IDLE(0)   waits for cyc & stb;
//   WRITE(1)  stores address and data and acknowledges the CPU at once;
//   READ(2)   stores the address (no acknowledge yet);
//   TX(3)     pushes mem[0..9] into the TX FIFO, one byte per cycle;
//   RX(4)     pushes mem[0..5] into the TX FIFO;
//   RECEIVE(5) pops four bytes from the RX FIFO into mem[10..13], then
//             acknowledges the CPU with the assembled word on wb_dat_o;
//   INIT(6)   one cycle of clean-up before IDLE.
// A write therefore costs the CPU one wait cycle; a read holds the bus until
// the answer has crossed the link twice.
// The memory map, the state sequence, the fixed address bytes 0x80,0x00,0x00
// and the byte order follow the documented interface. This design's own
// choices: a push waits while the TX FIFO is full (the documented FIFO has 8
// entries, fewer than a write frame); wb_dat_o is valid in the acknowledge
// cycle itself, as the Wishbone rules require; there is no read timeout.
// A lint tool reports rst_n as used both asynchronously and synchronously:
// the second use is only the disable condition of the built-in assertion.
module serdes_bus_slave
  import serdes_pkg::*;
#(
  parameter logic [31:0] REMOTE_BASE = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // Wishbone slave
  input  logic        wb_cyc_i,
  input  logic        wb_stb_i,
  input  logic        wb_we_i,
  input  logic [3:0]  wb_adr_i,
  input  logic [31:0] wb_dat_i,
  output logic [31:0] wb_dat_o,
  output logic        wb_ack_o,
  // TX FIFO write side
  output logic [7:0]  tx_fifo_din,
  output logic        tx_fifo_wen,
  input  logic        tx_fifo_full,
  // RX FIFO read side
  input  logic [7:0]  rx_fifo_dout,
  output logic        rx_fifo_ren,
  input  logic        rx_fifo_empty,
  output logic [2:0]  state_o
);

  typedef enum logic [2:0] {
    IDLE    = 3'd0,
    WRITE   = 3'd1,
    READ    = 3'd2,
    TX      = 3'd3,
    RX      = 3'd4,
    RECEIVE = 3'd5,
    INIT    = 3'd6
  } state_t;

  state_t     state;
  logic [7:0] mem [14];
  logic [3:0] counter;
  logic [31:0] addr;

  assign addr = REMOTE_BASE + {26'd0, wb_adr_i, 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= INIT;
      counter  <= '0;
      wb_ack_o <= 1'b0;
      for (int i = 0; i < 14; i++) mem[i] <= '0;
    end else begin
      wb_ack_o <= 1'b0;
      unique case (state)
        INIT: begin
          counter <= '0;
          state   <= IDLE;
        end
        IDLE: begin
          if (wb_cyc_i && wb_stb_i) state <= wb_we_i ? WRITE : READ;
        end
        WRITE: begin
          mem[0] <= CMD_WRITE;
          mem[1] <= 8'h01;
          {mem[2], mem[3], mem[4], mem[5]} <= addr;
          {mem[6], mem[7], mem[8], mem[9]} <= wb_dat_i;
          wb_ack_o <= 1'b1;
          counter  <= '0;
          state    <= TX;
        end
        READ: begin
          mem[0] <= CMD_READ;
          mem[1] <= 8'h01;
          {mem[2], mem[3], mem[4], mem[5]} <= addr;
          counter <= '0;
          state   <= RX;
        end
        TX: begin
          if (!tx_fifo_full) begin
            if (counter == 4'd9) begin
              counter <= '0;
              state   <= INIT;
            end else begin
              counter <= counter + 1'b1;
            end
          end
        end
        RX: begin
          if (!tx_fifo_full) begin
            if (counter == 4'd5) begin
              counter <= 4'd10;
              state   <= RECEIVE;
            end else begin
              counter <= counter + 1'b1;
            end
          end
        end
        RECEIVE: begin
          if (!rx_fifo_empty) begin
            mem[counter] <= rx_fifo_dout;
            if (counter == 4'd13) begin
              counter  <= '0;
              wb_ack_o <= 1'b1;
              state    <= INIT;
            end else begin
              counter <= counter + 1'b1;
            end
          end
        end
        default: state <= INIT;
      endcase
    end
  end

  assign tx_fifo_wen = ((state == TX) || (state == RX)) && !tx_fifo_full;
  assign tx_fifo_din = mem[counter];
  assign rx_fifo_ren = (state == RECEIVE) && !rx_fifo_empty;
  assign wb_dat_o    = {mem[10], mem[11], mem[12], mem[13]};
  assign state_o     = state;

  // Wishbone: acknowledge only inside a cycle the master holds
  a_ack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    wb_ack_o |-> (wb_cyc_i && wb_stb_i));

endmodule
