`timescale 1ns / 1ps
// serdes_wb_master: bus master (DMA) of the passive chip that carries out
// the reads and writes arriving over the SerDes link (SoC clock domain).
//
// It pops the frame bytes from the RX FIFO in the order the link sends them:
// command (0x03 write, 0x04 read), length in 32-bit words, four address
// bytes (byte address, MSB first). For a write it then collects four data
// bytes (MSB first) and runs a Wishbone write; for a read it runs a
// Wishbone read and pushes the four bytes of the answer, MSB first, into the
// TX FIFO. Both repeat "length" times. The Wishbone address is the byte
// address with its two low bits dropped.
// Any other command byte is discarded and the parser waits for the next.
// FIFO flow control: nothing is popped while the RX FIFO is empty and
// nothing is pushed while the TX FIFO is full, so no protocol byte is lost.
// Wishbone: classic single cycles, sel = 4'hF, cyc and stb held until ack.
// The byte order, command codes, length/address fields and the FIFO flow
// control follow the documented design, which reuses the state machine of
// an existing UART bus bridge. A length of 0 is treated as 1 and the
// address advances by one word per word of a multi-word transfer; the
// document gives neither point, and the active chip always sends length 1.
// A lint tool reports rst_n as used both asynchronously and synchronously:
// the second use is only the disable condition of the built-in assertion.
module serdes_wb_master
  import serdes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // RX FIFO read side
  input  logic [7:0]  rx_fifo_dout,
  input  logic        rx_fifo_empty,
  output logic        rx_fifo_ren,
  // TX FIFO write side
  output logic [7:0]  tx_fifo_din,
  output logic        tx_fifo_wen,
  input  logic        tx_fifo_full,
  // Wishbone master
  output logic [29:0] wb_adr_o,
  output logic [31:0] wb_dat_o,
  input  logic [31:0] wb_dat_i,
  output logic [3:0]  wb_sel_o,
  output logic        wb_cyc_o,
  output logic        wb_stb_o,
  output logic        wb_we_o,
  input  logic        wb_ack_i,
  output logic [2:0]  state_o
);

  typedef enum logic [2:0] {
    CMD        = 3'd0,
    LENGTH     = 3'd1,
    ADDRESS    = 3'd2,
    DATA_WRITE = 3'd3,
    BUS_WRITE  = 3'd4,
    BUS_READ   = 3'd5,
    DATA_READ  = 3'd6
  } state_t;

  state_t      state;
  logic        is_write;
  logic [7:0]  words;
  logic [1:0]  bytecnt;
  logic [31:0] addr;
  logic [31:0] data;

  wire pop = rx_fifo_ren;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= CMD;
      is_write <= 1'b0;
      words    <= '0;
      bytecnt  <= '0;
      addr     <= '0;
      data     <= '0;
    end else begin
      unique case (state)
        CMD: if (pop) begin
          is_write <= (rx_fifo_dout == CMD_WRITE);
          if (rx_fifo_dout == CMD_WRITE || rx_fifo_dout == CMD_READ) state <= LENGTH;
        end
        LENGTH: if (pop) begin
          words   <= (rx_fifo_dout == 8'd0) ? 8'd1 : rx_fifo_dout;
          bytecnt <= '0;
          state   <= ADDRESS;
        end
        ADDRESS: if (pop) begin
          addr    <= {addr[23:0], rx_fifo_dout};
          bytecnt <= bytecnt + 1'b1;
          if (bytecnt == 2'd3) state <= is_write ? DATA_WRITE : BUS_READ;
        end
        DATA_WRITE: if (pop) begin
          data    <= {data[23:0], rx_fifo_dout};
          bytecnt <= bytecnt + 1'b1;
          if (bytecnt == 2'd3) state <= BUS_WRITE;
        end
        BUS_WRITE: if (wb_ack_i) begin
          addr  <= addr + 32'd4;
          words <= words - 1'b1;
          state <= (words == 8'd1) ? CMD : DATA_WRITE;
        end
        BUS_READ: if (wb_ack_i) begin
          data    <= wb_dat_i;
          bytecnt <= '0;
          state   <= DATA_READ;
        end
        DATA_READ: if (!tx_fifo_full) begin
          data    <= {data[23:0], 8'h00};
          bytecnt <= bytecnt + 1'b1;
          if (bytecnt == 2'd3) begin
            addr  <= addr + 32'd4;
            words <= words - 1'b1;
            state <= (words == 8'd1) ? CMD : BUS_READ;
          end
        end
        default: state <= CMD;
      endcase
    end
  end

  assign rx_fifo_ren = !rx_fifo_empty &&
                       ((state == CMD) || (state == LENGTH) ||
                        (state == ADDRESS) || (state == DATA_WRITE));
  assign tx_fifo_wen = (state == DATA_READ) && !tx_fifo_full;
  assign tx_fifo_din = data[31:24];

  assign wb_cyc_o = (state == BUS_WRITE) || (state == BUS_READ);
  assign wb_stb_o = wb_cyc_o;
  assign wb_we_o  = (state == BUS_WRITE);
  assign wb_adr_o = addr[31:2];
  assign wb_dat_o = data;
  assign wb_sel_o = 4'hF;
  assign state_o  = state;

  // Wishbone: once raised, stb stays up until the slave acknowledges
  a_stb_held: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_stb_o && !wb_ack_i) |=> wb_stb_o);

endmodule
