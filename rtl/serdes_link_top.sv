`timescale 1ns / 1ps
// serdes_link_top: two chips that share resources over a dedicated SerDes
// channel.
//
// Chip A (the "active" SoC, e.g. the accelerator chip) exposes a Wishbone
// slave: a CPU read or write on it becomes a Command/Length/Address(/Data)
// frame on A's serial transmitter. Chip B (the "passive" SoC, e.g. the chip
// with the large memory) receives the frame, replays it as a Wishbone
// master access on its own bus, and for a read sends the 32-bit answer back
// on its transmitter; A then acknowledges the CPU with that word.
//   A: serdes_bus_slave -> serdes_system (RESP_ONLY = 0)
//   B: serdes_system (RESP_ONLY = 1) -> serdes_wb_master
// A's tx pair is meant to drive B's rx pair and B's tx pair A's rx pair;
// the wires of the channel (twisted pairs) are outside this module so that
// a test bench can give them a delay. Each chip has its own SoC clock,
// reference clock and reset. The remote window is 16 words from
// 0x8000_0000 on chip B's bus.
// The structure follows the documented two-chip setup; the CPUs, memories
// and other peripherals of the two SoCs are not part of this module and
// appear only as the two Wishbone ports.
// A lint tool reports the two sys_rst_n inputs as used both asynchronously
// and synchronously, for the same reasons as inside serdes_system and the bus
// modules (assertion disable conditions and the serializer models' reset
// pins); this is intended.
module serdes_link_top
  import serdes_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  // chip A
  input  logic        a_sys_clk,
  input  logic        a_sys_rst_n,
  input  logic        a_ref_clk,
  input  logic        a_wb_cyc,
  input  logic        a_wb_stb,
  input  logic        a_wb_we,
  input  logic [3:0]  a_wb_adr,
  input  logic [31:0] a_wb_dat_w,
  output logic [31:0] a_wb_dat_r,
  output logic        a_wb_ack,
  output logic        a_tx_p,
  output logic        a_tx_n,
  input  logic        a_rx_p,
  input  logic        a_rx_n,
  output logic        a_aligned,
  output logic [1:0]  a_bitslip_state,
  output logic        a_bitslip,
  output logic [2:0]  a_bus_state,
  // chip B
  input  logic        b_sys_clk,
  input  logic        b_sys_rst_n,
  input  logic        b_ref_clk,
  output logic [29:0] b_wb_adr,
  output logic [31:0] b_wb_dat_w,
  input  logic [31:0] b_wb_dat_r,
  output logic [3:0]  b_wb_sel,
  output logic        b_wb_cyc,
  output logic        b_wb_stb,
  output logic        b_wb_we,
  input  logic        b_wb_ack,
  output logic        b_tx_p,
  output logic        b_tx_n,
  input  logic        b_rx_p,
  input  logic        b_rx_n,
  output logic        b_aligned,
  output logic [1:0]  b_bitslip_state,
  output logic        b_bitslip,
  output logic [2:0]  b_dma_state,
  output logic        code_err
);

  // ---------------- chip A ----------------
  logic [7:0] a_txf_din, a_rxf_dout;
  logic       a_txf_wen, a_txf_full, a_rxf_ren, a_rxf_empty, a_code_err;
  bitslip_state_t a_bs;

  serdes_bus_slave u_a_bus (
    .clk(a_sys_clk), .rst_n(a_sys_rst_n),
    .wb_cyc_i(a_wb_cyc), .wb_stb_i(a_wb_stb), .wb_we_i(a_wb_we), .wb_adr_i(a_wb_adr),
    .wb_dat_i(a_wb_dat_w), .wb_dat_o(a_wb_dat_r), .wb_ack_o(a_wb_ack),
    .tx_fifo_din(a_txf_din), .tx_fifo_wen(a_txf_wen), .tx_fifo_full(a_txf_full),
    .rx_fifo_dout(a_rxf_dout), .rx_fifo_ren(a_rxf_ren), .rx_fifo_empty(a_rxf_empty),
    .state_o(a_bus_state)
  );

  serdes_system #(.RESP_ONLY(1'b0), .FIFO_DEPTH(FIFO_DEPTH)) u_a_serdes (
    .sys_clk(a_sys_clk), .sys_rst_n(a_sys_rst_n), .ref_clk(a_ref_clk),
    .tx_fifo_din(a_txf_din), .tx_fifo_wen(a_txf_wen), .tx_fifo_full(a_txf_full),
    .rx_fifo_dout(a_rxf_dout), .rx_fifo_ren(a_rxf_ren), .rx_fifo_empty(a_rxf_empty),
    .tx_p(a_tx_p), .tx_n(a_tx_n), .rx_p(a_rx_p), .rx_n(a_rx_n),
    .aligned_o(a_aligned), .bitslip_state_o(a_bs), .bitslip_o(a_bitslip), .code_err_o(a_code_err)
  );
  assign a_bitslip_state = a_bs;

  // ---------------- chip B ----------------
  logic [7:0] b_txf_din, b_rxf_dout;
  logic       b_txf_wen, b_txf_full, b_rxf_ren, b_rxf_empty, b_code_err;
  bitslip_state_t b_bs;

  serdes_system #(.RESP_ONLY(1'b1), .FIFO_DEPTH(FIFO_DEPTH)) u_b_serdes (
    .sys_clk(b_sys_clk), .sys_rst_n(b_sys_rst_n), .ref_clk(b_ref_clk),
    .tx_fifo_din(b_txf_din), .tx_fifo_wen(b_txf_wen), .tx_fifo_full(b_txf_full),
    .rx_fifo_dout(b_rxf_dout), .rx_fifo_ren(b_rxf_ren), .rx_fifo_empty(b_rxf_empty),
    .tx_p(b_tx_p), .tx_n(b_tx_n), .rx_p(b_rx_p), .rx_n(b_rx_n),
    .aligned_o(b_aligned), .bitslip_state_o(b_bs), .bitslip_o(b_bitslip), .code_err_o(b_code_err)
  );
  assign b_bitslip_state = b_bs;

  serdes_wb_master u_b_dma (
    .clk(b_sys_clk), .rst_n(b_sys_rst_n),
    .rx_fifo_dout(b_rxf_dout), .rx_fifo_empty(b_rxf_empty), .rx_fifo_ren(b_rxf_ren),
    .tx_fifo_din(b_txf_din), .tx_fifo_wen(b_txf_wen), .tx_fifo_full(b_txf_full),
    .wb_adr_o(b_wb_adr), .wb_dat_o(b_wb_dat_w), .wb_dat_i(b_wb_dat_r), .wb_sel_o(b_wb_sel),
    .wb_cyc_o(b_wb_cyc), .wb_stb_o(b_wb_stb), .wb_we_o(b_wb_we), .wb_ack_i(b_wb_ack),
    .state_o(b_dma_state)
  );

  assign code_err = a_code_err | b_code_err;

endmodule
