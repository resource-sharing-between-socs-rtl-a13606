`timescale 1ns / 1ps
// serdes_system: the SerDes system of one chip - everything between the
// chip's bus-side logic and its two differential pin pairs.
//
// Transmit path (SoC clock -> SerDes clock): bytes written into the TX
// async FIFO are framed by oserdes_ctrl (K27.7 start, bytes, K28.4 stop,
// K28.7 training when idle), 8b/10b encoded (running disparity kept in a
// register, symbol registered: one cycle of latency), serialized 10:1 by a
// master/slave OSERDESE2 pair at 75 Mbit/s (DDR on the 37.5 MHz clk_5x) and
// driven out through OBUFDS.
// Receive path: IBUFDS, a master/slave ISERDESE2 pair (or, with
// OFB_LOOPBACK = 1, the chip's own serializer output through the internal
// OFB path) gives 10-bit words; bitslip_ctrl aligns them on K28.7; the
// 10b/8b decoder feeds iserdes_ctrl, which writes the bytes found between
// start and stop into the RX async FIFO, read in the SoC clock domain.
// Clocks: ref_clk is the 37.5 MHz bit-clock reference; from it serdes_pll
// gives clk_1x (7.5 MHz, CLKDIV, the clock of the
// controllers, encoder and decoder) and clk_5x. The SerDes domain leaves
// reset two clk_1x cycles after both sys_rst_n is high and the PLL locked.
// Symbol bit 9 (code bit a) goes out first: it is OSERDES D1; the slave's D3
// and D4 carry bits 1 and 0. On receive the slave's Q4/Q3 are bits 9/8.
// rst_slow_n is the asynchronous reset of the SerDes-domain registers and
// also drives the RST pins of the serializer models, which those sample
// with their own clocks; a lint tool reports it as both synchronous and
// asynchronous. That is intended: it is released synchronously to clk_1x.
// The block structure, clocks and primitive configuration follow the
// documented SerDes system. RESP_ONLY (frame the TX stream as 4-byte read
// responses) is this design's way of letting the passive chip reuse the
// same framer.
module serdes_system
  import serdes_pkg::*;
#(
  parameter bit          RESP_ONLY     = 1'b0,
  parameter bit          OFB_LOOPBACK  = 1'b0,
  parameter int unsigned FIFO_DEPTH    = 8
) (
  input  logic           sys_clk,
  input  logic           sys_rst_n,
  input  logic           ref_clk,
  // TX FIFO write side (sys_clk)
  input  logic [7:0]     tx_fifo_din,
  input  logic           tx_fifo_wen,
  output logic           tx_fifo_full,
  // RX FIFO read side (sys_clk)
  output logic [7:0]     rx_fifo_dout,
  input  logic           rx_fifo_ren,
  output logic           rx_fifo_empty,
  // differential pads
  output logic           tx_p,
  output logic           tx_n,
  input  logic           rx_p,
  input  logic           rx_n,
  // status
  output logic           aligned_o,
  output bitslip_state_t bitslip_state_o,
  output logic           bitslip_o,
  output logic           code_err_o
);

  // ---------------- clocks and resets ----------------
  logic clk_1x, unused_clk_1x_n, clk_5x, locked;
  logic rst_s1, rst_slow_n;

  serdes_pll #(.DIVIDE(5)) u_pll (
    .clk_in (ref_clk),
    .rst    (!sys_rst_n),
    .clk_1x (clk_1x),
    .clk_1x_n(unused_clk_1x_n),
    .clk_5x (clk_5x),
    .locked (locked)
  );

  always_ff @(posedge clk_1x or negedge sys_rst_n) begin
    if (!sys_rst_n) {rst_slow_n, rst_s1} <= 2'b00;
    else            {rst_slow_n, rst_s1} <= {rst_s1, locked};
  end

  // ---------------- transmit path ----------------
  logic [7:0] txf_dout;
  logic       txf_empty, txf_ren;
  logic [7:0] tx_char;
  logic       tx_k;
  logic [9:0] enc_sym, tx_sym;
  logic       enc_rd, rd;
  logic [2:0] unused_oser_state;

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .w_en(tx_fifo_wen), .data_in(tx_fifo_din), .full(tx_fifo_full),
    .rclk(clk_1x),  .rrst_n(rst_slow_n), .r_en(txf_ren), .data_out(txf_dout), .empty(txf_empty)
  );

  oserdes_ctrl u_oser_ctrl (
    .clk(clk_1x), .rst_n(rst_slow_n), .resp_only(RESP_ONLY), .disp_i(enc_rd),
    .fifo_dout(txf_dout), .fifo_empty(txf_empty), .fifo_ren(txf_ren),
    .char_o(tx_char), .k_o(tx_k), .state_o(unused_oser_state)
  );

  enc_8b10b u_enc (
    .data_in(tx_char), .k_in(tx_k), .disp_in(rd), .data_out(enc_sym), .disp_out(enc_rd)
  );

  always_ff @(posedge clk_1x or negedge rst_slow_n) begin
    if (!rst_slow_n) begin
      rd     <= 1'b0;
      tx_sym <= K28_7_NEG;
    end else begin
      rd     <= enc_rd;
      tx_sym <= enc_sym;
    end
  end

  logic oser_shift1, oser_shift2, oq, ofb;
  logic unused_m_so1, unused_m_so2, unused_s_oq, unused_s_ofb;
  logic unused_tq_m, unused_tq_s, unused_tfb_m, unused_tfb_s, unused_tb_m, unused_tb_s;

  oserdese2_model #(.DATA_RATE_OQ("DDR"), .DATA_WIDTH(10), .SERDES_MODE("MASTER")) u_oserdes_m (
    .CLK(clk_5x), .CLKDIV(clk_1x),
    .D1(tx_sym[9]), .D2(tx_sym[8]), .D3(tx_sym[7]), .D4(tx_sym[6]),
    .D5(tx_sym[5]), .D6(tx_sym[4]), .D7(tx_sym[3]), .D8(tx_sym[2]),
    .OCE(1'b1), .RST(!rst_slow_n), .SHIFTIN1(oser_shift1), .SHIFTIN2(oser_shift2),
    .T1(1'b0), .T2(1'b0), .T3(1'b0), .T4(1'b0), .TBYTEIN(1'b0), .TCE(1'b0),
    .OFB(ofb), .OQ(oq), .SHIFTOUT1(unused_m_so1), .SHIFTOUT2(unused_m_so2),
    .TBYTEOUT(unused_tb_m), .TFB(unused_tfb_m), .TQ(unused_tq_m)
  );

  oserdese2_model #(.DATA_RATE_OQ("DDR"), .DATA_WIDTH(10), .SERDES_MODE("SLAVE")) u_oserdes_s (
    .CLK(clk_5x), .CLKDIV(clk_1x),
    .D1(1'b0), .D2(1'b0), .D3(tx_sym[1]), .D4(tx_sym[0]),
    .D5(1'b0), .D6(1'b0), .D7(1'b0), .D8(1'b0),
    .OCE(1'b1), .RST(!rst_slow_n), .SHIFTIN1(1'b0), .SHIFTIN2(1'b0),
    .T1(1'b0), .T2(1'b0), .T3(1'b0), .T4(1'b0), .TBYTEIN(1'b0), .TCE(1'b0),
    .OFB(unused_s_ofb), .OQ(unused_s_oq), .SHIFTOUT1(oser_shift1), .SHIFTOUT2(oser_shift2),
    .TBYTEOUT(unused_tb_s), .TFB(unused_tfb_s), .TQ(unused_tq_s)
  );

  obufds_model u_obufds (.I(oq), .O(tx_p), .OB(tx_n));

  // ---------------- receive path ----------------
  logic rx_se, iser_shift1, iser_shift2, unused_o_m, unused_o_s;
  logic unused_s_so1, unused_s_so2;
  logic [7:0] qm, qs;
  logic [9:0] rx_word;
  logic [7:0] dec_dat;
  logic       dec_k, dec_inv;
  logic [7:0] rxf_din;
  logic       rxf_wen, unused_rxf_full, unused_iser_state;

  ibufds_model u_ibufds (.I(rx_p), .IB(rx_n), .O(rx_se));

  iserdese2_model #(.DATA_RATE("DDR"), .DATA_WIDTH(10), .SERDES_MODE("MASTER"),
                    .OFB_USED(OFB_LOOPBACK ? "TRUE" : "FALSE")) u_iserdes_m (
    .BITSLIP(bitslip_o), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x),
    .CLKDIV(clk_1x), .CLKDIVP(1'b0), .D(rx_se), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0),
    .DYNCLKSEL(1'b0), .OCLK(1'b0), .OCLKB(1'b0), .OFB(ofb), .RST(!rst_slow_n),
    .SHIFTIN1(1'b0), .SHIFTIN2(1'b0), .O(unused_o_m),
    .Q1(qm[0]), .Q2(qm[1]), .Q3(qm[2]), .Q4(qm[3]), .Q5(qm[4]), .Q6(qm[5]), .Q7(qm[6]), .Q8(qm[7]),
    .SHIFTOUT1(iser_shift1), .SHIFTOUT2(iser_shift2)
  );

  iserdese2_model #(.DATA_RATE("DDR"), .DATA_WIDTH(10), .SERDES_MODE("SLAVE")) u_iserdes_s (
    .BITSLIP(bitslip_o), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x),
    .CLKDIV(clk_1x), .CLKDIVP(1'b0), .D(1'b0), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0),
    .DYNCLKSEL(1'b0), .OCLK(1'b0), .OCLKB(1'b0), .OFB(1'b0), .RST(!rst_slow_n),
    .SHIFTIN1(iser_shift1), .SHIFTIN2(iser_shift2), .O(unused_o_s),
    .Q1(qs[0]), .Q2(qs[1]), .Q3(qs[2]), .Q4(qs[3]), .Q5(qs[4]), .Q6(qs[5]), .Q7(qs[6]), .Q8(qs[7]),
    .SHIFTOUT1(unused_s_so1), .SHIFTOUT2(unused_s_so2)
  );

  assign rx_word = {qs[3], qs[2], qm};
  wire [5:0] unused_qs = {qs[7:4], qs[1:0]};  // slave outputs not used at 10 bits

  bitslip_ctrl u_bitslip (
    .clk(clk_1x), .rst_n(rst_slow_n), .q_i(rx_word),
    .bitslip_o(bitslip_o), .state_o(bitslip_state_o), .aligned_o(aligned_o)
  );

  dec_10b8b u_dec (.data_in(rx_word), .data_out(dec_dat), .k_out(dec_k), .invalid(dec_inv));

  iserdes_ctrl u_iser_ctrl (
    .clk(clk_1x), .rst_n(rst_slow_n), .dat_i(dec_dat), .k_i(dec_k), .aligned_i(aligned_o),
    .dat_o(rxf_din), .fifo_valid(rxf_wen), .state_o(unused_iser_state)
  );

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .wclk(clk_1x),  .wrst_n(rst_slow_n), .w_en(rxf_wen), .data_in(rxf_din), .full(unused_rxf_full),
    .rclk(sys_clk), .rrst_n(sys_rst_n), .r_en(rx_fifo_ren), .data_out(rx_fifo_dout), .empty(rx_fifo_empty)
  );

  // code error: invalid symbol seen while aligned (registered)
  always_ff @(posedge clk_1x or negedge rst_slow_n) begin
    if (!rst_slow_n) code_err_o <= 1'b0;
    else             code_err_o <= dec_inv && aligned_o;
  end

endmodule
