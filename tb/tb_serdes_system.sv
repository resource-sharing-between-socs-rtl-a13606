`timescale 1ns / 1ps
// tb_serdes_system: self-checking test of one chip's SerDes system in its
// internal loop-back setting (OFB_LOOPBACK = 1): the chip's serializer
// output is fed back into its own deserializer, so every frame the chip
// sends must come back into its RX FIFO.
// The test pushes write frames (10 bytes) and read frames (6 bytes) with
// random addresses and data into the TX FIFO from the 75 MHz SoC side,
// respecting tx_fifo_full, and pops the RX FIFO. Checks: the receiver
// aligns by bitslip after reset; every byte of every frame comes back in
// order and nothing else does; no code error is flagged once aligned; the
// TX FIFO fills up (the SoC side is ten times faster than the link); the
// transmit pads are complementary.
module tb_serdes_system;
  import serdes_pkg::*;
  logic sys_clk = 0, ref_clk = 0, sys_rst_n = 1;
  logic [7:0] tx_din = 0, rx_dout;
  logic tx_wen = 0, tx_full, rx_ren = 0, rx_empty;
  logic tx_p, tx_n, aligned, bitslip, code_err;
  bitslip_state_t bs_state;
  int checks = 0, failures = 0;
  int n_slips = 0, n_full = 0, n_err = 0;
  logic [7:0] expq [$];

  always #6.667  sys_clk = ~sys_clk;
  always #13.333 ref_clk = ~ref_clk;

  serdes_system #(.RESP_ONLY(1'b0), .OFB_LOOPBACK(1'b1)) dut (
    .sys_clk(sys_clk), .sys_rst_n(sys_rst_n), .ref_clk(ref_clk),
    .tx_fifo_din(tx_din), .tx_fifo_wen(tx_wen), .tx_fifo_full(tx_full),
    .rx_fifo_dout(rx_dout), .rx_fifo_ren(rx_ren), .rx_fifo_empty(rx_empty),
    .tx_p(tx_p), .tx_n(tx_n), .rx_p(1'b0), .rx_n(1'b0),
    .aligned_o(aligned), .bitslip_state_o(bs_state), .bitslip_o(bitslip), .code_err_o(code_err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge dut.clk_1x) begin
    if (bitslip) n_slips++;
    if (aligned && code_err) n_err++;
  end
  always @(posedge sys_clk) if (tx_full) n_full++;
  always @(posedge sys_clk) #0.5 if (sys_rst_n && dut.rst_slow_n) check(tx_p == ~tx_n, "complementary pads");

  // RX side: pop whenever not empty and compare with the expected bytes
  always @(negedge sys_clk) rx_ren <= !rx_empty;
  always @(posedge sys_clk) begin
    if (rx_ren && !rx_empty) begin
      if (expq.size() == 0) check(0, $sformatf("unexpected byte %h", rx_dout));
      else begin
        logic [7:0] e;
        e = expq.pop_front();
        check(rx_dout == e, $sformatf("byte %h expected %h", rx_dout, e));
      end
    end
  end

  task automatic push(input logic [7:0] b);
    @(negedge sys_clk);
    while (tx_full) @(negedge sys_clk);
    tx_din = b; tx_wen = 1;
    expq.push_back(b);
    @(negedge sys_clk);
    tx_wen = 0;
  endtask

  initial begin
    #3ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] d;
    #1 sys_rst_n = 0;
    #200 sys_rst_n = 1;
    wait (aligned);
    repeat (10) @(posedge dut.clk_1x);
    check(aligned, "aligned after reset");
    check(n_slips > 0 || dut.u_bitslip.state_o == BS_IDLE, "alignment search ran");
    for (int f = 0; f < 30; f++) begin
      d = $urandom;
      if ($urandom_range(0, 1)) begin
        push(CMD_WRITE); push(8'h01); push(8'h80); push(8'h00); push(8'h00);
        push({2'b00, 4'($urandom), 2'b00});
        push(d[31:24]); push(d[23:16]); push(d[15:8]); push(d[7:0]);
      end else begin
        push(CMD_READ); push(8'h01); push(8'h80); push(8'h00); push(8'h00);
        push({2'b00, 4'($urandom), 2'b00});
      end
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 200)) @(posedge sys_clk);
    end
    begin
      int n = 0;
      while (expq.size() != 0 && n < 20000) begin @(posedge sys_clk); n++; end
    end
    repeat (100) @(posedge sys_clk);
    check(expq.size() == 0, $sformatf("%0d bytes never came back", expq.size()));
    check(n_full > 0, "TX FIFO became full");
    check(n_err == 0, $sformatf("%0d code errors while aligned", n_err));
    $display("slips=%0d full=%0d", n_slips, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
