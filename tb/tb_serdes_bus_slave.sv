`timescale 1ns / 1ps
// tb_serdes_bus_slave: self-checking test of the active chip's Wishbone
// slave. A Wishbone master task issues writes and reads; the TX FIFO is a
// queue model that can be held full; the RX FIFO is a queue the test fills
// with the "remote" answer. Checks:
//  - write: ack seen at the third clock edge after the request (IDLE,
//    WRITE, ack), before the bytes leave, then exactly 03 01 80 00 00 {adr,00} d3 d2 d1 d0 pushed;
//  - state sequence IDLE(0) -> WRITE(1) -> TX(3) -> INIT(6) -> IDLE(0);
//  - read: 04 01 80 00 00 {adr,00} pushed, no acknowledge until four bytes
//    come back, then ack with the word assembled MSB first;
//  - the pushes wait while the TX FIFO is full, without losing a byte.
// Frame bytes, memory map and ack timing follow the document's bus-slave
// description; the TX-full stall is this design's own.
module tb_serdes_bus_slave;
  logic clk = 0, rst_n;
  logic cyc, stb, we, ack;
  logic [3:0] adr;
  logic [31:0] dat_w, dat_r;
  logic [7:0] tx_din, rx_dout;
  logic tx_wen, tx_full, rx_ren, rx_empty;
  logic [2:0] st;
  int checks = 0, failures = 0;
  logic [7:0] txq [$], rxq [$];
  bit hold_full;
  int st_trace [$];

  always #6.667 clk = ~clk;

  serdes_bus_slave dut (
    .clk(clk), .rst_n(rst_n), .wb_cyc_i(cyc), .wb_stb_i(stb), .wb_we_i(we), .wb_adr_i(adr),
    .wb_dat_i(dat_w), .wb_dat_o(dat_r), .wb_ack_o(ack),
    .tx_fifo_din(tx_din), .tx_fifo_wen(tx_wen), .tx_fifo_full(tx_full),
    .rx_fifo_dout(rx_dout), .rx_fifo_ren(rx_ren), .rx_fifo_empty(rx_empty), .state_o(st));

  assign tx_full  = hold_full;
  assign rx_empty = (rxq.size() == 0);
  assign rx_dout  = rx_empty ? 8'h00 : rxq[0];
  // pops take effect after the clock edge, like a FIFO's read pointer
  logic rx_pop = 0;
  always @(negedge clk) if (rx_pop) begin void'(rxq.pop_front()); rx_pop <= 0; end
  always @(posedge clk) begin
    if (tx_wen) begin
      check(!tx_full, "push while full");
      txq.push_back(tx_din);
    end
    if (rx_ren && rxq.size() > 0) rx_pop <= 1;
    if (rst_n && (st_trace.size() == 0 || st_trace[$] != int'(st))) st_trace.push_back(int'(st));
  end

  function automatic bit same(input logic [7:0] a[$], input logic [7:0] b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Wishbone classic master; returns cycles until ack and read data
  task automatic wb(input logic w, input logic [3:0] a, input logic [31:0] d,
                    output int cycles, output logic [31:0] rdata);
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!ack && cycles < 5000);
    rdata = dat_r;
    @(negedge clk);
    cyc = 0; stb = 0; we = 0;
  endtask

  initial begin
    #3000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [31:0] rd;
    logic [7:0] exp [$];
    rst_n = 0; cyc = 0; stb = 0; we = 0; adr = 0; dat_w = 0; hold_full = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk);
    // write
    st_trace.delete();
    wb(1, 4'h2, 32'h1122_3344, n, rd);
    check(n == 3, $sformatf("write acknowledged after %0d cycles", n));
    repeat (20) @(posedge clk);
    exp = '{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, 8'h08, 8'h11, 8'h22, 8'h33, 8'h44};
    check(same(txq, exp), $sformatf("write frame bytes (%0d)", txq.size()));
    check(st_trace.size() == 5 && st_trace[0] == 0 && st_trace[1] == 1 && st_trace[2] == 3 && st_trace[3] == 6 && st_trace[4] == 0, $sformatf("state sequence %p", st_trace));
    txq.delete();
    // read: answer injected after a delay
    fork
      wb(0, 4'hF, 32'h0, n, rd);
      begin
        repeat (40) @(posedge clk);
        check(!ack, "no ack before the answer");
        exp = '{8'h04, 8'h01, 8'h80, 8'h00, 8'h00, 8'h3C};
        check(same(txq, exp), $sformatf("read frame bytes (%0d)", txq.size()));
        check(st == 3'd5, "waiting in RECEIVE");
        @(negedge clk);
        rxq = '{8'hDE, 8'hAD, 8'hBE, 8'hEF};
      end
    join
    check(rd == 32'hDEAD_BEEF, $sformatf("read data %08h", rd));
    check(n > 40 && n < 50, $sformatf("read took %0d cycles", n));
    txq.delete();
    // write with the TX FIFO held full for a while
    fork
      wb(1, 4'h1, 32'hCAFE_F00D, n, rd);
      begin
        @(negedge clk); hold_full = 1;
        repeat (30) @(negedge clk);
        check(txq.size() == 0, "nothing pushed while full");
        hold_full = 0;
      end
    join
    repeat (20) @(posedge clk);
    exp = '{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, 8'h04, 8'hCA, 8'hFE, 8'hF0, 8'h0D};
    check(same(txq, exp), "write frame after back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
