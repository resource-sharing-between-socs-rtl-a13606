`timescale 1ns / 1ps
// tb_serdes_wb_master: self-checking test of the passive chip's bus master.
// The RX FIFO is a queue the test fills with frame bytes, with random gaps;
// the TX FIFO is a queue that is held full at random; the Wishbone slave is
// a 16-word memory model (at word addresses 0x2000_0000..0x2000_000F) that
// acknowledges after a random wait. Checks: a write frame becomes one
// Wishbone write with the right word address, data and sel = 4'hF; a read
// frame becomes one Wishbone read whose answer is pushed MSB first; a
// two-word write and read advance the address; an unknown command byte is
// skipped; stb stays high until ack; no byte is pushed while the TX FIFO
// is full and none is lost.
module tb_serdes_wb_master;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_dout, tx_din;
  logic rx_empty, rx_ren, tx_wen, tx_full;
  logic [29:0] adr;
  logic [31:0] dat_w, dat_r;
  logic [3:0] sel;
  logic cyc, stb, we, ack = 0;
  logic [2:0] st;
  int checks = 0, failures = 0;
  logic [7:0] rxq [$], txq [$];
  logic [31:0] mem [16];
  int n_wr = 0, n_rd = 0, n_full_push = 0;
  logic [29:0] last_adr;
  bit hold_full = 0;

  always #6.667 clk = ~clk;

  serdes_wb_master dut (
    .clk(clk), .rst_n(rst_n), .rx_fifo_dout(rx_dout), .rx_fifo_empty(rx_empty),
    .rx_fifo_ren(rx_ren), .tx_fifo_din(tx_din), .tx_fifo_wen(tx_wen), .tx_fifo_full(tx_full),
    .wb_adr_o(adr), .wb_dat_o(dat_w), .wb_dat_i(dat_r), .wb_sel_o(sel), .wb_cyc_o(cyc),
    .wb_stb_o(stb), .wb_we_o(we), .wb_ack_i(ack), .state_o(st));

  assign rx_empty = (rxq.size() == 0);
  assign rx_dout  = rx_empty ? 8'h00 : rxq[0];
  assign tx_full  = hold_full;
  assign dat_r    = mem[adr[3:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // FIFO models; pops take effect after the clock edge
  logic rx_pop = 0;
  always @(negedge clk) if (rx_pop) begin void'(rxq.pop_front()); rx_pop <= 0; end
  always @(posedge clk) begin
    if (rx_ren && !rx_empty) rx_pop <= 1;
    if (rx_ren && rx_empty) check(0, "pop from empty RX FIFO");
    if (tx_wen) begin
      if (tx_full) n_full_push++;
      else txq.push_back(tx_din);
    end
  end
  always @(negedge clk) hold_full <= ($urandom_range(0, 3) == 0);

  // Wishbone memory with random wait; stb must be held until ack
  int wait_n = 0;
  bit was_stb = 0, was_ack = 0;
  always @(posedge clk) begin
    if (was_stb && !was_ack && !stb) check(0, "stb dropped before ack");
    was_stb <= stb;
    was_ack <= ack;
    ack <= 1'b0;
    if (cyc && stb && !ack) begin
      if (wait_n == 0) begin
        ack <= 1'b1;
        last_adr <= adr;
        check(sel == 4'hF, "sel = 4'hF");
        check(adr[29:4] == 26'h200_0000, $sformatf("address %h in window", adr));
        if (we) begin mem[adr[3:0]] <= dat_w; n_wr++; end
        else n_rd++;
        wait_n <= $urandom_range(0, 3);
      end else wait_n <= wait_n - 1;
    end
  end

  task automatic send(input logic [7:0] b[$]);
    foreach (b[i]) begin
      @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      rxq.push_back(b[i]);
    end
  endtask

  function automatic logic [7:0] wa(input logic [3:0] a);
    return {2'b00, a, 2'b00};
  endfunction

  task automatic drain(input int n);
    int k = 0;
    while (rxq.size() != 0 || st != 0 || k < n) begin @(posedge clk); k++; if (k > 5000) break; end
  endtask

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [3:0] a;
    foreach (mem[i]) mem[i] = 32'h0;
    #40 rst_n = 1;

    // single write
    send('{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, wa(4'd5), 8'hDE, 8'hAD, 8'hBE, 8'hEF});
    drain(20);
    check(mem[5] == 32'hDEADBEEF, $sformatf("write mem[5]=%h", mem[5]));
    check(last_adr == 30'h2000_0005, $sformatf("write word address %h", last_adr));

    // single read
    mem[3] = 32'h1122_3344;
    send('{8'h04, 8'h01, 8'h80, 8'h00, 8'h00, wa(4'd3)});
    drain(40);
    check(txq.size() == 4, $sformatf("read answer %0d bytes", txq.size()));
    if (txq.size() == 4)
      check({txq[0], txq[1], txq[2], txq[3]} == 32'h1122_3344, "read answer MSB first");
    txq.delete();

    // unknown command byte is skipped, then a write works
    send('{8'h55, 8'h03, 8'h01, 8'h80, 8'h00, 8'h00, wa(4'd7), 8'h01, 8'h02, 8'h03, 8'h04});
    drain(20);
    check(mem[7] == 32'h01020304, $sformatf("write after junk mem[7]=%h", mem[7]));

    // two-word write and read advance the address
    send('{8'h03, 8'h02, 8'h80, 8'h00, 8'h00, wa(4'd8), 8'hA0, 8'hA1, 8'hA2, 8'hA3,
           8'hB0, 8'hB1, 8'hB2, 8'hB3});
    drain(20);
    check(mem[8] == 32'hA0A1A2A3 && mem[9] == 32'hB0B1B2B3, "two-word write");
    send('{8'h04, 8'h02, 8'h80, 8'h00, 8'h00, wa(4'd8)});
    drain(60);
    check(txq.size() == 8, $sformatf("two-word read %0d bytes", txq.size()));
    if (txq.size() == 8)
      check({txq[0], txq[1], txq[2], txq[3], txq[4], txq[5], txq[6], txq[7]} ==
            64'hA0A1A2A3_B0B1B2B3, "two-word read data");
    txq.delete();

    // random single-word traffic
    for (int i = 0; i < 40; i++) begin
      a = 4'($urandom);
      d = $urandom;
      if ($urandom_range(0, 1)) begin
        send('{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, wa(a), d[31:24], d[23:16], d[15:8], d[7:0]});
        drain(20);
        check(mem[a] == d, $sformatf("random write mem[%0d]", a));
      end else begin
        send('{8'h04, 8'h01, 8'h80, 8'h00, 8'h00, wa(a)});
        drain(40);
        check(txq.size() == 4 && {txq[0], txq[1], txq[2], txq[3]} == mem[a],
              $sformatf("random read mem[%0d]", a));
        txq.delete();
      end
    end

    check(n_full_push == 0, $sformatf("%0d pushes into a full TX FIFO", n_full_push));
    check(n_wr > 0 && n_rd > 0, "both bus writes and reads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
