`timescale 1ns / 1ps
// tb_async_fifo: self-checking test of the dual-clock FIFO.
// Write clock 75 MHz and read clock 7.5 MHz (the TX direction), then the
// clocks swapped (the RX direction). Checks: empty after reset; full after
// exactly DEPTH writes with no reads, writes while full ignored; data leave
// in order with nothing lost or duplicated under random write and read
// enables (scoreboard queue); empty again at the end.
// Expected behaviour (no loss, order kept, full/empty flags) is the FIFO's
// documented role; the clock ratios and random traffic are this test's own.
module tb_async_fifo;
  localparam int DEPTH = 8;
  logic fast_clk = 0, slow_clk = 0;
  logic swap = 0;
  logic wclk, rclk;
  logic wrst_n, rrst_n, w_en, r_en, full, empty;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  logic [7:0] sb [$];

  always #6.667 fast_clk = ~fast_clk;
  always #66.67 slow_clk = ~slow_clk;
  assign wclk = swap ? slow_clk : fast_clk;
  assign rclk = swap ? fast_clk : slow_clk;

  async_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst_n(wrst_n), .w_en(w_en), .data_in(din), .full(full),
    .rclk(rclk), .rrst_n(rrst_n), .r_en(r_en), .data_out(dout), .empty(empty));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int n_written;
  bit write_go;
  always @(posedge wclk) begin
    if (write_go && wrst_n) begin
      if (w_en && !full) begin
        sb.push_back(din);
        n_written++;
      end
      w_en <= ($urandom % 3 != 0);
      din  <= 8'($urandom);
    end else begin
      w_en <= 0;
    end
  end

  // reader
  bit read_go;
  int n_read;
  always @(posedge rclk) begin
    if (read_go && rrst_n) begin
      if (r_en && !empty) begin
        check(sb.size() > 0, "read with nothing written");
        if (sb.size() > 0) begin
          logic [7:0] e;
          e = sb.pop_front();
          check(dout == e, $sformatf("read %02h expected %02h", dout, e));
        end
        n_read++;
      end
      r_en <= ($urandom % 4 != 0);
    end else begin
      r_en <= 0;
    end
  end

  task automatic run_phase(input bit sw);
    swap = sw;
    write_go = 0; read_go = 0; w_en = 0; r_en = 0; din = 0;
    wrst_n = 0; rrst_n = 0;
    sb.delete();
    #400; wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(empty, "empty after reset");
    check(!full, "not full after reset");
    // fill to full without reading
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge wclk);
      if (!full) sb.push_back(8'(i + 8'h40));
      w_en = 1; din = 8'(i + 8'h40);
    end
    @(negedge wclk); w_en = 0;
    check(full, "full after DEPTH writes");
    check(sb.size() == DEPTH, $sformatf("accepted %0d writes", sb.size()));
    // drain
    @(negedge rclk);
    for (int i = 0; i < DEPTH; i++) begin
      while (empty) @(negedge rclk);
      check(dout == sb[0], $sformatf("drain %0d: %02h exp %02h", i, dout, sb[0]));
      void'(sb.pop_front());
      r_en = 1; @(negedge rclk); r_en = 0;
    end
    repeat (4) @(negedge rclk);
    check(empty, "empty after draining");
    // random traffic
    n_written = 0; n_read = 0;
    write_go = 1; read_go = 1;
    wait (n_written >= 200);
    write_go = 0;
    wait (sb.size() == 0);
    read_go = 0;
    repeat (4) @(posedge rclk);
    check(empty, "empty at end");
    check(n_read == n_written, $sformatf("read %0d of %0d", n_read, n_written));
  endtask

  initial begin
    run_phase(0);
    run_phase(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
