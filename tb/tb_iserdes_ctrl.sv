`timescale 1ns / 1ps
// tb_iserdes_ctrl: self-checking test of the receive deframer.
// Character streams (byte + K flag) are driven as the decoder would present
// them. Checks: bytes between K27.7 and K28.4 are forwarded with
// fifo_valid, one cycle after they arrive, and nothing else is; the stop
// character is not forwarded; control characters inside a frame are
// dropped; a start character is ignored while aligned_i is low; data
// outside a frame is ignored; 60 random frames, whose data bytes may carry
// the start and stop values as data (K low), arrive intact.
// Start/stop characters and the alignment gate follow the document; the
// one-cycle latency is this design's own.
module tb_iserdes_ctrl;
  import serdes_pkg::*;
  logic clk = 0, rst_n, k_i, aligned, valid, st;
  logic [7:0] dat_i, dat_o;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  always #66.67 clk = ~clk;

  iserdes_ctrl dut (.clk(clk), .rst_n(rst_n), .dat_i(dat_i), .k_i(k_i), .aligned_i(aligned),
                    .dat_o(dat_o), .fifo_valid(valid), .state_o(st));

  always @(posedge clk) if (rst_n && valid) got.push_back(dat_o);

  function automatic bit same(input logic [7:0] a[$], input logic [7:0] b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] d, input logic k);
    @(negedge clk); dat_i = d; k_i = k;
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp[$];
    rst_n = 0; dat_i = K28_7_TRAIN; k_i = 1; aligned = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // idle and stray data: nothing forwarded
    send(K28_7_TRAIN, 1); send(8'h55, 0); send(K28_4_STOP, 1); send(K28_7_TRAIN, 1);
    repeat (3) send(K28_7_TRAIN, 1);
    check(got.size() == 0, "nothing forwarded outside a frame");
    // a write frame with a filler inside; check latency of first byte
    exp = '{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44};
    send(K27_7_START, 1);
    send(exp[0], 0);
    #1;
    check(!valid, "first byte not yet forwarded in its own cycle");
    @(posedge clk); #1;
    check(valid && dat_o == 8'h03, "first byte forwarded one cycle later");
    for (int i = 1; i < 10; i++) begin
      send(exp[i], 0);
      if (i == 5) send(K28_7_TRAIN, 1);
    end
    send(K28_4_STOP, 1);
    @(posedge clk); #1;
    check(!valid, "stop character not forwarded");
    repeat (3) send(K28_7_TRAIN, 1);
    check(same(got, exp), $sformatf("frame forwarded: %0d bytes", got.size()));
    check(st == 1'b0, "back in IDLE");
    // start while not aligned is ignored
    got.delete();
    aligned = 0;
    send(K27_7_START, 1); send(8'hAA, 0); send(K28_4_STOP, 1);
    repeat (2) send(K28_7_TRAIN, 1);
    check(got.size() == 0, "frame ignored while not aligned");
    aligned = 1;
    // next frame after realignment
    send(K27_7_START, 1); send(8'h12, 0); send(8'h34, 0); send(K28_4_STOP, 1);
    repeat (3) send(K28_7_TRAIN, 1);
    check(same(got, '{8'h12, 8'h34}), "frame after realignment");
    // random frames: data bytes may carry the start/stop values with K low,
    // filler K28.7 appears at random inside frames, idle gaps in between
    for (int f = 0; f < 60; f++) begin
      int n;
      logic [7:0] b;
      got.delete();
      exp.delete();
      n = $urandom_range(1, 12);
      send(K27_7_START, 1);
      for (int i = 0; i < n; i++) begin
        b = ($urandom_range(0, 5) == 0) ? (($urandom_range(0, 1) != 0) ? K27_7_START : K28_4_STOP)
                                         : 8'($urandom);
        send(b, 0);
        exp.push_back(b);
        if ($urandom_range(0, 4) == 0) send(K28_7_TRAIN, 1);
      end
      send(K28_4_STOP, 1);
      repeat ($urandom_range(2, 5)) send(K28_7_TRAIN, 1);
      check(same(got, exp), $sformatf("random frame %0d: %0d of %0d bytes", f, got.size(), n));
      check(st == 1'b0, "IDLE after random frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
