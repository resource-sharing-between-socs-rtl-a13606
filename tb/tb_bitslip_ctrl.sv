`timescale 1ns / 1ps
// tb_bitslip_ctrl: self-checking test of the bitslip controller.
// A small model of the deserializer presents the K28.7 training word
// rotated by an offset; every bitslip pulse advances the offset by one bit,
// visible two cycles later. For several start offsets the test checks:
// the first pulse comes in the 17th cycle after reset (16 INIT cycles); each pulse
// is one cycle long; pulses during the search are 4 cycles apart (3-cycle
// WAIT); the number of pulses equals the number of one-bit steps to the
// aligned word; aligned_o rises only then. Then the word is rotated by one
// bit (drift) while aligned: the controller must leave IDLE and re-align.
// The state sequence and the 16/3-cycle timing follow the documented
// controller; the channel model (a word rotated by a random offset) is this
// test's own.
module tb_bitslip_ctrl;
  import serdes_pkg::*;
  logic clk = 0, rst_n;
  logic [9:0] q;
  logic bitslip, aligned;
  bitslip_state_t st;
  int offset;
  int pending;     // cycles until a requested slip shows up
  int checks = 0, failures = 0;

  always #66.67 clk = ~clk;

  bitslip_ctrl dut (.clk(clk), .rst_n(rst_n), .q_i(q), .bitslip_o(bitslip), .state_o(st), .aligned_o(aligned));

  function automatic logic [9:0] rotl(input logic [9:0] w, input int n);
    logic [9:0] r = w;
    for (int i = 0; i < n; i++) r = {r[8:0], r[9]};
    return r;
  endfunction

  // deserializer model
  int slip_q[$];
  always @(posedge clk) begin
    if (!rst_n) slip_q.delete();
    else if (bitslip) slip_q.push_back(2);
    foreach (slip_q[i]) begin
      slip_q[i]--;
      if (slip_q[i] == 0) offset <= (offset + 1) % 10;
    end
    while (slip_q.size() > 0 && slip_q[0] == 0) void'(slip_q.pop_front());
  end
  assign q = rotl(K28_7_NEG, offset);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic align_run(input int start_off);
    int cyc, first, last, pulses, expect_n;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    offset = start_off;
    cyc = 0; pulses = 0; first = -1; last = -1;
    expect_n = (start_off == 0) ? 10 : 10 - start_off;
    while (!aligned && cyc < 200) begin
      @(posedge clk); #1; cyc++;
      if (bitslip) begin
        pulses++;
        if (first < 0) first = cyc;
        else check(cyc - last == 4, $sformatf("pulse spacing %0d", cyc - last));
        last = cyc;
      end
      if (bitslip) begin
        @(posedge clk); #1; cyc++;
        check(!bitslip, "bitslip pulse longer than one cycle");
      end
    end
    check(first == 16, $sformatf("first bitslip at cycle %0d", first));
    check(aligned, "aligned");
    check(pulses == expect_n, $sformatf("offset %0d: %0d pulses, expected %0d", start_off, pulses, expect_n));
    check(q == K28_7_NEG, $sformatf("word aligned (offset %0d, q %010b)", offset, q));
  endtask

  initial begin
    int pulses;
    rst_n = 0; offset = 0;
    for (int o = 0; o < 10; o += 3) align_run(o);
    // drift by one bit while aligned
    repeat (10) @(posedge clk);
    check(st == BS_IDLE, "idle before drift");
    #1 offset = 9;    // one bit the other way
    pulses = 0;
    @(posedge clk); #1;
    check(!aligned && st == BS_BITSLIP, $sformatf("drift detected in IDLE (state %0d)", st));
    for (int i = 0; i < 100 && !aligned; i++) begin
      if (bitslip) pulses++;
      @(posedge clk); #1;
    end
    check(aligned && q == K28_7_NEG, "re-aligned after drift");
    check(pulses == 1, $sformatf("re-alignment took %0d pulses", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
