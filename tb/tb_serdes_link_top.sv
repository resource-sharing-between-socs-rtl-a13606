`timescale 1ns / 1ps
// tb_serdes_link_top: end-to-end, self-checking test of the two-chip link at
// its default size (no parameter of serdes_link_top is changed).
//
// Chip A's Wishbone port is driven by a bus-master task standing in for A's
// CPU; chip B's Wishbone port is served by a 16-word memory model with a
// one-cycle acknowledge, standing in for B's memory. The two SoC clocks run
// at 75 MHz with different phases, the two 37.5 MHz bit-clock references
// share a frequency but not a phase. The channel is two delay lines (A to B
// and B to A) sampled every 0.5 ns, so a test can change a delay while the
// link runs.
// Checks: remote writes land in B's memory with the right word address;
// remote reads return B's words to A's CPU (including 0x11223344); the
// receivers align, re-align after a one-bit jump of the channel delay, and
// no code error is seen once aligned; the word clock runs at 7.5 MHz (75
// Mbit/s on the line) and every write (read) request occupies exactly 12
// (8) character slots. Each mechanism is counted, and the
// test fails if one never happens: initial bitslip alignment on both
// sides, re-alignment after drift, remote write, remote read, A's TX FIFO
// full (bus slave stalled), K28.5 sent by the idle disparity rule, and
// frames received by both chips. K28.7 filler inside a frame is counted
// and printed but not required: the bus-side logic writes a frame into the
// TX FIFO ten times faster than the link drains it, so the framer never
// runs dry mid-frame here (tb_oserdes_ctrl covers it).
// Frame formats, characters and clock rates follow the document; the channel
// delays, clock phases and memory model are this test's own.
module tb_serdes_link_top;
  import serdes_pkg::*;

  logic a_sys_clk = 0, b_sys_clk = 0, a_ref_clk = 0, b_ref_clk = 0;
  logic a_sys_rst_n = 1, b_sys_rst_n = 1;
  logic a_wb_cyc = 0, a_wb_stb = 0, a_wb_we = 0, a_wb_ack;
  logic [3:0] a_wb_adr = 0;
  logic [31:0] a_wb_dat_w = 0, a_wb_dat_r;
  logic a_tx_p, a_tx_n, a_rx_p, a_rx_n, b_tx_p, b_tx_n, b_rx_p, b_rx_n;
  logic a_aligned, a_bitslip, b_aligned, b_bitslip, code_err;
  logic [1:0] a_bitslip_state, b_bitslip_state;
  logic [2:0] a_bus_state, b_dma_state;
  logic [29:0] b_wb_adr;
  logic [31:0] b_wb_dat_w, b_wb_dat_r;
  logic [3:0] b_wb_sel;
  logic b_wb_cyc, b_wb_stb, b_wb_we, b_wb_ack;

  int checks = 0, failures = 0;

  // 75 MHz SoC clocks, 37.5 MHz bit-clock references
  always #6.667  a_sys_clk = ~a_sys_clk;
  initial begin #2.1; forever #6.667 b_sys_clk = ~b_sys_clk; end
  always #13.333 a_ref_clk = ~a_ref_clk;
  initial begin #5.3; forever #13.333 b_ref_clk = ~b_ref_clk; end

  serdes_link_top u_dut (.*);

  // ---------------- channel: two delay lines, 0.5 ns taps ----------------
  logic [255:0] line_ab = '0, line_ba = '0;
  int dly_ab = 20, dly_ba = 33;           // in 0.5 ns steps
  always #0.5 begin
    line_ab = {line_ab[254:0], a_tx_p & ~a_tx_n};
    line_ba = {line_ba[254:0], b_tx_p & ~b_tx_n};
  end
  assign b_rx_p = line_ab[dly_ab];
  assign b_rx_n = ~line_ab[dly_ab];
  assign a_rx_p = line_ba[dly_ba];
  assign a_rx_n = ~line_ba[dly_ba];

  // ---------------- chip B memory model ----------------
  logic [31:0] bmem [16];
  logic [29:0] last_b_adr;
  always @(posedge b_sys_clk) begin
    b_wb_ack <= 1'b0;
    if (b_wb_cyc && b_wb_stb && !b_wb_ack) begin
      b_wb_ack   <= 1'b1;
      last_b_adr <= b_wb_adr;
      if (b_wb_adr[29:4] != 26'h200_0000) begin
        failures++;
        $display("FAIL: B bus address %h outside the window", b_wb_adr);
      end
      if (b_wb_we) bmem[b_wb_adr[3:0]] <= b_wb_dat_w;
    end
  end
  assign b_wb_dat_r = bmem[b_wb_adr[3:0]];

  // ---------------- checks helpers ----------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one Wishbone access on chip A; returns the read data
  task automatic wb_a(input bit we, input logic [3:0] adr, input logic [31:0] wd,
                      output logic [31:0] rd, output bit ok);
    int n = 0;
    @(negedge a_sys_clk);
    a_wb_cyc = 1; a_wb_stb = 1; a_wb_we = we; a_wb_adr = adr; a_wb_dat_w = wd;
    do begin
      @(posedge a_sys_clk);
      n++;
    end while (!a_wb_ack && n < 40000);
    ok = a_wb_ack;
    rd = a_wb_dat_r;
    @(negedge a_sys_clk);
    a_wb_cyc = 0; a_wb_stb = 0; a_wb_we = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_align_slips_a = 0, n_align_slips_b = 0, n_drift_slips = 0;
  int n_writes = 0, n_reads = 0, n_full_stall = 0, n_filler = 0, n_k285 = 0;
  int n_frames_a = 0, n_frames_b = 0, n_code_err = 0;
  bit drift_phase = 0, was_aligned_a = 0, was_aligned_b = 0;
  bit in_frame_a = 0, in_frame_b = 0;

  always @(posedge u_dut.u_a_serdes.clk_1x) begin
    if (a_bitslip && !drift_phase) n_align_slips_a++;
    if (a_bitslip && drift_phase && was_aligned_a) n_drift_slips++;
    if (a_aligned) was_aligned_a = 1;
    if (u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K28_5_COMMA) n_k285++;
    if (u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K27_7_START) in_frame_a = 1;
    if (u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K28_4_STOP)  in_frame_a = 0;
    if (in_frame_a && u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K28_7_TRAIN) n_filler++;
    if (a_aligned && code_err) n_code_err++;
  end
  always @(posedge u_dut.u_b_serdes.clk_1x) begin
    if (b_bitslip && !drift_phase) n_align_slips_b++;
    if (b_bitslip && drift_phase && was_aligned_b) n_drift_slips++;
    if (b_aligned) was_aligned_b = 1;
    if (u_dut.u_b_serdes.tx_k && u_dut.u_b_serdes.tx_char == K28_5_COMMA) n_k285++;
    if (u_dut.u_b_serdes.tx_k && u_dut.u_b_serdes.tx_char == K27_7_START) in_frame_b = 1;
    if (u_dut.u_b_serdes.tx_k && u_dut.u_b_serdes.tx_char == K28_4_STOP)  in_frame_b = 0;
    if (in_frame_b && u_dut.u_b_serdes.tx_k && u_dut.u_b_serdes.tx_char == K28_7_TRAIN) n_filler++;
  end
  // line rate: one 10-bit character per word-clock cycle of 133.33 ns
  // (75 Mbit/s); a write frame of 10 bytes takes 12 character slots
  realtime t_prev_1x = 0;
  int n_rate_ok = 0, n_rate_bad = 0, frame_len_a = -1, n_frame_ok = 0, n_frame_bad = 0;
  always @(posedge u_dut.u_a_serdes.clk_1x) begin
    if (t_prev_1x > 0 && u_dut.u_a_serdes.rst_slow_n) begin
      if ($realtime - t_prev_1x > 133.0 && $realtime - t_prev_1x < 133.7) n_rate_ok++;
      else n_rate_bad++;
    end
    t_prev_1x = $realtime;
    if (u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K27_7_START) frame_len_a = 1;
    else if (frame_len_a > 0) begin
      frame_len_a++;
      if (u_dut.u_a_serdes.tx_k && u_dut.u_a_serdes.tx_char == K28_4_STOP) begin
        if (frame_len_a == 12 || frame_len_a == 8) n_frame_ok++;
        else n_frame_bad++;
        frame_len_a = -1;
      end
    end
  end
  always @(posedge a_sys_clk)
    if (u_dut.a_txf_full && (a_bus_state == 3'd3 || a_bus_state == 3'd4)) n_full_stall++;
  always @(posedge u_dut.u_a_serdes.clk_1x) if (u_dut.u_a_serdes.rxf_wen) n_frames_a++;
  always @(posedge u_dut.u_b_serdes.clk_1x) if (u_dut.u_b_serdes.rxf_wen) n_frames_b++;

  // ---------------- watchdog ----------------
  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- test ----------------
  task automatic remote_write(input logic [3:0] adr, input logic [31:0] d);
    logic [31:0] rd;
    bit ok;
    wb_a(1, adr, d, rd, ok);
    check(ok, $sformatf("write ack adr %0d", adr));
    // the write is posted: wait for it to reach B's memory
    begin
      int n = 0;
      while (bmem[adr] !== d && n < 20000) begin @(posedge b_sys_clk); n++; end
    end
    check(bmem[adr] === d, $sformatf("B mem[%0d]=%h expected %h", adr, bmem[adr], d));
    check(last_b_adr == {26'h200_0000, adr}, $sformatf("B word address %h", last_b_adr));
    n_writes++;
  endtask

  task automatic remote_read(input logic [3:0] adr);
    logic [31:0] rd;
    bit ok;
    wb_a(0, adr, 0, rd, ok);
    check(ok, $sformatf("read ack adr %0d", adr));
    check(rd === bmem[adr], $sformatf("read adr %0d got %h expected %h", adr, rd, bmem[adr]));
    n_reads++;
  endtask

  initial begin
    logic [31:0] d;
    foreach (bmem[i]) bmem[i] = 32'hA5A5_0000 | i;
    #1;
    a_sys_rst_n = 0;   // an edge, so that the asynchronous resets act
    b_sys_rst_n = 0;
    #100;
    a_sys_rst_n = 1;
    #37;
    b_sys_rst_n = 1;

    // initial alignment of both receivers
    wait (a_aligned && b_aligned);
    repeat (20) @(posedge u_dut.u_a_serdes.clk_1x);
    check(a_aligned && b_aligned, "both receivers aligned");

    remote_write(4'd5, 32'hDEAD_BEEF);
    bmem[3] = 32'h1122_3344;
    remote_read(4'd3);
    remote_read(4'd5);
    for (int i = 0; i < 6; i++) begin
      d = $urandom;
      remote_write(4'($urandom_range(0, 15)), d);
      remote_read(4'($urandom_range(0, 15)));
    end

    // drift: both channel delays jump by one bit time while the link idles
    drift_phase = 1;
    repeat (20) @(posedge u_dut.u_a_serdes.clk_1x);
    dly_ab += 27;
    dly_ba += 27;
    repeat (200) @(posedge u_dut.u_a_serdes.clk_1x);
    check(a_aligned && b_aligned, "both receivers aligned after drift");

    for (int i = 0; i < 6; i++) begin
      d = $urandom;
      remote_write(4'($urandom_range(0, 15)), d);
      remote_read(4'($urandom_range(0, 15)));
    end
    bmem[9] = 32'h1122_3344;
    remote_read(4'd9);

    $display("mechanisms: slips A=%0d B=%0d drift=%0d writes=%0d reads=%0d full=%0d filler=%0d k28.5=%0d rxA=%0d rxB=%0d",
             n_align_slips_a, n_align_slips_b, n_drift_slips, n_writes, n_reads, n_full_stall,
             n_filler, n_k285, n_frames_a, n_frames_b);
    check(n_align_slips_a > 0, "A aligned by bitslip");
    check(n_align_slips_b > 0, "B aligned by bitslip");
    check(n_drift_slips > 0, "re-alignment after drift");
    check(n_writes > 0, "remote writes");
    check(n_reads > 0, "remote reads");
    check(n_full_stall > 0, "TX FIFO full stall");
    check(n_k285 > 0, "K28.5 disparity idle");
    check(n_frames_a > 0 && n_frames_b > 0, "frames received on both sides");
    check(n_rate_ok > 500 && n_rate_bad == 0, $sformatf("word clock 7.5 MHz (%0d bad periods)", n_rate_bad));
    check(n_frame_ok > 0 && n_frame_bad == 0,
          $sformatf("frames of 12 (write) or 8 (read) characters: %0d ok, %0d other", n_frame_ok, n_frame_bad));
    check(n_code_err == 0, $sformatf("%0d code errors while aligned", n_code_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
