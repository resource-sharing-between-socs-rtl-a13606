`timescale 1ns / 1ps
// tb_oserdes_ctrl: self-checking test of the transmit framer.
// A show-ahead FIFO model feeds it; an encoder and disparity register close
// the disparity loop as in the SerDes system. Checks:
//  - K28.7 during the 16 INIT cycles and while idle;
//  - a write frame (03, 01, 4 address, 4 data bytes) available at once
//    goes out as K27.7, the 10 bytes, K28.4 in 12 consecutive cycles;
//  - a read frame (04, 01, 4 address bytes) goes out as 6 bytes;
//  - with resp_only every 4 bytes form one frame;
//  - when the FIFO runs dry inside a frame, K28.7 filler is sent and the
//    frame resumes; bytes are never reordered, lost or repeated;
//  - in idle, K28.5 is sent exactly when the running disparity is positive,
//    and the idle stream then is the RD- K28.7 code.
// Frame layout (K27.7, bytes, K28.4, K28.7 when idle) follows the document;
// the K28.5 idle rule and the byte counts per command are this design's own.
module tb_oserdes_ctrl;
  import serdes_pkg::*;
  logic clk = 0, rst_n, resp_only;
  logic [7:0] fifo_dout, char_o;
  logic fifo_empty, fifo_ren, k_o;
  logic [2:0] st;
  logic [9:0] sym;
  logic rd, rd_next;
  int checks = 0, failures = 0;
  logic [7:0] fifo [$];
  bit hold_fifo;      // pretend empty

  always #66.67 clk = ~clk;

  oserdes_ctrl dut (.clk(clk), .rst_n(rst_n), .resp_only(resp_only), .disp_i(rd_next),
                    .fifo_dout(fifo_dout), .fifo_empty(fifo_empty), .fifo_ren(fifo_ren),
                    .char_o(char_o), .k_o(k_o), .state_o(st));
  enc_8b10b enc (.data_in(char_o), .k_in(k_o), .disp_in(rd), .data_out(sym), .disp_out(rd_next));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd <= 1'b0; else rd <= rd_next;

  assign fifo_empty = hold_fifo || (fifo.size() == 0);
  assign fifo_dout  = (fifo.size() > 0) ? fifo[0] : 8'h00;
  // pops take effect after the clock edge, like a FIFO's read pointer
  logic pop_pending = 0;
  always @(posedge clk) if (fifo_ren && fifo.size() > 0) pop_pending <= 1;
  always @(negedge clk) if (pop_pending) begin void'(fifo.pop_front()); pop_pending <= 0; end

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

  // Monitor: rebuild frames from the character stream
  logic [7:0] frames [$][$];
  logic [7:0] cur [$];
  bit in_frame;
  int frame_len_cycles, cyc_in_frame, fillers, k28_5_seen, idle_rdpos_k28_7;
  always @(posedge clk) if (rst_n) begin
    if (in_frame) cyc_in_frame++;
    if (k_o && char_o == K27_7_START) begin
      in_frame = 1; cur.delete(); cyc_in_frame = 1;
    end else if (k_o && char_o == K28_4_STOP) begin
      check(in_frame, "stop outside frame");
      in_frame = 0; frames.push_back(cur); frame_len_cycles = cyc_in_frame;
    end else if (!k_o) begin
      check(in_frame, "data outside frame");
      cur.push_back(char_o);
    end else if (in_frame) begin
      check(char_o == K28_7_TRAIN, "filler is K28.7");
      fillers++;
    end else begin
      check(char_o == K28_7_TRAIN || char_o == K28_5_COMMA, $sformatf("idle char %02h", char_o));
      if (char_o == K28_5_COMMA) begin
        k28_5_seen++;
        check(rd == 1'b1, "K28.5 sent with RD-");
      end else if (st == 3'd1 && rd) idle_rdpos_k28_7++;
    end
  end

  task automatic push(input logic [7:0] b[$]);
    foreach (b[i]) fifo.push_back(b[i]);
  endtask

  task automatic expect_frame(input logic [7:0] b[$], input string name);
    int t = 0;
    while (frames.size() == 0 && t < 400) begin @(posedge clk); t++; end
    check(frames.size() > 0, {name, ": no frame"});
    if (frames.size() > 0) begin
      logic [7:0] f[$];
      f = frames.pop_front();
      check(f == b, $sformatf("%s: frame of %0d bytes, expected %0d", name, f.size(), b.size()));
    end
  endtask

  initial begin
    logic [7:0] w[$], r[$], resp[$];
    int t;
    rst_n = 0; resp_only = 0; hold_fifo = 0;
    w = '{8'h03, 8'h01, 8'h80, 8'h00, 8'h00, 8'h08, 8'h11, 8'h22, 8'h33, 8'h44};
    r = '{8'h04, 8'h01, 8'h80, 8'h00, 8'h00, 8'h0C};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // INIT: K28.7 for 16 cycles, no frame even with data waiting
    push(w);
    for (int i = 0; i < 16; i++) begin
      @(posedge clk); #1;
      check(k_o && char_o == K28_7_TRAIN, "K28.7 during INIT");
      check(!fifo_ren, "no pop during INIT");
    end
    // write frame, all data available: 12 consecutive cycles
    expect_frame(w, "write");
    check(frame_len_cycles == 12, $sformatf("write frame took %0d cycles", frame_len_cycles));
    check(fillers == 0, "no filler when data is ready");
    // read frame
    push(r);
    expect_frame(r, "read");
    check(frame_len_cycles == 8, $sformatf("read frame took %0d cycles", frame_len_cycles));
    // stalled write frame: release bytes one by one with gaps
    fillers = 0;
    fifo.push_back(w[0]);
    for (int i = 1; i < 10; i++) begin
      repeat (3) @(posedge clk);
      fifo.push_back(w[i]);
    end
    expect_frame(w, "stalled write");
    check(fillers > 0, "filler sent during stall");
    // resp_only: 8 bytes -> two frames of 4 (first byte 03 is not a command here)
    resp_only = 1;
    resp = '{8'h03, 8'hA1, 8'hB2, 8'hC3};
    push(resp);
    push('{8'h11, 8'h22, 8'h33, 8'h44});
    expect_frame(resp, "response 1");
    expect_frame('{8'h11, 8'h22, 8'h33, 8'h44}, "response 2");
    resp_only = 0;
    // idle after many frames: disparity fix
    t = 0;
    repeat (30) @(posedge clk);
    check(rd == 1'b0, "idle stream runs at RD-");
    check(sym == K28_7_NEG, "idle symbol is 0011111000");
    check(k28_5_seen > 0, "K28.5 disparity fix used");
    check(idle_rdpos_k28_7 == 0, "no K28.7 sent in idle at RD+");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
