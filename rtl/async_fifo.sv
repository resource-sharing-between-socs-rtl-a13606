`timescale 1ns / 1ps
// async_fifo: dual-clock FIFO for the crossings between the SoC clock and
// the SerDes clock.
//
// The write pointer handler (wclk) and the read pointer handler (rclk) each
// keep a binary pointer one bit wider than the address and its Gray-coded
// copy. Each Gray pointer crosses to the other domain through two
// flip-flops. Empty is read pointer == synchronised write pointer; full is
// Gray write pointer == synchronised read pointer with the two top bits
// inverted, i.e. the pointers differ by exactly DEPTH. This is the structure
// the documented design uses; DEPTH must be a power of two.
//
// Interface: data_out is the word at the head of the FIFO whenever empty is
// low (show-ahead); r_en with !empty pops it. w_en with !full pushes data_in.
// A write while full or a read while empty is ignored. full and empty are
// pessimistic by the two-flop synchroniser delay.
// The depth of 8 is that of the documented FIFO diagram; the show-ahead read
// port is this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_en,
  input  logic [WIDTH-1:0] data_in,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             r_en,
  output logic [WIDTH-1:0] data_out,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] b_wptr, g_wptr, b_rptr, g_rptr;
  logic [AW:0] g_wptr_s1, g_wptr_sync, g_rptr_s1, g_rptr_sync;
  logic [AW:0] b_wptr_next, b_rptr_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write pointer handler ----------------
  assign b_wptr_next = b_wptr + (AW+1)'(w_en && !full);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      b_wptr <= '0;
      g_wptr <= '0;
    end else begin
      b_wptr <= b_wptr_next;
      g_wptr <= bin2gray(b_wptr_next);
    end
  end

  always_ff @(posedge wclk) begin
    if (w_en && !full) mem[b_wptr[AW-1:0]] <= data_in;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) {g_rptr_sync, g_rptr_s1} <= '0;
    else         {g_rptr_sync, g_rptr_s1} <= {g_rptr_s1, g_rptr};
  end

  assign full = (g_wptr == {~g_rptr_sync[AW:AW-1], g_rptr_sync[AW-2:0]});

  // ---------------- read pointer handler ----------------
  assign b_rptr_next = b_rptr + (AW+1)'(r_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      b_rptr <= '0;
      g_rptr <= '0;
    end else begin
      b_rptr <= b_rptr_next;
      g_rptr <= bin2gray(b_rptr_next);
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) {g_wptr_sync, g_wptr_s1} <= '0;
    else         {g_wptr_sync, g_wptr_s1} <= {g_wptr_s1, g_wptr};
  end

  assign empty    = (g_rptr == g_wptr_sync);
  assign data_out = mem[b_rptr[AW-1:0]];

endmodule
