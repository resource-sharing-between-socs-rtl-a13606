`timescale 1ns / 1ps
// oserdese2_model: behavioural model (not synthesizable) of the OSERDESE2
// output serializer, in the DDR, 10-bit, master/slave cascade configuration
// the SerDes link uses.
//
// Two instances form a 10:1 serializer. The SLAVE captures its D3 and D4 on
// the rising CLKDIV edge and presents them on SHIFTOUT1/SHIFTOUT2. The
// MASTER captures D1..D8 on the rising CLKDIV edge; it sends two bits per
// CLK period (DDR), one while CLK is high and one while it is low, in the
// order D1, D2, ..., D8, SHIFTIN1, SHIFTIN2, and every fifth CLK period it
// takes the word captured last. So a word presented on D is on the line from the next
// word slot onwards, D1 first. OQ changes CLK_TO_OUT_PS after the CLK edge
// (a clock-to-out delay of this model's choosing), so a deserializer
// clocked by the same CLK samples each bit in the middle of its slot
// rather than at the instant it changes. OFB carries the same bit as OQ for the
// internal loop-back to an ISERDESE2. RST (high) clears the word and sends
// zeros. The 3-state path (T1..T4, TCE, TBYTEIN) is modelled as a simple
// pass-through of T1 to TQ; OCE is not modelled. Ports and parameter names
// are those of the vendor primitive; only DATA_WIDTH = 10 with DDR is
// modelled.
module oserdese2_model #(
  parameter string       DATA_RATE_OQ = "DDR",
  parameter int unsigned DATA_WIDTH   = 10,
  parameter string       SERDES_MODE  = "MASTER",
  parameter int unsigned CLK_TO_OUT_PS = 300
) (
  input  logic CLK,
  input  logic CLKDIV,
  input  logic D1, D2, D3, D4, D5, D6, D7, D8,
  input  logic OCE,
  input  logic RST,
  input  logic SHIFTIN1,
  input  logic SHIFTIN2,
  input  logic T1, T2, T3, T4,
  input  logic TBYTEIN,
  input  logic TCE,
  output logic OFB,
  output logic OQ,
  output logic SHIFTOUT1,
  output logic SHIFTOUT2,
  output logic TBYTEOUT,
  output logic TFB,
  output logic TQ
);

  logic [7:0]  hold;       // D8..D1 captured on CLKDIV
  logic [9:0]  word;       // word being sent, index 0 first
  logic [2:0]  pair;       // bit pair of the word now on the line, 0..4
  logic        bit_hi;     // bit sent while CLK is high
  logic        bit_lo;     // bit sent while CLK is low

  always @(posedge CLKDIV or posedge RST) begin
    if (RST) hold <= '0;
    else     hold <= {D8, D7, D6, D5, D4, D3, D2, D1};
  end

  assign SHIFTOUT1 = (SERDES_MODE == "SLAVE") ? hold[2] : 1'b0;  // slave D3
  assign SHIFTOUT2 = (SERDES_MODE == "SLAVE") ? hold[3] : 1'b0;  // slave D4

  // One process on the rising CLK edge picks two bits per CLK period; the
  // first is driven while CLK is high, the second while it is low (DDR).
  logic [9:0] cur;
  assign cur = (pair == 3'd0) ? {SHIFTIN2, SHIFTIN1, hold} : word;

  always @(posedge CLK or posedge RST) begin
    if (RST) begin
      word   <= '0;
      pair   <= '0;
      bit_hi <= 1'b0;
      bit_lo <= 1'b0;
    end else begin
      word   <= cur;
      bit_hi <= cur[{pair, 1'b0}];
      bit_lo <= cur[{pair, 1'b1}];
      pair   <= (pair == 3'((DATA_WIDTH / 2) - 1)) ? 3'd0 : pair + 3'd1;
    end
  end

  assign #(CLK_TO_OUT_PS * 1ps) OQ = CLK ? bit_hi : bit_lo;

  assign OFB      = OQ;
  assign TQ       = T1;
  assign TFB      = 1'b0;
  assign TBYTEOUT = TBYTEIN;

  // Unmodelled inputs of the real part
  wire unused_ok = &{OCE, T2, T3, T4, TCE, D1 | 1'b1};

  initial begin
    if (DATA_RATE_OQ != "DDR" || DATA_WIDTH != 10)
      $error("%m: only DDR with DATA_WIDTH = 10 is modelled");
  end

endmodule
