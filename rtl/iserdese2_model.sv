`timescale 1ns / 1ps
// iserdese2_model: behavioural model (not synthesizable) of the ISERDESE2
// input deserializer, in the DDR, 10-bit, master/slave cascade
// configuration the SerDes link uses, with its BITSLIP function.
//
// The MASTER samples its serial input (D, or OFB when OFB_USED = "TRUE") at
// both CLK edges (DDR) and, every fifth CLK period, captures ten bits as a
// word, the earliest bit in word[9]. On the rising CLKDIV
// edge it presents word[7:0] on Q8..Q1 (Q8 = word[7], Q1 = word[0]), while
// SHIFTOUT1/SHIFTOUT2 hand word[8]/word[9] to the SLAVE, which presents them
// on its Q3/Q4 at the same CLKDIV edge. The 10-bit result is therefore
// {slave Q4, slave Q3, master Q8..Q1}.
// BITSLIP, sampled high on a rising CLKDIV edge, moves the word boundary by
// one bit (the captured word takes bits one position older): each bitslip
// moves the word by one bit position, and ten bitslips bring it back where
// it started. (The real part slips by one
// and three bits alternately in DDR mode; the link's alignment search does
// not depend on the step order.)
// RST (high) clears the outputs. Ports and parameter names are those of the
// vendor primitive; CE1/CE2, CLKB, CLKDIVP, DDLY, OCLK/OCLKB and the dynamic
// clock selects are ports only. O passes the serial input through.
module iserdese2_model #(
  parameter string       DATA_RATE   = "DDR",
  parameter int unsigned DATA_WIDTH  = 10,
  parameter string       SERDES_MODE = "MASTER",
  parameter string       OFB_USED    = "FALSE"
) (
  input  logic BITSLIP,
  input  logic CE1,
  input  logic CE2,
  input  logic CLK,
  input  logic CLKB,
  input  logic CLKDIV,
  input  logic CLKDIVP,
  input  logic D,
  input  logic DDLY,
  input  logic DYNCLKDIVSEL,
  input  logic DYNCLKSEL,
  input  logic OCLK,
  input  logic OCLKB,
  input  logic OFB,
  input  logic RST,
  input  logic SHIFTIN1,
  input  logic SHIFTIN2,
  output logic O,
  output logic Q1, Q2, Q3, Q4, Q5, Q6, Q7, Q8,
  output logic SHIFTOUT1,
  output logic SHIFTOUT2
);

  logic        din;
  logic        d_fall;      // bit sampled at the last falling CLK edge
  logic [17:0] hist;        // last bits received, newest in hist[0]
  logic [9:0]  word;        // last captured word, earliest bit in word[9]
  logic [7:0]  q;
  logic [2:0]  pair;        // CLK periods since the last capture, 0..4
  logic [3:0]  offset;      // word boundary, moved by BITSLIP, 0..9
  logic        slip_req, slip_ack;

  assign din = (OFB_USED == "TRUE") ? OFB : D;
  assign O   = din;

  // Bit clock: the falling edge samples one bit, the rising edge the next
  // one (DDR); every fifth rising edge captures ten bits as a word
  always @(negedge CLK) d_fall <= din;

  logic [19:0] h;
  assign h = {hist, d_fall, din};

  always @(posedge CLK or posedge RST) begin
    if (RST) begin
      hist     <= '0;
      word     <= '0;
      pair     <= '0;
      offset   <= '0;
      slip_ack <= 1'b0;
    end else begin
      hist <= h[17:0];
      if (slip_req != slip_ack) begin
        slip_ack <= slip_req;        // move the boundary by one bit
        offset   <= (offset >= 4'(DATA_WIDTH - 1)) ? 4'd0 : offset + 4'd1;
      end
      if (pair == 3'((DATA_WIDTH / 2) - 1)) begin
        pair <= '0;
        word <= 10'(h >> offset);
      end else begin
        pair <= pair + 3'd1;
      end
    end
  end

  // Word clock: present the word, accept bitslip requests
  always @(posedge CLKDIV or posedge RST) begin
    if (RST) begin
      q        <= '0;
      slip_req <= 1'b0;
    end else if (SERDES_MODE == "MASTER") begin
      q <= word[7:0];
      if (BITSLIP) slip_req <= ~slip_req;
    end else begin
      q <= {4'b0000, SHIFTIN2, SHIFTIN1, 2'b00};  // slave: Q4, Q3
    end
  end

  assign {Q8, Q7, Q6, Q5, Q4, Q3, Q2, Q1} = q;
  assign SHIFTOUT1 = word[8];
  assign SHIFTOUT2 = word[9];

  // Ports of the real part that the model does not use
  wire unused_ok = &{CE1, CE2, CLKB, CLKDIVP, DDLY, DYNCLKDIVSEL, DYNCLKSEL,
                     OCLK, OCLKB, 1'b1};

  initial begin
    if (DATA_RATE != "DDR" || DATA_WIDTH != 10)
      $error("%m: only DDR with DATA_WIDTH = 10 is modelled");
  end

endmodule
