`timescale 1ns / 1ps
// tb_oserdes_iserdes: self-checking test of the serializer and deserializer
// models in their 10-bit DDR master/slave configuration, connected through
// the internal OFB loop-back as well as through the OQ pin.
// A new random 10-bit word is presented on every rising clk_1x edge (bits
// 9..2 on the master's D1..D8, bits 1..0 on the slave's D3..D4). The test
// keeps the sent bit stream and, for every word received ({slave Q4, slave
// Q3, master Q8..Q1}), finds where in the stream it and the word before it
// sit. Checks:
// the received words are always a 10-bit window of the sent stream (no bit
// lost or repeated), the window phase stays constant without BITSLIP, each
// BITSLIP pulse moves it by exactly one bit, ten pulses bring it back, and
// once the phase is zero every received word equals a sent word. OQ carries
// the same bits as OFB, and the pin path gives the same words as the OFB
// path.
// Bit order and cascade wiring follow the vendor primitives as the document
// configures them; the one-bit step per BITSLIP is this model's own.
module tb_oserdes_iserdes;
  logic ref_clk = 0, rst = 0;
  logic clk_1x, clk_1x_n, clk_5x, locked;
  logic [9:0] tx_word = '0;
  logic oq, ofb, sh1, sh2, tq_m, unused_tq_s;
  logic unused_oq_s, unused_ofb_s, unused_tfb_m, unused_tfb_s, unused_tb_m, unused_tb_s;
  logic unused_m_sh1, unused_m_sh2;
  logic bitslip = 0;
  logic [7:0] qm, qs, qm_pin, qs_pin;
  logic ish1, ish2, ish1_pin, ish2_pin;
  logic unused_ss1, unused_ss2, unused_ss1p, unused_ss2p;
  logic unused_o_m, unused_o_s, unused_o_mp, unused_o_sp;
  int checks = 0, failures = 0;

  always #13.333 ref_clk = ~ref_clk;

  serdes_pll u_pll (.clk_in(ref_clk), .rst(rst), .clk_1x(clk_1x), .clk_1x_n(clk_1x_n),
                    .clk_5x(clk_5x), .locked(locked));

  oserdese2_model #(.SERDES_MODE("MASTER")) u_om (
    .CLK(clk_5x), .CLKDIV(clk_1x),
    .D1(tx_word[9]), .D2(tx_word[8]), .D3(tx_word[7]), .D4(tx_word[6]),
    .D5(tx_word[5]), .D6(tx_word[4]), .D7(tx_word[3]), .D8(tx_word[2]),
    .OCE(1'b1), .RST(rst), .SHIFTIN1(sh1), .SHIFTIN2(sh2),
    .T1(1'b0), .T2(1'b0), .T3(1'b0), .T4(1'b0), .TBYTEIN(1'b0), .TCE(1'b0),
    .OFB(ofb), .OQ(oq), .SHIFTOUT1(unused_m_sh1), .SHIFTOUT2(unused_m_sh2),
    .TBYTEOUT(unused_tb_m), .TFB(unused_tfb_m), .TQ(tq_m));
  oserdese2_model #(.SERDES_MODE("SLAVE")) u_os (
    .CLK(clk_5x), .CLKDIV(clk_1x),
    .D1(1'b0), .D2(1'b0), .D3(tx_word[1]), .D4(tx_word[0]),
    .D5(1'b0), .D6(1'b0), .D7(1'b0), .D8(1'b0),
    .OCE(1'b1), .RST(rst), .SHIFTIN1(1'b0), .SHIFTIN2(1'b0),
    .T1(1'b0), .T2(1'b0), .T3(1'b0), .T4(1'b0), .TBYTEIN(1'b0), .TCE(1'b0),
    .OFB(unused_ofb_s), .OQ(unused_oq_s), .SHIFTOUT1(sh1), .SHIFTOUT2(sh2),
    .TBYTEOUT(unused_tb_s), .TFB(unused_tfb_s), .TQ(unused_tq_s));

  // deserializer pair on the OFB path
  iserdese2_model #(.SERDES_MODE("MASTER"), .OFB_USED("TRUE")) u_im (
    .BITSLIP(bitslip), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x), .CLKDIV(clk_1x),
    .CLKDIVP(1'b0), .D(1'b0), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0), .DYNCLKSEL(1'b0),
    .OCLK(1'b0), .OCLKB(1'b0), .OFB(ofb), .RST(rst), .SHIFTIN1(1'b0), .SHIFTIN2(1'b0),
    .O(unused_o_m), .Q1(qm[0]), .Q2(qm[1]), .Q3(qm[2]), .Q4(qm[3]), .Q5(qm[4]), .Q6(qm[5]),
    .Q7(qm[6]), .Q8(qm[7]), .SHIFTOUT1(ish1), .SHIFTOUT2(ish2));
  iserdese2_model #(.SERDES_MODE("SLAVE")) u_is (
    .BITSLIP(bitslip), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x), .CLKDIV(clk_1x),
    .CLKDIVP(1'b0), .D(1'b0), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0), .DYNCLKSEL(1'b0),
    .OCLK(1'b0), .OCLKB(1'b0), .OFB(1'b0), .RST(rst), .SHIFTIN1(ish1), .SHIFTIN2(ish2),
    .O(unused_o_s), .Q1(qs[0]), .Q2(qs[1]), .Q3(qs[2]), .Q4(qs[3]), .Q5(qs[4]), .Q6(qs[5]),
    .Q7(qs[6]), .Q8(qs[7]), .SHIFTOUT1(unused_ss1), .SHIFTOUT2(unused_ss2));

  // deserializer pair on the pin path (D input)
  iserdese2_model #(.SERDES_MODE("MASTER"), .OFB_USED("FALSE")) u_imp (
    .BITSLIP(bitslip), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x), .CLKDIV(clk_1x),
    .CLKDIVP(1'b0), .D(oq), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0), .DYNCLKSEL(1'b0),
    .OCLK(1'b0), .OCLKB(1'b0), .OFB(1'b0), .RST(rst), .SHIFTIN1(1'b0), .SHIFTIN2(1'b0),
    .O(unused_o_mp), .Q1(qm_pin[0]), .Q2(qm_pin[1]), .Q3(qm_pin[2]), .Q4(qm_pin[3]),
    .Q5(qm_pin[4]), .Q6(qm_pin[5]), .Q7(qm_pin[6]), .Q8(qm_pin[7]),
    .SHIFTOUT1(ish1_pin), .SHIFTOUT2(ish2_pin));
  iserdese2_model #(.SERDES_MODE("SLAVE")) u_isp (
    .BITSLIP(bitslip), .CE1(1'b1), .CE2(1'b1), .CLK(clk_5x), .CLKB(~clk_5x), .CLKDIV(clk_1x),
    .CLKDIVP(1'b0), .D(1'b0), .DDLY(1'b0), .DYNCLKDIVSEL(1'b0), .DYNCLKSEL(1'b0),
    .OCLK(1'b0), .OCLKB(1'b0), .OFB(1'b0), .RST(rst), .SHIFTIN1(ish1_pin), .SHIFTIN2(ish2_pin),
    .O(unused_o_sp), .Q1(qs_pin[0]), .Q2(qs_pin[1]), .Q3(qs_pin[2]), .Q4(qs_pin[3]),
    .Q5(qs_pin[4]), .Q6(qs_pin[5]), .Q7(qs_pin[6]), .Q8(qs_pin[7]),
    .SHIFTOUT1(unused_ss1p), .SHIFTOUT2(unused_ss2p));

  wire [9:0] rx_word     = {qs[3], qs[2], qm};
  wire [9:0] rx_word_pin = {qs_pin[3], qs_pin[2], qm_pin};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // sent words, oldest first
  logic [9:0] sent [$];

  always @(posedge clk_1x) begin
    if (locked) begin
      sent.push_back(tx_word);
      if (sent.size() > 16) void'(sent.pop_front());
    end
  end
  always @(negedge clk_1x) tx_word <= 10'($urandom);

  // phase of a received word in the stream of the last sent words:
  // 0 when it equals one sent word, k when it starts k bits into one;
  // -1 when not found or found at two phases
  logic [9:0] prev_rx;
  always @(posedge clk_1x) prev_rx <= rx_word;

  // (the search uses the previous word too, twenty bits, so that a random
  // match at a wrong place is unlikely)
  function automatic int phase_of(input logic [9:0] w_now);
    logic [19:0] w;
    logic [159:0] stream;
    int found = -1;
    stream = '0;
    w = {prev_rx, w_now};
    foreach (sent[i]) stream = {stream[149:0], sent[i]};
    for (int p = 0; p < 140; p++) begin
      if (stream[159 - p -: 20] == w) begin
        if (found >= 0 && found != p % 10) return -1;
        found = p % 10;
      end
    end
    return found;
  endfunction

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int ph, ph0, ph_new, n_ok;
  initial begin
    #1 rst = 1;   // an edge, so that the asynchronous resets act
    #100 rst = 0;
    wait (locked);
    repeat (20) @(posedge clk_1x);
    // phase stays constant
    ph0 = -1;
    n_ok = 0;
    for (int i = 0; i < 30; i++) begin
      @(posedge clk_1x); #1;
      ph = phase_of(rx_word);
      if (ph >= 0) begin
        if (ph0 < 0) ph0 = ph;
        if (ph == ph0) n_ok++;
      end
      check(rx_word == rx_word_pin, "pin path equals OFB path");
      check(oq == ofb, "OQ equals OFB");
    end
    check(n_ok >= 28, $sformatf("constant phase without bitslip (%0d of 30)", n_ok));
    // each bitslip moves the phase by one bit
    for (int s = 0; s < 10; s++) begin
      @(negedge clk_1x) bitslip = 1;
      @(negedge clk_1x) bitslip = 0;
      repeat (4) @(posedge clk_1x);
      #1;
      ph_new = phase_of(rx_word);
      check(ph_new >= 0 && ((ph_new - ph0 + 10) % 10 == 1 || (ph0 - ph_new + 10) % 10 == 1),
            $sformatf("bitslip %0d: phase %0d -> %0d", s, ph0, ph_new));
      ph0 = ph_new;
      if (ph0 == 0) begin
        // aligned: received words are sent words, in order
        for (int i = 0; i < 5; i++) begin
          @(posedge clk_1x); #1;
          check(phase_of(rx_word) == 0, "aligned word equals a sent word");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
