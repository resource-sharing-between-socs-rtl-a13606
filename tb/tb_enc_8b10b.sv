`timescale 1ns / 1ps
// tb_enc_8b10b: self-checking test of the 8b/10b encoder.
// 1. Published code words: D0.0, D1.0, D31.1, K28.1, K28.5, K28.7 in both
//    running-disparity forms.
// 2. A recorded character sequence of a write frame (K28.7, K27.7, 03, 01,
//    80, 00, 00, 00, 11, 22, 33, 44, K28.4) encoded with a running
//    disparity carried from word to word, against the standard code words.
// 3. Every data byte and every supported control character, from both
//    disparities: 4..6 ones, disparity sign allowed by the input disparity,
//    disparity out consistent, and the decoder returns the byte and K flag.
// 4. A long random stream: running disparity stays within +-1 word and no
//    run of more than five equal bits appears.
// Reference values are the standard 8b/10b tables and the encoder output
// recorded in the document for a write frame (0F8, 368, 31B, ...); the random
// sweep is this test's own.
module tb_enc_8b10b;
  logic [7:0] din;
  logic       kin, rdin;
  logic [9:0] dout;
  logic       rdout;
  logic [7:0] dec_d;
  logic       dec_k, dec_inv;
  int checks = 0, failures = 0;

  enc_8b10b dut (.data_in(din), .k_in(kin), .disp_in(rdin), .data_out(dout), .disp_out(rdout));
  dec_10b8b dec (.data_in(dout), .data_out(dec_d), .k_out(dec_k), .invalid(dec_inv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic enc_check(input logic [7:0] d, input logic k, input logic rd, input logic [9:0] exp);
    din = d; kin = k; rdin = rd; #1;
    check(dout == exp, $sformatf("%s%02h rd=%0d got %010b exp %010b", k ? "K" : "D", d, rd, dout, exp));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] seq_d [13] = '{8'hFC, 8'hFB, 8'h03, 8'h01, 8'h80, 8'h00, 8'h00, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h9C};
  logic       seq_k [13] = '{1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};
  // standard code words for that sequence starting from RD- (these are also
  // the values seen on the encoder output of the recorded frame)
  logic [9:0] seq_e [13] = '{10'h0F8, 10'h368, 10'h31B, 10'h22B, 10'h18D, 10'h18B, 10'h18B,
                             10'h18B, 10'h234, 10'h2D9, 10'h329, 10'h0A5, 10'h0F2};

  initial begin
    logic rd;
    int disp, run, ones;
    logic last;
    din = 0; kin = 0; rdin = 0; #1;
    // 1. published code words
    enc_check(8'h00, 0, 0, 10'b1001110100); enc_check(8'h00, 0, 1, 10'b0110001011);
    enc_check(8'h01, 0, 0, 10'b0111010100); enc_check(8'h01, 0, 1, 10'b1000101011);
    enc_check(8'h3F, 0, 0, 10'b1010111001); enc_check(8'h3F, 0, 1, 10'b0101001001);
    enc_check(8'h3C, 1, 0, 10'b0011111001); enc_check(8'h3C, 1, 1, 10'b1100000110);
    enc_check(8'hBC, 1, 0, 10'b0011111010); enc_check(8'hBC, 1, 1, 10'b1100000101);
    enc_check(8'hFC, 1, 0, 10'b0011111000); enc_check(8'hFC, 1, 1, 10'b1100000111);
    // 2. recorded write frame
    rd = 0;
    for (int i = 0; i < 13; i++) begin
      din = seq_d[i]; kin = seq_k[i]; rdin = rd; #1;
      check(dout == seq_e[i], $sformatf("frame char %0d: got %03h exp %03h", i, dout, seq_e[i]));
      rd = rdout;
    end
    // 3. all characters, both disparities
    for (int k = 0; k < 2; k++) begin
      for (int v = 0; v < 256; v++) begin
        if (k == 1 && !(v[4:0] == 28 || (v[7:5] == 7 && (v[4:0] == 23 || v[4:0] == 27 || v[4:0] == 29 || v[4:0] == 30))))
          continue;
        for (int r = 0; r < 2; r++) begin
          din = 8'(v); kin = k[0]; rdin = r[0]; #1;
          ones = $countones(dout);
          check(ones >= 4 && ones <= 6 && (r == 0 ? ones >= 5 : ones <= 5),
                $sformatf("disparity of %0d/%02h rd=%0d: %0d ones", k, v, r, ones));
          check(rdout == ((ones == 5) ? r[0] : ~r[0]), $sformatf("rd out %0d/%02h", k, v));
          check(dec_d == 8'(v) && dec_k == k[0] && !dec_inv,
                $sformatf("round trip %0d/%02h rd=%0d -> %0d/%02h", k, v, r, dec_k, dec_d));
        end
      end
    end
    // 4. random stream
    rd = 0; disp = 0; run = 0; last = 0;
    for (int i = 0; i < 4000; i++) begin
      din = 8'($urandom); kin = ($urandom % 16 == 0); if (kin) din = 8'hFC;
      rdin = rd; #1;
      for (int b = 9; b >= 0; b--) begin
        disp += dout[b] ? 1 : -1;
        if (dout[b] == last) run++; else run = 1;
        last = dout[b];
        if (run > 5) begin check(0, "run longer than 5"); run = 0; end
      end
      if (disp > 2 || disp < -2) begin check(0, $sformatf("running disparity %0d", disp)); disp = 0; end
      rd = rdout;
    end
    check(disp >= -2 && disp <= 2, "final running disparity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
