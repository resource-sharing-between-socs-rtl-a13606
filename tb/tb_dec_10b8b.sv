`timescale 1ns / 1ps
// tb_dec_10b8b: self-checking test of the 10b/8b decoder.
// Published code words (D0.0, D1.0, D31.1, K28.1, K28.5, K28.7, both
// forms) and the link's framing characters are decoded against their
// byte/K values; every 10-bit pattern is checked for the invalid flag
// (set exactly when the symbol has fewer than 4 or more than 6 ones); and
// every data byte and supported control character, encoded by the encoder
// from both disparities, must decode back.
// Reference values are the standard 8b/10b tables, as the document uses them;
// the exhaustive sweep is this test's own.
module tb_dec_10b8b;
  logic [9:0] din;
  logic [7:0] dout;
  logic       k, inv;
  logic [7:0] e_d;
  logic       e_k, e_rd, e_rdo;
  logic [9:0] e_sym;
  int checks = 0, failures = 0;

  dec_10b8b dut (.data_in(din), .data_out(dout), .k_out(k), .invalid(inv));
  enc_8b10b enc (.data_in(e_d), .k_in(e_k), .disp_in(e_rd), .data_out(e_sym), .disp_out(e_rdo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic dec_check(input logic [9:0] sym, input logic [7:0] d, input logic kk);
    din = sym; #1;
    check(dout == d && k == kk && !inv, $sformatf("%010b -> %0d/%02h exp %0d/%02h", sym, k, dout, kk, d));
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_d = 0; e_k = 0; e_rd = 0;
    dec_check(10'b1001110100, 8'h00, 0); dec_check(10'b0110001011, 8'h00, 0);
    dec_check(10'b0111010100, 8'h01, 0); dec_check(10'b1000101011, 8'h01, 0);
    dec_check(10'b1010111001, 8'h3F, 0); dec_check(10'b0101001001, 8'h3F, 0);
    dec_check(10'b0011111001, 8'h3C, 1); dec_check(10'b1100000110, 8'h3C, 1);
    dec_check(10'b0011111010, 8'hBC, 1); dec_check(10'b1100000101, 8'hBC, 1);
    dec_check(10'b0011111000, 8'hFC, 1); dec_check(10'b1100000111, 8'hFC, 1);
    // K27.7 start (both forms), K28.4 stop (both forms), D27.7 is data
    dec_check(10'b1101101000, 8'hFB, 1); dec_check(10'b0010010111, 8'hFB, 1);
    dec_check(10'b0011110010, 8'h9C, 1); dec_check(10'b1100001101, 8'h9C, 1);
    dec_check(10'b1101100001, 8'hFB, 0); dec_check(10'b0010011110, 8'hFB, 0);
    // invalid flag on every pattern
    for (int v = 0; v < 1024; v++) begin
      din = 10'(v); #1;
      check(inv == ($countones(10'(v)) < 4 || $countones(10'(v)) > 6), $sformatf("invalid flag %03h", v));
    end
    // round trip through the encoder
    for (int kk = 0; kk < 2; kk++)
      for (int v = 0; v < 256; v++)
        for (int r = 0; r < 2; r++) begin
          if (kk == 1 && !(v[4:0] == 28 || (v[7:5] == 7 && (v[4:0] == 23 || v[4:0] == 27 || v[4:0] == 29 || v[4:0] == 30))))
            continue;
          e_d = 8'(v); e_k = kk[0]; e_rd = r[0]; #1;
          din = e_sym; #1;
          check(dout == 8'(v) && k == kk[0], $sformatf("round trip %0d/%02h", kk, v));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
