`timescale 1ns / 1ps
// tb_serdes_pll: self-checking test of the SerDes clock model.
// A 37.5 MHz reference drives the model. Checks: no clock edges and locked
// low while reset is high; clk_5x follows the reference; clk_1x has a
// period of exactly five clk_5x periods, is high for two of them and rises
// together with a rising clk_5x edge; clk_1x_n is its inverse; locked rises
// after LOCK_CYCLES clk_1x cycles and falls again with reset.
module tb_serdes_pll;
  logic ref_clk = 0, rst = 0;
  logic clk_1x, clk_1x_n, clk_5x, locked;
  int checks = 0, failures = 0;
  int n5 = 0, hi_cnt = 0, lo_cnt = 0, n_rise_1x = 0;
  realtime t_rise_prev = 0, t_rise;

  always #13.333 ref_clk = ~ref_clk;

  serdes_pll dut (.clk_in(ref_clk), .rst(rst), .clk_1x(clk_1x), .clk_1x_n(clk_1x_n),
                  .clk_5x(clk_5x), .locked(locked));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count clk_5x periods per clk_1x level
  always @(posedge clk_5x) begin
    #0.1;
    if (clk_1x) hi_cnt++; else lo_cnt++;
  end
  always @(posedge clk_1x) begin
    n_rise_1x++;
    check(clk_5x == 1'b1, "clk_1x rises with a rising clk_5x edge");
    if (n_rise_1x > 2) begin
      check(hi_cnt == 2 && lo_cnt == 3, $sformatf("clk_1x high %0d low %0d clk_5x periods", hi_cnt, lo_cnt));
    end
    hi_cnt = 0; lo_cnt = 0;
  end

  initial begin
    #200us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int edges;
    #1 rst = 1;
    #1 edges = 0;
    fork
      begin repeat (10) begin @(clk_5x or clk_1x); edges++; end end
      #500;
    join_any
    disable fork;
    check(edges == 0, "no clock edges in reset");
    check(!locked, "not locked in reset");
    rst = 0;
    repeat (4) @(posedge clk_1x);
    check(!locked, "not locked before LOCK_CYCLES");
    repeat (2) @(posedge clk_1x);
    #1;
    check(locked, "locked after LOCK_CYCLES");
    repeat (20) begin
      @(negedge ref_clk) #0.1;
      check(clk_5x == ref_clk, "clk_5x follows the reference");
      check(clk_1x_n == ~clk_1x, "clk_1x_n is the inverse");
    end
    repeat (10) @(posedge clk_1x);
    #1 rst = 1;
    #1 check(!locked, "locked drops with reset");
    #100;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
