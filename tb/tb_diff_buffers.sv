`timescale 1ns / 1ps
// tb_diff_buffers: self-checking test of the differential pad models.
// An output buffer drives a pair that feeds an input buffer. Checks: the P
// and N legs are complementary; the input buffer output equals the data
// after the pad delay and not before it; a pair with equal legs (not
// driven differentially) reads as 0.
// The pads' behaviour follows the vendor primitives; the pad delay value is
// this design's own.
module tb_diff_buffers;
  logic d = 0, p, n, q, p_force, n_force, q_force;
  bit use_force = 0;
  int checks = 0, failures = 0;

  obufds_model #(.PAD_DELAY_PS(100)) u_ob (.I(d), .O(p), .OB(n));
  ibufds_model u_ib (.I(use_force ? p_force : p), .IB(use_force ? n_force : n), .O(q));
  ibufds_model u_ib2 (.I(p_force), .IB(n_force), .O(q_force));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic v;
    #1;
    for (int i = 0; i < 200; i++) begin
      v = 1'($urandom);
      d = v;
      #0.05;
      if (q !== v) check(q == ~v, "output holds before the pad delay");
      #0.1;
      check(p == v && n == ~v, "complementary legs");
      check(q == v, "input buffer follows after the pad delay");
      #($urandom_range(1, 20));
    end
    p_force = 1; n_force = 1; #1; check(q_force == 0, "equal legs (1,1) read as 0");
    p_force = 0; n_force = 0; #1; check(q_force == 0, "equal legs (0,0) read as 0");
    p_force = 1; n_force = 0; #1; check(q_force == 1, "differential 1");
    p_force = 0; n_force = 1; #1; check(q_force == 0, "differential 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
