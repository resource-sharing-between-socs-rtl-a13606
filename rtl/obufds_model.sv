`timescale 1ns / 1ps
// obufds_model: behavioural model of the OBUFDS differential output buffer
// of the FPGA I/O pads (not synthesizable logic; the real part is a pad).
// Drives the single-ended input I onto a complementary pair: O = I (P leg),
// OB = not I (N leg), after a pad delay of PAD_DELAY_PS. Ports as the vendor
// primitive.
module obufds_model #(
  parameter int unsigned PAD_DELAY_PS = 100
) (
  input  logic I,
  output logic O,
  output logic OB
);
  assign #(PAD_DELAY_PS * 1ps) O  = I;
  assign #(PAD_DELAY_PS * 1ps) OB = ~I;
endmodule
