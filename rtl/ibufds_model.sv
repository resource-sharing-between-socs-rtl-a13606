`timescale 1ns / 1ps
// ibufds_model: behavioural model of the IBUFDS differential input buffer
// of the FPGA I/O pads (not synthesizable logic; the real part is a pad).
// O follows I when the pair is driven differentially (I != IB). Ports as the vendor primitive: I (P), IB (N).
// (Only the two-valued case is modelled: equal legs give 0, a line at rest.)
module ibufds_model (
  input  logic I,
  input  logic IB,
  output logic O
);
  assign O = (I != IB) ? I : 1'b0;
endmodule
