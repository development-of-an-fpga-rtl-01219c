`timescale 1ns / 1ps
// lvds_ibuf: behavioural model of a differential (LVDS) input buffer.
//
// Behavioural model, not synthesizable logic: on an FPGA this is an IO pad
// primitive (an IBUFDS in the Xilinx UltraScale+ family) with an analog
// differential receiver, which synthesis maps from the vendor library. The
// model has the primitive's ports: the true input I, the complementary input
// IB and the single-ended output O. O follows I while the pair is
// differential (I /= IB); when both lines carry the same level, as with an
// open or shorted pair, the output goes to a fail-safe high. The fail-safe
// level is this model's choice. There is no delay and no clock.
module lvds_ibuf (
  input  logic i,    // P line
  input  logic ib,   // N line
  output logic o
);
  assign o = (i != ib) ? i : 1'b1;
endmodule
