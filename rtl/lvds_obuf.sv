`timescale 1ns / 1ps
// lvds_obuf: behavioural model of a differential (LVDS) output buffer.
//
// Behavioural model, not synthesizable logic: on an FPGA this is an IO pad
// primitive (an OBUFDS in the Xilinx UltraScale+ family) that drives a
// differential pair, which synthesis maps from the vendor library. The model
// has the primitive's ports: the single-ended input I, the true output O and
// the complementary output OB, which always carry opposite levels. There is
// no delay and no clock.
module lvds_obuf (
  input  logic i,
  output logic o,    // P line
  output logic ob    // N line
);
  assign o  = i;
  assign ob = ~i;
endmodule
