`timescale 1ns / 1ps
// raw_to_si: pipelined conversion of a raw ADC code to a scaled value.
//
// Computes MULT = (AIN + DIN) * BIN, or (AIN - DIN) * BIN when SUBADD = 1,
// on signed two's-complement operands, in the shape of a DSP48E2 slice: an
// input register stage (A, B, D), a pre-adder register and a multiplier
// register. The pre-adder result is one bit wider than AIN so it cannot
// overflow, and the product is kept at full width (AWIDTH + BWIDTH + 1 bits);
// the caller selects the slice it needs.
//
// Timing: a new operand set may be applied every clock; its product appears on
// MULT three rising edges later (latency 3, throughput 1 per cycle). There is
// no handshake: the caller knows the fixed latency and counts cycles.
//
// The structure and latency follow the published conversion unit. The second
// register on the B path (so that each factor meets the sum computed from the
// operands applied with it) and the absence of a reset on the data registers
// (as in a DSP slice) are this implementation's choices. DWIDTH must not
// exceed AWIDTH.
module raw_to_si #(
  parameter int unsigned AWIDTH = 16,  // raw value
  parameter int unsigned BWIDTH = 18,  // conversion factor
  parameter int unsigned DWIDTH = 16   // offset
) (
  input  logic                           clk,
  input  logic                           subadd,  // 1: subtract the offset
  input  logic signed [AWIDTH-1:0]       ain,
  input  logic signed [BWIDTH-1:0]       bin,
  input  logic signed [DWIDTH-1:0]       din,
  output logic signed [AWIDTH+BWIDTH:0]  mult
);

  logic signed [AWIDTH-1:0]  s_a;
  logic signed [BWIDTH-1:0]  s_b, s_b2;
  logic signed [DWIDTH-1:0]  s_d;
  logic                      s_subadd;
  logic signed [AWIDTH:0]    s_add;
  logic signed [AWIDTH+BWIDTH:0] s_mult;

  always_ff @(posedge clk) begin
    // stage 1: input registers
    s_a      <= ain;
    s_b      <= bin;
    s_d      <= din;
    s_subadd <= subadd;
    // stage 2: pre-adder
    if (s_subadd) s_add <= (AWIDTH+1)'(s_a) - (AWIDTH+1)'(s_d);
    else          s_add <= (AWIDTH+1)'(s_a) + (AWIDTH+1)'(s_d);
    s_b2 <= s_b;
    // stage 3: multiplier
    s_mult <= (AWIDTH+BWIDTH+1)'(s_add) * (AWIDTH+BWIDTH+1)'(s_b2);
  end

  assign mult = s_mult;

endmodule
