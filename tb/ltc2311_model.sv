`timescale 1ns / 1ps
// ltc2311_model: behavioural model of the serial interface of one LTC2311
// 16-bit SAR ADC, for simulation only.
//
// A rising edge of CNV (the SS_N line) samples the analog input, here the
// code on ANALOG, and starts a conversion. While CNV is low the result of the
// previous conversion is shifted out on SDO: the MSB appears T_DOUT after the
// falling edge of CNV and every falling SCLK edge presents the next bit T_DOUT
// later. The model presents DATA_WIDTH+1 bit times, the MSB twice, so a master
// that samples DATA_WIDTH+1 times on falling edges and keeps the last
// DATA_WIDTH bits receives the code MSB first. After power-up the output
// register holds a random code. CONVERSIONS counts the conversions started.
module ltc2311_model #(
  parameter int unsigned DATA_WIDTH = 16,
  parameter realtime     T_DOUT     = 2ns
) (
  input  logic                  cnv,     // SS_N
  input  logic                  sclk,
  input  logic [DATA_WIDTH-1:0] analog,  // code the next conversion returns
  output logic                  sdo,
  output int unsigned           conversions
);

  logic [DATA_WIDTH-1:0] result;
  logic [DATA_WIDTH:0]   frame;
  int                    idx;

  initial begin
    result      = DATA_WIDTH'($urandom);
    conversions = 0;
    sdo         = 1'b0;
    idx         = 0;
    frame       = '0;
  end

  always @(posedge cnv) begin
    result      = analog;
    conversions = conversions + 1;
  end

  always @(negedge cnv) begin
    frame = {result[DATA_WIDTH-1], result};
    idx   = DATA_WIDTH;
    sdo <= #(T_DOUT) frame[DATA_WIDTH];
  end

  always @(negedge sclk) begin
    if (!cnv) begin
      if (idx > 0) idx = idx - 1;
      sdo <= #(T_DOUT) frame[idx];
    end
  end

endmodule
