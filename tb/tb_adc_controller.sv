`timescale 1ns / 1ps
// tb_adc_controller: self-checking testbench of adc_controller.
//
// Four ltc2311_model ADCs share the group's SCLK and SS_N; every ADC gets a
// new random code at the start of each transfer, and the testbench remembers
// which code each transfer must return (the one converted when the previous
// transfer ended). The test programs a distinct offset and factor per channel
// and checks:
//   * triggered series of 3 samples: one dummy transfer plus one transfer per
//     sample, raw values equal the codes converted after the trigger, scaled
//     values equal bits RES_MSB..RES_LSB of (raw + offset) * factor;
//   * the cycle counts: RAW_VALID after 2*n_spi + 5 and SI_VALID after
//     2*n_spi + CHANNELS + 8 clock edges counted from the edge that samples
//     ENABLE (both included), and n_spi + CHANNELS + 5 per further sample;
//   * continuous operation (ENABLE held high): series follow each other
//     without a further dummy transfer, and the group stops when ENABLE drops;
//   * manual SS_N/SCLK control in IDLE.
module tb_adc_controller;
  import adc_pkg::*;

  localparam int unsigned DW = 16, CH = 4, OW = 16, CW = 18, MSB = 23, LSB = 6;
  localparam int unsigned RW = MSB - LSB + 1;
  localparam int DIV = 0, PRE = 1, POST = 2;
  localparam int NSPI = 4 + PRE + POST + 2*(DW+1)*(DIV+1);

  logic clk = 1'b0, reset_n = 1'b0;
  logic enable = 1'b0, busy, raw_valid, si_valid;
  logic manual = 1'b0, ss_in_n = 1'b1, sclk_in = 1'b1;
  logic sclk, ss_n;
  logic [CH-1:0] miso;
  logic [CH*DW-1:0] raw_value;
  logic [CH*RW-1:0] si_value;
  logic set_offset = 0, set_conversion = 0, set_samples = 0;
  logic [CH-1:0] channel_select = '0;
  logic [31:0] value = '0;

  logic [DW-1:0] analog [CH], captured [CH], frame_code [CH];
  int unsigned conversions [CH];
  int signed offs [CH], convs [CH];
  int checks = 0, failures = 0;
  int cyc = 0, transfers = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  adc_controller #(.DATA_WIDTH(DW), .CHANNELS(CH), .OFFSET_WIDTH(OW),
                   .CONVERSION_WIDTH(CW), .RES_MSB(MSB), .RES_LSB(LSB)) dut (
    .clk, .reset_n, .enable, .busy, .raw_valid, .si_valid, .manual, .ss_in_n,
    .sclk_in, .cpol(1'b1), .cpha(1'b0), .pre_delay(8'(PRE)), .post_delay(8'(POST)),
    .clk_div(16'(DIV)), .sclk, .ss_n, .miso, .raw_value, .si_value, .set_offset,
    .set_conversion, .set_samples, .channel_select, .value);

  for (genvar c = 0; c < CH; c++) begin : g_adc
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_n), .sclk(sclk), .analog(analog[c]), .sdo(miso[c]),
      .conversions(conversions[c]));
  end

  always @(posedge ss_n) for (int c = 0; c < CH; c++) captured[c] = analog[c];
  always @(negedge ss_n) begin
    transfers++;
    for (int c = 0; c < CH; c++) begin
      frame_code[c] = captured[c];
      analog[c]     = DW'($urandom);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [RW-1:0] si_ref(input logic [DW-1:0] raw, input int signed off,
                                           input int signed cv);
    longint p;
    p = (longint'($signed(raw)) + longint'(off)) * longint'(cv);
    return RW'(p >>> LSB);
  endfunction

  task automatic check_values(input string tag);
    for (int c = 0; c < CH; c++) begin
      check(raw_value[c*DW +: DW] == frame_code[c],
            $sformatf("%s raw ch%0d got %h exp %h", tag, c, raw_value[c*DW +: DW], frame_code[c]));
      check(si_value[c*RW +: RW] == si_ref(frame_code[c], offs[c], convs[c]),
            $sformatf("%s si ch%0d got %h exp %h", tag, c, si_value[c*RW +: RW],
                      si_ref(frame_code[c], offs[c], convs[c])));
    end
  endtask

  task automatic set_param(input int which, input int ch, input int signed v);
    @(negedge clk);
    channel_select = CH'(1) << ch;
    value = 32'(v);
    set_offset = (which == 0); set_conversion = (which == 1); set_samples = (which == 2);
    @(negedge clk);
    set_offset = 0; set_conversion = 0; set_samples = 0; channel_select = '0;
  endtask

  // waits for the next rising edge of a flag; returns the cycle counter
  task automatic wait_rise(input bit which_si, output int at);
    logic prev;
    prev = which_si ? si_valid : raw_valid;
    forever begin
      @(negedge clk);
      if ((which_si ? si_valid : raw_valid) && !prev) break;
      prev = which_si ? si_valid : raw_valid;
    end
    at = cyc;
  endtask

  initial begin
    int t0, t_raw, t_si, t_prev_si, tr0, n_series;
    for (int c = 0; c < CH; c++) analog[c] = DW'($urandom);
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    @(negedge clk);
    check(!busy && !raw_valid && !si_valid && ss_n, "reset state");
    for (int c = 0; c < CH; c++) begin
      offs[c]  = int'($urandom_range(0, 4000)) - 2000;
      convs[c] = int'($urandom_range(0, 100000)) - 50000;
      set_param(0, c, offs[c]);
      set_param(1, c, convs[c]);
    end
    set_param(2, 0, 3);

    // ---- triggered series of three samples
    tr0 = transfers;
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    t0 = cyc;                       // edge that sampled ENABLE
    check(busy, "busy after trigger");
    wait_rise(1'b0, t_raw);
    check(t_raw - t0 + 1 == 2*NSPI + 5, $sformatf("raw latency %0d", t_raw - t0 + 1));
    wait_rise(1'b1, t_si);
    check(t_si - t0 + 1 == 2*NSPI + CH + 8, $sformatf("si latency %0d", t_si - t0 + 1));
    check_values("s1");
    t_prev_si = t_si;
    for (int s = 2; s <= 3; s++) begin
      wait_rise(1'b1, t_si);
      check(t_si - t_prev_si == NSPI + CH + 5, $sformatf("sample period %0d", t_si - t_prev_si));
      check_values($sformatf("s%0d", s));
      t_prev_si = t_si;
    end
    @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after series");
    check(transfers - tr0 == 4, $sformatf("transfers per series %0d", transfers - tr0));

    // ---- continuous operation, one sample per series
    set_param(2, 0, 1);
    tr0 = transfers;
    @(negedge clk);
    enable = 1'b1;
    n_series = 0;
    wait_rise(1'b1, t_prev_si);
    check_values("c0");
    n_series++;
    for (int s = 1; s < 5; s++) begin
      wait_rise(1'b1, t_si);
      check(t_si - t_prev_si == NSPI + CH + 5, $sformatf("continuous period %0d", t_si - t_prev_si));
      check_values($sformatf("c%0d", s));
      t_prev_si = t_si;
      n_series++;
    end
    enable = 1'b0;
    wait (!busy);
    check(transfers - tr0 == n_series + 1 || transfers - tr0 == n_series + 2,
          $sformatf("continuous: one dummy only (%0d transfers, %0d series)",
                    transfers - tr0, n_series));

    // ---- manual control
    repeat (2) @(negedge clk);
    manual = 1'b1; ss_in_n = 1'b0; sclk_in = 1'b0;
    repeat (2) @(negedge clk);
    check(!ss_n && !sclk, "manual levels");
    manual = 1'b0;
    repeat (2) @(negedge clk);
    check(ss_n && sclk, "manual released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
