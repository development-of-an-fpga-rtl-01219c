`timescale 1ns / 1ps
// tb_adc_controller_two_samples: one group of two ADCs taking a series of two
// samples per trigger, the reference scenario for the group controller.
//
// Set-up, as software would do it through the register file: an offset and a
// factor for channel 1 only (channel 0 keeps offset 0 and factor 1), two
// samples per trigger, then a one-clock ENABLE. Clock 100 MHz, CLK_DIV = 0,
// no extra pre/post delay, CPOL = 1, CPHA = 0. The testbench records the
// event times of the series, checks them against the controller's timing
// and prints them:
//   dummy transfer start / end     SS_N falls / rises, n_spi - 1 clocks low
//   first raw value valid           2*n_spi + 5 edges after ENABLE
//   first converted value valid     CHANNELS + 3 = 5 clocks (50 ns) later
//   series finished (BUSY falls)    with the second converted value
// Both values of both channels are compared with the codes the ADC models
// converted and with bits RES_MSB..RES_LSB of (code + offset) * factor.
module tb_adc_controller_two_samples;
  import adc_pkg::*;

  localparam int unsigned DW = 16, CH = 2, MSB = 23, LSB = 6;
  localparam int unsigned RW = MSB - LSB + 1;
  localparam int          N_SPI = 4 + 2 * (DW + 1);
  localparam int signed   OFFSET_1 = -250, CONVERSION_1 = 5000;
  localparam int          SAMPLES = 2;

  logic clk = 1'b0, reset_n = 1'b0;
  logic enable = 1'b0, busy, raw_valid, si_valid, sclk, ss_n;
  logic [CH-1:0] miso;
  logic [CH*DW-1:0] raw_value;
  logic [CH*RW-1:0] si_value;
  logic set_offset = 0, set_conversion = 0, set_samples = 0;
  logic [CH-1:0] channel_select = '0;
  logic [31:0] value = '0;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  adc_controller #(.DATA_WIDTH(DW), .CHANNELS(CH), .RES_MSB(MSB), .RES_LSB(LSB)) dut (
    .clk, .reset_n, .enable, .busy, .raw_valid, .si_valid,
    .manual(1'b0), .ss_in_n(1'b1), .sclk_in(1'b1), .cpol(1'b1), .cpha(1'b0),
    .pre_delay('0), .post_delay('0), .clk_div('0),
    .sclk, .ss_n, .miso, .raw_value, .si_value,
    .set_offset, .set_conversion, .set_samples, .channel_select, .value);

  logic [DW-1:0] analog [CH], captured [CH], frame_code [CH];
  for (genvar k = 0; k < CH; k++) begin : g_adc
    int unsigned conversions;
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_n), .sclk(sclk), .analog(analog[k]), .sdo(miso[k]),
      .conversions(conversions));
  end

  always @(posedge ss_n) for (int c = 0; c < CH; c++) captured[c] = analog[c];

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

  int signed offs [CH] = '{0, OFFSET_1};
  int signed convs [CH] = '{1, CONVERSION_1};

  // event log of the series
  int n_fall = 0, n_rise = 0, n_raw = 0, n_si = 0;
  int c_fall [4], c_rise [4], c_raw [4], c_si [4], c_done = -1;
  logic raw_q = 1'b0, si_q = 1'b0, busy_q = 1'b0;
  bit logging = 0;

  always @(negedge ss_n) if (logging) begin
    for (int c = 0; c < CH; c++) begin
      frame_code[c] = captured[c];
      analog[c]     = DW'($urandom);
    end
    if (n_fall < 4) c_fall[n_fall] = cyc;
    n_fall++;
  end
  always @(posedge ss_n) if (logging) begin
    if (n_rise < 4) c_rise[n_rise] = cyc;
    n_rise++;
  end

  always @(negedge clk) begin
    if (logging) begin
      if (raw_valid && !raw_q) begin
        for (int c = 0; c < CH; c++)
          check(raw_value[c*DW +: DW] == frame_code[c], $sformatf("raw value channel %0d", c));
        if (n_raw < 4) c_raw[n_raw] = cyc;
        n_raw++;
      end
      if (si_valid && !si_q) begin
        for (int c = 0; c < CH; c++)
          check(si_value[c*RW +: RW] == si_ref(frame_code[c], offs[c], convs[c]),
                $sformatf("converted value channel %0d got %h exp %h", c, si_value[c*RW +: RW],
                          si_ref(frame_code[c], offs[c], convs[c])));
        if (n_si < 4) c_si[n_si] = cyc;
        n_si++;
      end
      if (!busy && busy_q) c_done = cyc;
    end
    raw_q  <= raw_valid;
    si_q   <= si_valid;
    busy_q <= busy;
  end

  task automatic set(ref logic strobe, input logic [CH-1:0] sel, input int signed v);
    @(negedge clk);
    channel_select = sel;
    value = 32'(v);
    strobe = 1'b1;
    @(negedge clk);
    strobe = 1'b0;
  endtask

  initial begin
    int t_en;
    for (int c = 0; c < CH; c++) analog[c] = DW'($urandom);
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    repeat (2) @(negedge clk);
    set(set_offset, 2'b10, OFFSET_1);
    set(set_conversion, 2'b10, CONVERSION_1);
    set(set_samples, 2'b00, SAMPLES);
    @(negedge clk);
    logging = 1;
    enable = 1'b1;
    @(negedge clk);               // the edge between has sampled ENABLE
    t_en = cyc;
    enable = 1'b0;
    wait (c_done >= 0);
    repeat (5) @(negedge clk);

    $display("event                           clock  time from ENABLE");
    $display("dummy transfer start (SS_N low)  %4d  %5d ns", c_fall[0] - t_en, 10 * (c_fall[0] - t_en));
    $display("dummy transfer end (SS_N high)   %4d  %5d ns", c_rise[0] - t_en, 10 * (c_rise[0] - t_en));
    $display("first raw value valid            %4d  %5d ns", c_raw[0] - t_en, 10 * (c_raw[0] - t_en));
    $display("first converted value valid      %4d  %5d ns", c_si[0] - t_en, 10 * (c_si[0] - t_en));
    $display("second converted value valid     %4d  %5d ns", c_si[1] - t_en, 10 * (c_si[1] - t_en));
    $display("series finished (BUSY low)       %4d  %5d ns", c_done - t_en, 10 * (c_done - t_en));

    check(n_fall == SAMPLES + 1, $sformatf("%0d transfers for %0d samples", n_fall, SAMPLES));
    check(n_raw == SAMPLES && n_si == SAMPLES, "one raw and one converted value per sample");
    check(c_rise[0] - c_fall[0] == N_SPI - 1, "dummy transfer length");
    check(c_raw[0] - t_en + 1 == 2 * N_SPI + 5, "first raw value latency");
    check(c_si[0] - c_raw[0] == CH + 3, "converted value CHANNELS + 3 clocks after the raw value");
    check(c_si[0] - t_en + 1 == 2 * N_SPI + CH + 8, "first converted value latency");
    check(c_si[1] - c_si[0] == N_SPI + CH + 5, "second sample period");
    check(c_done == c_si[1], "BUSY falls with the last converted value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
