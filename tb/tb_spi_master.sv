`timescale 1ns / 1ps
// tb_spi_master: self-checking testbench of spi_master.
//
// Two ltc2311_model instances share SCLK and SS_N. For several timing
// configurations (clock divider, pre and post delay, CPOL/CPHA) the testbench
// runs transfers and checks: the received codes (each transfer returns the
// code converted at the end of the previous one), the number of falling SCLK
// edges per frame, the SCLK idle level, the transfer time in clock edges
// (4 + PRE + POST + 2*(DATA_WIDTH+1)*(CLK_DIV+1), plus CLK_DIV+1 for CPHA = 1)
// and the manual control of SS_N and SCLK in IDLE.
module tb_spi_master;
  import adc_pkg::*;

  localparam int unsigned DW = 16;
  localparam int unsigned CH = 2;

  logic clk = 1'b0;
  logic reset_n = 1'b0;
  logic [CH*DW-1:0] rx_data;
  logic cpha = 1'b0, cpol = 1'b1;
  logic sclk, sclk_in = 1'b1, ss_out_n, ss_in_n = 1'b1, manual = 1'b0;
  logic [CH-1:0] miso;
  logic busy, enable = 1'b0;
  logic [C_DELAY_WIDTH-1:0] pre_delay = '0, post_delay = '0;
  logic [C_CLK_DIV_WIDTH-1:0] clk_div = '0;
  logic [DW-1:0] analog [CH];
  logic [DW-1:0] captured [CH];
  int unsigned conversions [CH];
  int checks = 0, failures = 0;
  int falls = 0;

  always #5 clk = ~clk;

  spi_master #(.DATA_WIDTH(DW), .CHANNELS(CH)) dut (
    .clk, .reset_n, .rx_data, .cpha, .cpol, .sclk, .sclk_in, .miso,
    .ss_out_n, .ss_in_n, .manual, .busy, .enable, .pre_delay, .post_delay,
    .clk_div);

  for (genvar c = 0; c < CH; c++) begin : g_adc
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_out_n), .sclk(sclk), .analog(analog[c]), .sdo(miso[c]),
      .conversions(conversions[c]));
  end

  // reference: the code each ADC converts at the rising edge of SS_N
  always @(posedge ss_out_n) for (int c = 0; c < CH; c++) captured[c] = analog[c];
  always @(negedge sclk) if (!ss_out_n) falls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One transfer; returns its length in cycles (inclusive count).
  task automatic transfer(input int div, input int pre, input int post,
                          input bit pol, input bit pha, input bit check_data);
    int cycles;
    logic [DW-1:0] expect_code [CH];
    for (int c = 0; c < CH; c++) expect_code[c] = captured[c];
    // new codes for the conversion that starts at the end of this frame
    for (int c = 0; c < CH; c++) analog[c] = DW'($urandom);
    @(negedge clk);
    clk_div = C_CLK_DIV_WIDTH'(div); pre_delay = C_DELAY_WIDTH'(pre);
    post_delay = C_DELAY_WIDTH'(post); cpol = pol; cpha = pha;
    @(negedge clk);   // latched in IDLE
    check(sclk == pol, "SCLK idle level");
    falls = 0;
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    cycles = 2;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    // cycles counts from the ENABLE cycle to the first idle cycle; the
    // clock edges from the one sampling ENABLE to the one publishing the
    // frame are one fewer
    check(cycles - 1 == 4 + pre + post + 2*(DW+1)*(div+1) + (pha ? div+1 : 0),
          $sformatf("latency %0d (div=%0d pre=%0d post=%0d cpha=%0d)",
                    cycles, div, pre, post, pha));
    check(falls == DW + 1, $sformatf("falling SCLK edges %0d", falls));
    check(ss_out_n == 1'b1, "SS_N high after frame");
    if (check_data)
      for (int c = 0; c < CH; c++)
        check(rx_data[c*DW +: DW] == expect_code[c],
              $sformatf("data ch%0d got %h exp %h", c, rx_data[c*DW +: DW], expect_code[c]));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < CH; c++) analog[c] = '0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    repeat (2) @(negedge clk);
    check(ss_out_n == 1'b1 && sclk == 1'b1 && !busy, "reset state");
    // first frame returns the power-up content: data not checked
    transfer(0, 0, 0, 1'b1, 1'b0, 1'b0);
    transfer(0, 0, 0, 1'b1, 1'b0, 1'b1);
    transfer(1, 2, 3, 1'b1, 1'b0, 1'b1);
    transfer(3, 5, 1, 1'b1, 1'b0, 1'b1);
    transfer(2, 0, 7, 1'b1, 1'b0, 1'b1);
    // CPOL = 0, CPHA = 1: still sampled on falling edges
    transfer(0, 1, 1, 1'b0, 1'b1, 1'b1);
    transfer(2, 3, 0, 1'b0, 1'b1, 1'b1);
    for (int i = 0; i < 6; i++)
      transfer(int'($urandom_range(0, 3)), int'($urandom_range(0, 9)),
               int'($urandom_range(0, 9)), 1'b1, 1'b0, 1'b1);
    // manual control in IDLE
    @(negedge clk);
    manual = 1'b1; ss_in_n = 1'b0; sclk_in = 1'b0;
    @(negedge clk);
    check(ss_out_n == 1'b0 && sclk == 1'b0, "manual levels low");
    ss_in_n = 1'b1; sclk_in = 1'b1;
    @(negedge clk);
    check(ss_out_n == 1'b1 && sclk == 1'b1, "manual levels high");
    manual = 1'b0; sclk_in = 1'b0; ss_in_n = 1'b0;
    @(negedge clk);
    check(ss_out_n == 1'b1 && sclk == cpol, "manual released");
    check(conversions[0] == conversions[1] && conversions[0] >= 13, "conversion count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
