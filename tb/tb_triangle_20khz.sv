`timescale 1ns / 1ps
// tb_triangle_20khz: the acquisition core at its default parameters, clocked
// at 200 MHz with CLK_DIV = 0 (SCLK = 100 MHz, the fastest rate the LTC2311
// allows), sampling a 20 kHz triangle on all eight ADCs.
//
// Every ltc2311_model sees the same triangle (+-30000 codes, period 50 us),
// updated once per clock. The testbench records the code each ADC converts on
// the rising edge of CNV and checks that every published RAW_VALUE equals the
// code converted at the end of the preceding transfer and that SI_VALUE
// holds bits RES_MSB..RES_LSB of (code + offset) * factor. It then measures:
//   - the SCLK period (expected 10 ns) and the frame length n_spi = 38 clocks;
//   - the time from the clock that starts the groups on a software trigger
//     (the one that clears TRIGGER) to the CNV edge that samples the value
//     of interest, i.e. the end of the dummy transfer: n_spi + 2 clocks;
//   - the SS_N low time of every transfer, n_spi - 1 clocks;
//   - the SS_N high time between the transfers of a series, which is the
//     sample-and-hold (acquisition) time of the LTC2311: 3 clocks (15 ns)
//     after the dummy transfer and CHANNELS_PER_MASTER + 6 clocks (50 ns)
//     between two samples of interest; the LTC2311 needs at least 28.5 ns;
//   - the sample period in continuous mode, n_spi + CHANNELS_PER_MASTER + 5
//     clocks (235 ns, 4.26 MS/s per ADC);
//   - that one full triangle period acquired in continuous mode reaches
//     both peaks.
// Each measured quantity counts as a mechanism; one that was never seen is a
// failure.
module tb_triangle_20khz;
  import adc_pkg::*;

  localparam int unsigned DW = 16, CPM = 4, SM = 2, MSB = 23, LSB = 6;
  localparam int unsigned RW = MSB - LSB + 1, NADC = SM * CPM;
  localparam int          AMP       = 30000;
  localparam realtime     T_TRI     = 50us;          // 20 kHz
  localparam int          N_SPI     = 4 + 2 * (DW + 1);
  localparam int          T_SAMPLE  = N_SPI + CPM + 5;
  localparam int          SAHT_DUMMY = 3;
  localparam int          SAHT_SERIES = CPM + 6;

  logic clk = 1'b0, aresetn = 1'b0;
  logic [5:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, arvalid = 0, bready = 1, rready = 1;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [NADC*DW-1:0] raw_value;
  logic [NADC*RW-1:0] si_value;
  logic [SM-1:0] raw_valid, si_valid, sclk, ss_n;
  logic [2*SM-1:0] sclk_diff;
  logic [NADC-1:0] sdo;
  logic [2*NADC-1:0] miso_diff;

  int checks = 0, failures = 0, cyc = 0;

  always #2.5 clk = ~clk;                      // 200 MHz
  always @(posedge clk) cyc++;

  ultrazohm_adc dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid),
    .s_axi_awready(awready), .s_axi_wdata(wdata), .s_axi_wstrb(wstrb),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr),
    .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready),
    .raw_value, .si_value, .raw_valid, .si_valid, .trigger_cnv('0),
    .sclk, .sclk_diff, .ss_n, .miso('0), .miso_diff);

  // ------------------------------------------------------ analog source
  logic [DW-1:0] analog;
  logic [DW-1:0] converted [SM], frame_code [SM];

  // triangle: -AMP at t = 0, +AMP at T_TRI/2
  function automatic logic [DW-1:0] triangle(input realtime t);
    real ph;
    int  v;
    ph = (t - T_TRI * $floor(t / T_TRI)) / T_TRI;
    v  = (ph < 0.5) ? int'(-AMP + 4.0 * AMP * ph) : int'(3.0 * AMP - 4.0 * AMP * ph);
    return DW'(v);
  endfunction

  always @(negedge clk) analog = triangle($realtime);

  for (genvar k = 0; k < NADC; k++) begin : g_adc
    localparam int G = k / CPM;
    int unsigned conversions;
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_n[G]), .sclk(sclk_diff[2*G]), .analog(analog), .sdo(sdo[k]),
      .conversions(conversions));
    assign miso_diff[2*k]   = sdo[k];
    assign miso_diff[2*k+1] = ~sdo[k];
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

  // ------------------------------------------------------------ monitors
  int signed offs = 0, convs = 1;
  int m_values = 0, m_sclk = 0, m_frame = 0, m_saht_dummy = 0, m_saht_series = 0;
  int m_period = 0, m_trigger_to_sample = 0, m_peaks = 0;
  int xfer_in_series [SM];
  int ss_rise_cyc [SM], ss_fall_cyc [SM], si_rise_cyc [SM];
  bit collecting = 0;
  int signed vmin = 0, vmax = 0;
  int trig_ack_cyc = -1;

  for (genvar g = 0; g < SM; g++) begin : g_mon
    always @(posedge ss_n[g]) begin
      converted[g] = analog;
      ss_rise_cyc[g] = cyc;
      if (ss_fall_cyc[g] >= 0 && aresetn) begin
        check(cyc - ss_fall_cyc[g] == N_SPI - 1, $sformatf("SS_N low %0d clocks", cyc - ss_fall_cyc[g]));
        m_frame++;
      end
      // the value of interest of a triggered series is sampled here
      if (g == 0 && xfer_in_series[0] == 1 && trig_ack_cyc >= 0) begin
        check(cyc - trig_ack_cyc == N_SPI + 2,
              $sformatf("trigger to sampling edge %0d clocks", cyc - trig_ack_cyc));
        m_trigger_to_sample++;
        trig_ack_cyc = -1;
      end
    end
    always @(negedge ss_n[g]) begin
      frame_code[g] = converted[g];
      if (ss_rise_cyc[g] >= 0) begin
        int h;
        h = cyc - ss_rise_cyc[g];
        if (xfer_in_series[g] == 1) begin
          check(h == SAHT_DUMMY, $sformatf("SS_N high after dummy %0d clocks", h));
          m_saht_dummy++;
        end else if (xfer_in_series[g] > 1) begin
          check(h == SAHT_SERIES, $sformatf("SS_N high in series %0d clocks", h));
          m_saht_series++;
        end
      end
      ss_fall_cyc[g] = cyc;
      xfer_in_series[g]++;
    end
    logic raw_q = 1'b0, si_q = 1'b0;
    always @(negedge clk) begin
      if (raw_valid[g] && !raw_q)
        for (int c = 0; c < CPM; c++)
          check(raw_value[(g*CPM+c)*DW +: DW] == frame_code[g],
                $sformatf("raw g%0d c%0d got %h exp %h", g, c, raw_value[(g*CPM+c)*DW +: DW], frame_code[g]));
      if (si_valid[g] && !si_q) begin
        for (int c = 0; c < CPM; c++)
          check(si_value[(g*CPM+c)*RW +: RW] == si_ref(frame_code[g], offs, convs),
                $sformatf("si g%0d c%0d", g, c));
        m_values++;
        if (si_rise_cyc[g] >= 0 && collecting) begin
          check(cyc - si_rise_cyc[g] == T_SAMPLE,
                $sformatf("sample period %0d clocks", cyc - si_rise_cyc[g]));
          m_period++;
        end
        si_rise_cyc[g] = cyc;
        if (g == 0 && collecting) begin
          if (int'($signed(frame_code[0])) < vmin) vmin = int'($signed(frame_code[0]));
          if (int'($signed(frame_code[0])) > vmax) vmax = int'($signed(frame_code[0]));
        end
      end
      raw_q <= raw_valid[g];
      si_q  <= si_valid[g];
    end
  end

  // SCLK period of group 0 while a frame is running
  realtime last_sclk_fall = 0;
  always @(negedge sclk[0]) begin
    if (!ss_n[0] && last_sclk_fall > 0 && $realtime - last_sclk_fall < 20ns) begin
      check($realtime - last_sclk_fall == 10ns,
            $sformatf("SCLK period %0t", $realtime - last_sclk_fall));
      m_sclk++;
    end
    last_sclk_fall = $realtime;
  end

  // ------------------------------------------------------- AXI master
  task automatic axi_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    awaddr = 6'(idx * 4); wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1;
    do @(negedge clk); while (!awready);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axi_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    araddr = 6'(idx * 4); arvalid = 1;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    arvalid = 0;
    @(negedge clk);
  endtask

  task automatic set_all(input cfg_sel_t kind, input int signed v);
    axi_write(R_ADC_MASTER_CHANNEL, 32'h3);
    axi_write(R_ADC_CHANNEL, 32'hf);
    axi_write(R_ADC_CONV_VALUE, 32'(v));
    axi_write(R_ADC_CR, (32'(kind) << C_CONFIG_VALUE_LSB) | (32'(1) << C_CONV_VALUE_VALID));
  endtask

  task automatic new_series();
    for (int g = 0; g < SM; g++) begin
      xfer_in_series[g] = 0;
      ss_rise_cyc[g]    = -1;
    end
  endtask

  // -------------------------------------------------------------- test
  initial begin
    logic [31:0] d;
    for (int g = 0; g < SM; g++) begin
      ss_fall_cyc[g] = -1; si_rise_cyc[g] = -1;
    end
    new_series();
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    repeat (2) @(negedge clk);
    for (int g = 0; g < SM; g++) ss_fall_cyc[g] = -1;
    axi_write(R_ADC_AVAILABLE, 32'h3);
    axi_write(R_ADC_SPI_CFGR, 32'h0);           // CLK_DIV 0, no extra delays
    set_all(CFG_OFFSET, 100);
    offs = 100;
    set_all(CFG_CONVERSION, 3);
    convs = 3;
    set_all(CFG_SAMPLES, 4);                    // four samples per trigger

    // triggered series of four samples, as in the hardware measurement
    repeat (3) begin
      repeat (200) @(negedge clk);
      new_series();
      axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
      // the acknowledge clears TRIGGER in the clock the groups start
      while (dut.adc_cr[C_TRIGGER]) @(posedge clk);
      trig_ack_cyc = cyc - 1;
      do axi_read(R_ADC_MASTER_BUSY, d); while (d[1:0] != 2'b00);
    end

    // continuous mode for one triangle period plus a little
    set_all(CFG_SAMPLES, 1);
    new_series();
    axi_write(R_ADC_CR, 32'(1) << C_MODE);
    repeat (4 * T_SAMPLE) @(negedge clk);
    collecting = 1;
    vmin = 0; vmax = 0;
    #(T_TRI + 1us);
    collecting = 0;
    axi_write(R_ADC_CR, 32'h0);
    do axi_read(R_ADC_MASTER_BUSY, d); while (d[1:0] != 2'b00);
    // a step of the triangle between samples is 4*AMP*235ns/50us = 564 codes
    check(vmax > AMP - 600 && vmin < -AMP + 600,
          $sformatf("triangle peaks seen %0d .. %0d", vmin, vmax));
    if (vmax > AMP - 600 && vmin < -AMP + 600) m_peaks++;

    $display("values %0d, sclk periods %0d, frames %0d, saht after dummy %0d (%0d ns), saht in series %0d (%0d ns), sample periods %0d, trigger-to-sample %0d, peaks %0d",
             m_values, m_sclk, m_frame, m_saht_dummy, SAHT_DUMMY * 5, m_saht_series,
             SAHT_SERIES * 5, m_period, m_trigger_to_sample, m_peaks);
    check(m_values > 0, "values published");
    check(m_sclk > 0, "SCLK period measured");
    check(m_frame > 0, "frame length measured");
    check(m_saht_dummy > 0, "SS_N high time after the dummy transfer measured");
    check(m_saht_series > 0, "SS_N high time within a series measured");
    check(m_period > 0, "continuous sample period measured");
    check(m_trigger_to_sample > 0, "trigger to sampling instant measured");
    check(m_peaks > 0, "triangle acquired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
