`timescale 1ns / 1ps
// tb_ultrazohm_adc: end-to-end testbench of the acquisition core at its
// default parameters (2 groups of 4 ADCs, 16-bit data, differential IO).
//
// Eight ltc2311_model ADCs are attached through the LVDS pairs; an AXI4-Lite
// master task set programs the core the way driver software would. A monitor
// per group compares every RAW_VALUE / SI_VALUE update with a reference: the
// code each ADC converted when the previous transfer ended, and bits
// RES_MSB..RES_LSB of (code + offset) * factor with the offset and factor the
// test programmed. The test takes the core through each mechanism it has and
// counts how often each happened; a mechanism that never happened counts as a
// failure:
//   parameter updates (offset, factor, sample count, acknowledged by
//   hardware), software trigger of both groups, hardware trigger with the
//   latency 2*n_spi + CHANNELS_PER_MASTER + 9, a hardware trigger queued while
//   the group is busy, a software trigger waiting for a busy group, a trigger
//   refused for an unavailable group, the dummy transfer in front of each
//   series, multi-sample series, a change of SPI timing at run time,
//   continuous mode, manual SS_N/SCLK control with its status bits, and the
//   software reset.
module tb_ultrazohm_adc;
  import adc_pkg::*;

  localparam int unsigned DW = 16, CPM = 4, SM = 2, MSB = 23, LSB = 6;
  localparam int unsigned RW = MSB - LSB + 1, NADC = SM * CPM;

  logic clk = 1'b0, aresetn = 1'b0;
  logic [5:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, arvalid = 0, bready = 1, rready = 1;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [NADC*DW-1:0] raw_value;
  logic [NADC*RW-1:0] si_value;
  logic [SM-1:0] raw_valid, si_valid, trigger_cnv = '0, sclk, ss_n;
  logic [2*SM-1:0] sclk_diff;
  logic [NADC-1:0] sdo;
  logic [2*NADC-1:0] miso_diff;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
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
    .raw_value, .si_value, .raw_valid, .si_valid, .trigger_cnv,
    .sclk, .sclk_diff, .ss_n, .miso('0), .miso_diff);

  // ------------------------------------------------------------ ADCs
  logic [DW-1:0] analog [NADC], captured [NADC], frame_code [NADC];
  int unsigned conversions [NADC];
  int transfers [SM];

  for (genvar k = 0; k < NADC; k++) begin : g_adc
    localparam int G = k / CPM;
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_n[G]), .sclk(sclk_diff[2*G]), .analog(analog[k]), .sdo(sdo[k]),
      .conversions(conversions[k]));
    assign miso_diff[2*k]   = sdo[k];
    assign miso_diff[2*k+1] = ~sdo[k];
  end

  // ----------------------------------------------------- reference model
  int signed offs [NADC], convs [NADC];
  int si_events [SM], raw_events [SM];
  int last_si_cyc [SM], last_raw_cyc [SM];
  int m_lvds = 0;

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

  for (genvar g = 0; g < SM; g++) begin : g_mon
    always @(posedge ss_n[g])
      for (int c = 0; c < CPM; c++) captured[g*CPM+c] = analog[g*CPM+c];
    always @(negedge ss_n[g]) begin
      transfers[g]++;
      for (int c = 0; c < CPM; c++) begin
        frame_code[g*CPM+c] = captured[g*CPM+c];
        analog[g*CPM+c]     = DW'($urandom);
      end
    end
    logic raw_q = 1'b0, si_q = 1'b0;
    always @(negedge clk) begin
      if (raw_valid[g] && !raw_q) begin
        raw_events[g]++;
        last_raw_cyc[g] = cyc;
        for (int c = 0; c < CPM; c++) begin
          int k;
          k = g*CPM + c;
          check(raw_value[k*DW +: DW] == frame_code[k],
                $sformatf("raw g%0d c%0d got %h exp %h", g, c, raw_value[k*DW +: DW], frame_code[k]));
        end
      end
      if (si_valid[g] && !si_q) begin
        si_events[g]++;
        last_si_cyc[g] = cyc;
        for (int c = 0; c < CPM; c++) begin
          int k;
          k = g*CPM + c;
          check(si_value[k*RW +: RW] == si_ref(frame_code[k], offs[k], convs[k]),
                $sformatf("si g%0d c%0d got %h exp %h", g, c, si_value[k*RW +: RW],
                          si_ref(frame_code[k], offs[k], convs[k])));
        end
      end
      raw_q <= raw_valid[g];
      si_q  <= si_valid[g];
      if (sclk_diff[2*g+1] != ~sclk[g] || sclk_diff[2*g] != sclk[g]) begin
        checks++; failures++;
        $display("FAIL SCLK pair of group %0d", g);
      end else if (!sclk[g]) m_lvds++;
    end
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

  // ------------------------------------------------------ driver tasks
  int m_cfg [3] = '{0, 0, 0};

  // value kind: 0 offset, 1 factor, 2 samples; group and channel one-hot
  task automatic set_value(input int kind, input int g, input int c, input int signed v);
    logic [31:0] d;
    axi_write(R_ADC_MASTER_CHANNEL, 32'(1) << g);
    axi_write(R_ADC_CHANNEL, 32'(1) << c);
    axi_write(R_ADC_CONV_VALUE, 32'(v));
    axi_write(R_ADC_CR, (32'(kind) << C_CONFIG_VALUE_LSB) | (32'(1) << C_CONV_VALUE_VALID));
    axi_read(R_ADC_CR, d);
    check(!d[C_CONV_VALUE_VALID], "CONV_VALUE_VALID acknowledged");
    m_cfg[kind]++;
    if (kind == 0) offs[g*CPM+c] = v;
    if (kind == 1) convs[g*CPM+c] = v;
  endtask

  task automatic wait_idle();
    logic [31:0] d;
    // let a just-written trigger reach the busy register first
    repeat (8) @(negedge clk);
    do axi_read(R_ADC_MASTER_BUSY, d); while (d[SM-1:0] != '0);
  endtask

  function automatic int nspi(input int div, input int pre, input int post);
    return 4 + pre + post + 2*(DW+1)*(div+1);
  endfunction

  // -------------------------------------------------------------- test
  int m_sw_trigger = 0, m_hw_trigger = 0, m_hw_queued = 0, m_sw_wait = 0;
  int m_unavailable = 0, m_dummy = 0, m_multi = 0, m_timing = 0;
  int m_continuous = 0, m_manual = 0, m_sw_reset = 0;

  initial begin
    logic [31:0] d;
    int t0, ev0 [SM], tr0 [SM];
    for (int k = 0; k < NADC; k++) begin
      analog[k] = DW'($urandom);
      offs[k] = 0;
      convs[k] = 1;
    end
    for (int g = 0; g < SM; g++) begin
      transfers[g] = 0; si_events[g] = 0; raw_events[g] = 0;
    end
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    @(negedge clk);
    check(ss_n == '1 && sclk == '1 && raw_valid == '0 && si_valid == '0, "reset state");

    axi_write(R_ADC_AVAILABLE, 32'h3);
    for (int k = 0; k < NADC; k++) begin
      set_value(0, k / CPM, k % CPM, int'($urandom_range(0, 4000)) - 2000);
      set_value(1, k / CPM, k % CPM, int'($urandom_range(0, 100000)) - 50000);
    end
    set_value(2, 0, 0, 1);
    set_value(2, 1, 0, 2);

    // ---- software trigger of both groups
    for (int g = 0; g < SM; g++) begin ev0[g] = si_events[g]; tr0[g] = transfers[g]; end
    axi_write(R_ADC_MASTER_CHANNEL, 32'h3);
    axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
    wait_idle();
    axi_read(R_ADC_CR, d);
    check(!d[C_TRIGGER], "TRIGGER acknowledged");
    check(si_events[0] - ev0[0] == 1 && si_events[1] - ev0[1] == 2, "software trigger samples");
    check(transfers[0] - tr0[0] == 2 && transfers[1] - tr0[1] == 3, "dummy transfer per series");
    if (si_events[0] - ev0[0] == 1) m_sw_trigger++;
    if (transfers[1] - tr0[1] == 3) begin m_dummy++; m_multi++; end
    axi_read(R_ADC_MASTER_FINISH, d);
    check(d[SM-1:0] == '1, "ADC_MASTER_FINISH");
    axi_read(R_ADC_MASTER_SI_FIN, d);
    check(d[SM-1:0] == '1, "ADC_MASTER_SI_FINISH");

    // ---- hardware trigger and its latency
    @(negedge clk);
    ev0[0] = si_events[0]; ev0[1] = si_events[1];
    trigger_cnv = 2'b01;
    @(negedge clk);
    t0 = cyc;
    trigger_cnv = 2'b00;
    wait (si_events[0] == ev0[0] + 1);
    check(last_si_cyc[0] - t0 + 1 == 2*nspi(0, 0, 0) + CPM + 9,
          $sformatf("hardware trigger latency %0d", last_si_cyc[0] - t0 + 1));
    check(last_raw_cyc[0] - t0 + 1 == 2*nspi(0, 0, 0) + 6, "raw latency");
    check(si_events[1] == ev0[1], "other group not triggered");
    m_hw_trigger++;

    // ---- SPI timing changed at run time, then a queued hardware trigger
    axi_write(R_ADC_SPI_CFGR, {8'd3, 8'd2, 16'd1});
    @(negedge clk);
    ev0[1] = si_events[1]; tr0[1] = transfers[1];
    trigger_cnv = 2'b10;
    @(negedge clk);
    t0 = cyc;
    trigger_cnv = 2'b00;
    repeat (30) @(negedge clk);
    trigger_cnv = 2'b10;           // group 1 busy: request must wait
    @(negedge clk);
    trigger_cnv = 2'b00;
    wait (si_events[1] == ev0[1] + 1);
    check(last_si_cyc[1] - t0 + 1 == 2*nspi(1, 2, 3) + CPM + 9,
          $sformatf("latency with CLK_DIV=1 %0d", last_si_cyc[1] - t0 + 1));
    m_timing++;
    wait (si_events[1] == ev0[1] + 4);
    wait_idle();
    check(si_events[1] - ev0[1] == 4 && transfers[1] - tr0[1] == 6, "queued hardware trigger");
    if (si_events[1] - ev0[1] == 4) m_hw_queued++;
    axi_write(R_ADC_SPI_CFGR, 32'h0);

    // ---- software trigger waits for a busy group
    ev0[0] = si_events[0];
    axi_write(R_ADC_MASTER_CHANNEL, 32'h1);
    @(negedge clk);
    trigger_cnv = 2'b01;
    @(negedge clk);
    trigger_cnv = 2'b00;
    axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
    axi_read(R_ADC_CR, d);
    check(d[C_TRIGGER], "software trigger pending while busy");
    wait (si_events[0] == ev0[0] + 2);
    wait_idle();
    check(si_events[0] - ev0[0] == 2, "software trigger after busy group");
    if (d[C_TRIGGER] && si_events[0] - ev0[0] == 2) m_sw_wait++;

    // ---- unavailable group is not started
    axi_write(R_ADC_AVAILABLE, 32'h1);
    tr0[1] = transfers[1];
    @(negedge clk);
    trigger_cnv = 2'b10;
    @(negedge clk);
    trigger_cnv = 2'b00;
    axi_write(R_ADC_MASTER_CHANNEL, 32'h2);
    axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
    repeat (200) @(negedge clk);
    check(transfers[1] == tr0[1], "unavailable group stays idle");
    if (transfers[1] == tr0[1]) m_unavailable++;
    axi_write(R_ADC_AVAILABLE, 32'h3);

    // ---- continuous mode
    for (int g = 0; g < SM; g++) begin ev0[g] = si_events[g]; tr0[g] = transfers[g]; end
    axi_write(R_ADC_CR, 32'(1) << C_MODE);
    wait (si_events[0] >= ev0[0] + 4 && si_events[1] >= ev0[1] + 4);
    axi_write(R_ADC_CR, 32'h0);
    wait_idle();
    for (int g = 0; g < SM; g++) begin
      int n;
      n = si_events[g] - ev0[g];
      check(transfers[g] - tr0[g] == n + 1, $sformatf("continuous g%0d: %0d transfers for %0d samples",
                                                      g, transfers[g] - tr0[g], n));
    end
    if (transfers[0] - tr0[0] == si_events[0] - ev0[0] + 1) m_continuous++;

    // ---- manual control of group 1
    axi_write(R_ADC_MASTER_CHANNEL, 32'h2);
    axi_write(R_ADC_SPI_CR, (32'(1) << C_SPI_CPOL) | (32'(1) << C_SPI_CONTROL));
    repeat (4) @(negedge clk);
    check(ss_n == 2'b01 && sclk == 2'b01, "manual low levels on group 1 only");
    axi_read(R_ADC_SPI_CR, d);
    check(d[C_SPI_CONTROL_STATUS] && !d[C_SPI_SS_N_STATUS] && !d[C_SPI_SCLK_STATUS], "manual status low");
    axi_write(R_ADC_SPI_CR, 32'h55);
    repeat (4) @(negedge clk);
    check(ss_n == 2'b11 && sclk == 2'b11, "manual high levels");
    axi_read(R_ADC_SPI_CR, d);
    check(d[C_SPI_CONTROL_STATUS] && d[C_SPI_SS_N_STATUS] && d[C_SPI_SCLK_STATUS], "manual status high");
    if (d[C_SPI_CONTROL_STATUS]) m_manual++;
    axi_write(R_ADC_SPI_CR, 32'h40);
    repeat (4) @(negedge clk);
    axi_read(R_ADC_SPI_CR, d);
    check(!d[C_SPI_CONTROL_STATUS], "manual mode left");

    // ---- software reset
    axi_write(R_ADC_CR, 32'(1) << C_SW_RESET);
    axi_read(R_ADC_AVAILABLE, d);
    check(d == 0, "software reset clears ADC_AVAILABLE");
    axi_read(R_ADC_SPI_CR, d);
    check(d[7:6] == 2'b01, "software reset restores CPOL");
    check(raw_valid == '0 && si_valid == '0, "software reset clears valid flags");
    for (int k = 0; k < NADC; k++) begin offs[k] = 0; convs[k] = 1; end
    ev0[0] = si_events[0];
    axi_write(R_ADC_AVAILABLE, 32'h1);
    axi_write(R_ADC_MASTER_CHANNEL, 32'h1);
    axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
    wait_idle();
    check(si_events[0] - ev0[0] == 1, "conversion with reset parameters");
    if (si_events[0] - ev0[0] == 1) m_sw_reset++;

    // ---- every mechanism must have happened
    begin
      string names [14] = '{"cfg offset", "cfg factor", "cfg samples", "sw trigger",
                            "hw trigger", "hw queued", "sw wait", "unavailable", "dummy",
                            "multi sample", "spi timing", "continuous", "manual", "sw reset"};
      int counts [14];
      counts = '{m_cfg[0], m_cfg[1], m_cfg[2], m_sw_trigger, m_hw_trigger, m_hw_queued,
                 m_sw_wait, m_unavailable, m_dummy, m_multi, m_timing, m_continuous,
                 m_manual, m_sw_reset};
      for (int i = 0; i < 14; i++) begin
        $display("mechanism %-13s happened %0d times", names[i], counts[i]);
        check(counts[i] > 0, {"mechanism never happened: ", names[i]});
      end
      check(m_lvds > 0, "LVDS pair toggled");
    end
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
