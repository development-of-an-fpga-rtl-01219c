`timescale 1ns / 1ps
// tb_ultrazohm_adc_single: the acquisition core built without LVDS buffers
// (DIFFERENTIAL = 0) and as one group of eight ADCs (SPI_MASTER = 1,
// CHANNELS_PER_MASTER = 8), so that all eight channels share one multiplier.
//
// Eight ltc2311_model ADCs drive the single-ended MISO inputs. The test
// programs a different offset and factor for every channel, then runs a
// software-triggered series of two samples, a hardware trigger and a short
// stretch of continuous mode. Every RAW_VALUE / SI_VALUE update is compared
// with the code the ADC converted at the end of the previous transfer and
// with bits RES_MSB..RES_LSB of (code + offset) * factor. It also checks
// that SCLK_DIFF stays low, that the hardware-trigger latency is
// 2*n_spi + 8 + 9 clocks and that in continuous mode a new value arrives
// every n_spi + 8 + 5 clocks. Each of these mechanisms is counted; one that
// never happened is a failure.
module tb_ultrazohm_adc_single;
  import adc_pkg::*;

  localparam int unsigned DW = 16, CPM = 8, SM = 1, MSB = 23, LSB = 6;
  localparam int unsigned RW = MSB - LSB + 1, NADC = SM * CPM;
  localparam int          N_SPI = 4 + 2 * (DW + 1);

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
  logic [NADC-1:0] miso;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ultrazohm_adc #(
    .CHANNELS_PER_MASTER(CPM), .SPI_MASTER(SM), .DIFFERENTIAL(1'b0)
  ) dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid),
    .s_axi_awready(awready), .s_axi_wdata(wdata), .s_axi_wstrb(wstrb),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr),
    .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready),
    .raw_value, .si_value, .raw_valid, .si_valid, .trigger_cnv,
    .sclk, .sclk_diff, .ss_n, .miso, .miso_diff('0));

  // ------------------------------------------------------------ ADCs
  logic [DW-1:0] analog [NADC], captured [NADC], frame_code [NADC];

  for (genvar k = 0; k < NADC; k++) begin : g_adc
    int unsigned conversions;
    ltc2311_model #(.DATA_WIDTH(DW)) u_adc (
      .cnv(ss_n[0]), .sclk(sclk[0]), .analog(analog[k]), .sdo(miso[k]),
      .conversions(conversions));
  end

  always @(posedge ss_n[0])
    for (int c = 0; c < CPM; c++) captured[c] = analog[c];
  always @(negedge ss_n[0])
    for (int c = 0; c < CPM; c++) begin
      frame_code[c] = captured[c];
      analog[c]     = DW'($urandom);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int signed offs [NADC], convs [NADC];

  function automatic logic [RW-1:0] si_ref(input logic [DW-1:0] raw, input int signed off,
                                           input int signed cv);
    longint p;
    p = (longint'($signed(raw)) + longint'(off)) * longint'(cv);
    return RW'(p >>> LSB);
  endfunction

  // --------------------------------------------------------- monitor
  int m_values = 0, m_sw = 0, m_hw = 0, m_cont = 0, m_lowdiff = 0;
  int si_events = 0, last_si_cyc = -1;
  bit measure_period = 0;
  logic raw_q = 1'b0, si_q = 1'b0;

  always @(negedge clk) begin
    if (aresetn) begin
      if (raw_valid[0] && !raw_q)
        for (int c = 0; c < CPM; c++)
          check(raw_value[c*DW +: DW] == frame_code[c],
                $sformatf("raw c%0d got %h exp %h", c, raw_value[c*DW +: DW], frame_code[c]));
      if (si_valid[0] && !si_q) begin
        for (int c = 0; c < CPM; c++)
          check(si_value[c*RW +: RW] == si_ref(frame_code[c], offs[c], convs[c]),
                $sformatf("si c%0d got %h exp %h", c, si_value[c*RW +: RW],
                          si_ref(frame_code[c], offs[c], convs[c])));
        m_values++;
        si_events++;
        if (measure_period && last_si_cyc >= 0) begin
          check(cyc - last_si_cyc == N_SPI + CPM + 5,
                $sformatf("continuous period %0d", cyc - last_si_cyc));
          m_cont++;
        end
        last_si_cyc = cyc;
      end
      if (sclk_diff == '0) m_lowdiff++;
      else begin
        checks++; failures++;
        $display("FAIL SCLK_DIFF not held low at %0t", $time);
      end
    end
    raw_q <= raw_valid[0];
    si_q  <= si_valid[0];
  end

  // ------------------------------------------------------ AXI master
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

  task automatic set_value(input cfg_sel_t kind, input int c, input int signed v);
    axi_write(R_ADC_MASTER_CHANNEL, 32'h1);
    axi_write(R_ADC_CHANNEL, 32'(1) << c);
    axi_write(R_ADC_CONV_VALUE, 32'(v));
    axi_write(R_ADC_CR, (32'(kind) << C_CONFIG_VALUE_LSB) | (32'(1) << C_CONV_VALUE_VALID));
    if (kind == CFG_OFFSET)     offs[c]  = v;
    if (kind == CFG_CONVERSION) convs[c] = v;
  endtask

  task automatic wait_idle();
    logic [31:0] d;
    repeat (8) @(negedge clk);
    do axi_read(R_ADC_MASTER_BUSY, d); while (d[0]);
  endtask

  // -------------------------------------------------------------- test
  initial begin
    int ev0, t0;
    for (int c = 0; c < NADC; c++) begin
      analog[c] = DW'($urandom);
      offs[c] = 0;
      convs[c] = 1;
    end
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    axi_write(R_ADC_AVAILABLE, 32'h1);
    for (int c = 0; c < CPM; c++) begin
      set_value(CFG_OFFSET, c, 37 * c - 120);
      set_value(CFG_CONVERSION, c, (c % 2 != 0) ? -(c * 1000 + 77) : c * 3000 + 64);
    end
    set_value(CFG_SAMPLES, 0, 2);

    // software trigger, series of two samples
    ev0 = si_events;
    axi_write(R_ADC_MASTER_CHANNEL, 32'h1);
    axi_write(R_ADC_CR, 32'(1) << C_TRIGGER);
    wait_idle();
    check(si_events == ev0 + 2, $sformatf("two samples per software trigger, got %0d", si_events - ev0));
    if (si_events == ev0 + 2) m_sw++;

    // hardware trigger, one sample, latency
    set_value(CFG_SAMPLES, 0, 1);
    ev0 = si_events;
    @(negedge clk);
    trigger_cnv = 1'b1;
    @(negedge clk);                 // the clock edge between sampled it
    t0 = cyc;
    trigger_cnv = 1'b0;
    wait (si_events == ev0 + 1);
    check(last_si_cyc - t0 + 1 == 2 * N_SPI + CPM + 9,
          $sformatf("hardware trigger latency %0d", last_si_cyc - t0 + 1));
    m_hw++;
    wait_idle();

    // continuous mode
    axi_write(R_ADC_CR, 32'(1) << C_MODE);
    repeat (3 * (N_SPI + CPM + 5)) @(negedge clk);
    measure_period = 1;
    repeat (6 * (N_SPI + CPM + 5)) @(negedge clk);
    measure_period = 0;
    axi_write(R_ADC_CR, 32'h0);
    wait_idle();

    $display("values %0d, software series %0d, hardware %0d, continuous periods %0d",
             m_values, m_sw, m_hw, m_cont);
    check(m_values > 0, "values published on the single-ended path");
    check(m_sw > 0, "software-triggered series");
    check(m_hw > 0, "hardware trigger");
    check(m_cont > 0, "continuous mode");
    check(m_lowdiff > 0, "SCLK_DIFF held low");
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
