`timescale 1ns / 1ps
// ultrazohm_adc: value acquisition core for LTC2311 ADCs with AXI4-Lite control.
//
// SPI_MASTER independent groups (adc_controller) each read CHANNELS_PER_MASTER
// ADCs through one shared SCLK and SS_N, and convert every raw code to a
// scaled value (raw + offset) * factor. Software controls the core through the
// AXI4-Lite register file (axi4lite_slave). This module adds:
//
// * The operating-mode FSM (registered Mealy outputs):
//     TRIGGERED   default. Each clock it runs the trigger activity: a rising
//                 edge on a TRIGGER_CNV bit requests that group; requests of
//                 busy groups wait until the group is idle. Hardware requests
//                 have priority; otherwise ADC_CR.TRIGGER starts all groups
//                 selected in ADC_MASTER_CHANNEL at the same clock, once none
//                 of them is busy, and is then acknowledged (cleared). Groups
//                 whose ADC_AVAILABLE bit is 0 are never started.
//     CONTINUOUS  entered while ADC_CR.MODE = 1: the ENABLE of every available
//                 group is held high, so each group samples back to back.
//     MANUAL      entered from TRIGGERED when ADC_SPI_CR.SPI_CONTROL = 1 and
//                 the selected groups are idle: SS_N and SCLK of the selected
//                 groups follow ADC_SPI_CR bits 0 and 2 (nap / sleep entry).
//                 Left when SPI_CONTROL returns to 0.
// * The parameter update process: when ADC_CR.CONV_VALUE_VALID is set, the
//   value in ADC_CONV_VALUE is written, as offset, factor or sample count
//   according to ADC_CR[6:4], into the channels selected by ADC_CHANNEL of
//   the groups selected by ADC_MASTER_CHANNEL, and the bit is acknowledged.
//   This runs independently of the FSM, also during a conversion.
// * The software reset: ADC_CR.SW_RESET resets the register file, the groups
//   and this module for one clock.
// * Optional LVDS buffers (DIFFERENTIAL = 1): SCLK is then also driven as a
//   pair on SCLK_DIFF {N, P} per group and MISO is read from the pairs on
//   MISO_DIFF; otherwise MISO is read single-ended and SCLK_DIFF is held low.
//   The single-ended SCLK is always driven.
//
// Results: group g, channel c is RAW_VALUE[(g*CPM+c)*DATA_WIDTH +: DATA_WIDTH]
// and SI_VALUE[(g*CPM+c)*RES_W +: RES_W] with RES_W = RES_MSB-RES_LSB+1;
// RAW_VALID[g] and SI_VALID[g] mark them valid and are also readable in
// ADC_MASTER_FINISH / ADC_MASTER_SI_FINISH, BUSY in ADC_MASTER_BUSY.
//
// Timing: counting clock edges from the one that samples the rising
// TRIGGER_CNV bit to the one that raises the group's SI_VALID, both included,
// a triggered sample takes 2*n_spi + CHANNELS_PER_MASTER + 9 cycles, with n_spi
// the SPI master's transfer time; RAW_VALID rises CHANNELS_PER_MASTER + 3
// cycles earlier, and each further sample of a series adds
// n_spi + CHANNELS_PER_MASTER + 5. TRIGGER_CNV must be synchronous to
// the clock. All logic runs on S_AXI_ACLK.
//
// The structure, register map, modes and update mechanism follow the
// published core. Edge detection and queueing of hardware triggers, the
// MANUAL-mode status bits and the SCLK_DIFF bit order are this
// implementation's choices.
module ultrazohm_adc
  import adc_pkg::*;
#(
  parameter int unsigned DATA_WIDTH          = 16,
  parameter int unsigned CHANNELS_PER_MASTER = 4,
  parameter int unsigned SPI_MASTER          = 2,
  parameter int unsigned OFFSET_WIDTH        = 16,
  parameter int unsigned CONVERSION_WIDTH    = 18,
  parameter int unsigned RES_LSB             = 6,
  parameter int unsigned RES_MSB             = 23,
  parameter bit          DIFFERENTIAL        = 1'b1,
  localparam int unsigned RES_WIDTH          = RES_MSB - RES_LSB + 1,
  localparam int unsigned NADC               = SPI_MASTER * CHANNELS_PER_MASTER
) (
  // AXI4-Lite slave
  input  logic                          s_axi_aclk,
  input  logic                          s_axi_aresetn,
  input  logic [C_S_AXI_ADDR_WIDTH-1:0] s_axi_awaddr,
  input  logic [2:0]                    s_axi_awprot,
  input  logic                          s_axi_awvalid,
  output logic                          s_axi_awready,
  input  logic [C_S_AXI_DATA_WIDTH-1:0] s_axi_wdata,
  input  logic [3:0]                    s_axi_wstrb,
  input  logic                          s_axi_wvalid,
  output logic                          s_axi_wready,
  output logic [1:0]                    s_axi_bresp,
  output logic                          s_axi_bvalid,
  input  logic                          s_axi_bready,
  input  logic [C_S_AXI_ADDR_WIDTH-1:0] s_axi_araddr,
  input  logic [2:0]                    s_axi_arprot,
  input  logic                          s_axi_arvalid,
  output logic                          s_axi_arready,
  output logic [C_S_AXI_DATA_WIDTH-1:0] s_axi_rdata,
  output logic [1:0]                    s_axi_rresp,
  output logic                          s_axi_rvalid,
  input  logic                          s_axi_rready,
  // results
  output logic [NADC*DATA_WIDTH-1:0]    raw_value,
  output logic [NADC*RES_WIDTH-1:0]     si_value,
  output logic [SPI_MASTER-1:0]         raw_valid,
  output logic [SPI_MASTER-1:0]         si_valid,
  input  logic [SPI_MASTER-1:0]         trigger_cnv,
  // ADC interface
  output logic [SPI_MASTER-1:0]         sclk,
  output logic [2*SPI_MASTER-1:0]       sclk_diff,   // {N, P} per group
  output logic [SPI_MASTER-1:0]         ss_n,
  input  logic [NADC-1:0]               miso,        // used if !DIFFERENTIAL
  input  logic [2*NADC-1:0]             miso_diff    // {N, P} per ADC, if DIFFERENTIAL
);

  // ------------------------------------------------------ register file
  logic [31:0] adc_cr, adc_spi_cr, adc_spi_cfgr, adc_master_channel;
  logic [31:0] adc_channel, adc_conv_value, adc_available;
  logic [31:0] adc_cr_in;
  logic [2:0]  spi_cr_status;
  logic [SPI_MASTER-1:0] ctrl_busy;

  axi4lite_slave u_axi (
    .s_axi_aclk, .s_axi_aresetn,
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .adc_cr, .adc_spi_cr, .adc_spi_cfgr, .adc_master_channel,
    .adc_channel, .adc_conv_value, .adc_available,
    .adc_cr_in, .spi_cr_status,
    .adc_master_finish    (32'(raw_valid)),
    .adc_master_si_finish (32'(si_valid)),
    .adc_master_busy      (32'(ctrl_busy))
  );

  logic clk, reset_n;
  assign clk     = s_axi_aclk;
  assign reset_n = s_axi_aresetn && !adc_cr[C_SW_RESET];

  logic [SPI_MASTER-1:0] sel, avail;
  assign sel   = adc_master_channel[SPI_MASTER-1:0];
  assign avail = adc_available[SPI_MASTER-1:0];

  // ------------------------------------------------------ mode FSM
  top_state_t            curstate, nxtstate;
  logic [SPI_MASTER-1:0] enable, manual, trig_d, hw_pending;
  logic [SPI_MASTER-1:0] hw_req, hw_fire, sw_sel;
  logic                  trig_ack;       // low active acknowledge of TRIGGER

  assign hw_req  = (hw_pending | (trigger_cnv & ~trig_d)) & avail;
  assign hw_fire = hw_req & ~ctrl_busy;
  assign sw_sel  = sel & avail;

  always_comb begin
    nxtstate = curstate;
    unique case (curstate)
      TOP_TRIGGERED: begin
        if (adc_cr[C_MODE])
          nxtstate = TOP_CONTINUOUS;
        else if (adc_spi_cr[C_SPI_CONTROL] && (ctrl_busy & sel) == '0)
          nxtstate = TOP_MANUAL;
      end
      TOP_CONTINUOUS: if (!adc_cr[C_MODE]) nxtstate = TOP_TRIGGERED;
      TOP_MANUAL:     if (!adc_spi_cr[C_SPI_CONTROL]) nxtstate = TOP_TRIGGERED;
      default:        nxtstate = TOP_TRIGGERED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      curstate   <= TOP_TRIGGERED;
      enable     <= '0;
      manual     <= '0;
      trig_d     <= '0;
      hw_pending <= '0;
      trig_ack   <= 1'b1;
    end else begin
      curstate <= nxtstate;
      trig_d   <= trigger_cnv;
      enable   <= '0;
      manual   <= '0;
      trig_ack <= 1'b1;
      unique case (nxtstate)
        TOP_TRIGGERED: begin
          hw_pending <= '0;
          if (curstate == TOP_TRIGGERED) begin
            if (hw_req != '0) begin
              // hardware trigger first; busy groups keep their request
              enable     <= hw_fire;
              hw_pending <= hw_req & ~hw_fire;
            end else if (adc_cr[C_TRIGGER] && trig_ack && (sw_sel & ctrl_busy) == '0) begin
              enable   <= sw_sel;
              trig_ack <= 1'b0;
            end
          end
        end
        TOP_CONTINUOUS: begin
          hw_pending <= '0;
          enable     <= avail;
        end
        TOP_MANUAL: begin
          hw_pending <= '0;
          manual     <= sel;
        end
        default: ;
      endcase
    end
  end

  // --------------------------------------------- operating parameters
  logic [SPI_MASTER-1:0] set_offset, set_conversion, set_samples;
  logic                  cvv_ack;        // low active acknowledge of CONV_VALUE_VALID

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      set_offset     <= '0;
      set_conversion <= '0;
      set_samples    <= '0;
      cvv_ack        <= 1'b1;
    end else if (adc_cr[C_CONV_VALUE_VALID] && cvv_ack) begin
      cvv_ack        <= 1'b0;
      set_offset     <= '0;
      set_conversion <= '0;
      set_samples    <= '0;
      unique case (adc_cr[C_CONFIG_VALUE_MSB:C_CONFIG_VALUE_LSB])
        CFG_OFFSET:     set_offset     <= sel;
        CFG_CONVERSION: set_conversion <= sel;
        CFG_SAMPLES:    set_samples    <= sel;
        default: ;     // reserved codes
      endcase
    end else begin
      cvv_ack        <= 1'b1;
      set_offset     <= '0;
      set_conversion <= '0;
      set_samples    <= '0;
    end
  end

  always_comb begin
    adc_cr_in                     = '1;
    adc_cr_in[C_TRIGGER]          = trig_ack;
    adc_cr_in[C_CONV_VALUE_VALID] = cvv_ack;
  end

  // --------------------------------------------------- ADC groups
  logic [SPI_MASTER-1:0] sclk_int, ss_n_int;
  logic [NADC-1:0]       miso_int;

  for (genvar g = 0; g < SPI_MASTER; g++) begin : g_group
    adc_controller #(
      .DATA_WIDTH       (DATA_WIDTH),
      .CHANNELS         (CHANNELS_PER_MASTER),
      .OFFSET_WIDTH     (OFFSET_WIDTH),
      .CONVERSION_WIDTH (CONVERSION_WIDTH),
      .RES_MSB          (RES_MSB),
      .RES_LSB          (RES_LSB)
    ) u_ctrl (
      .clk            (clk),
      .reset_n        (reset_n),
      .enable         (enable[g]),
      .busy           (ctrl_busy[g]),
      .raw_valid      (raw_valid[g]),
      .si_valid       (si_valid[g]),
      .manual         (manual[g]),
      .ss_in_n        (adc_spi_cr[C_SPI_SS_N]),
      .sclk_in        (adc_spi_cr[C_SPI_SCLK]),
      .cpol           (adc_spi_cr[C_SPI_CPOL]),
      .cpha           (adc_spi_cr[C_SPI_CPHA]),
      .pre_delay      (adc_spi_cfgr[C_PRE_WAIT_LSB +: C_DELAY_WIDTH]),
      .post_delay     (adc_spi_cfgr[C_POST_WAIT_LSB +: C_DELAY_WIDTH]),
      .clk_div        (adc_spi_cfgr[C_CLK_DIV_LSB +: C_CLK_DIV_WIDTH]),
      .sclk           (sclk_int[g]),
      .ss_n           (ss_n_int[g]),
      .miso           (miso_int[g*CHANNELS_PER_MASTER +: CHANNELS_PER_MASTER]),
      .raw_value      (raw_value[g*CHANNELS_PER_MASTER*DATA_WIDTH +: CHANNELS_PER_MASTER*DATA_WIDTH]),
      .si_value       (si_value[g*CHANNELS_PER_MASTER*RES_WIDTH +: CHANNELS_PER_MASTER*RES_WIDTH]),
      .set_offset     (set_offset[g]),
      .set_conversion (set_conversion[g]),
      .set_samples    (set_samples[g]),
      .channel_select (adc_channel[CHANNELS_PER_MASTER-1:0]),
      .value          (adc_conv_value)
    );
  end

  // status bits in ADC_SPI_CR: levels of the selected groups
  assign spi_cr_status = {curstate == TOP_MANUAL, &(sclk_int | ~sel), &(ss_n_int | ~sel)};

  // --------------------------------------------------- IO buffers
  assign sclk = sclk_int;
  assign ss_n = ss_n_int;

  if (DIFFERENTIAL) begin : g_diff
    for (genvar g = 0; g < SPI_MASTER; g++) begin : g_sclk
      lvds_obuf u_obuf (.i(sclk_int[g]), .o(sclk_diff[2*g]), .ob(sclk_diff[2*g+1]));
    end
    for (genvar k = 0; k < NADC; k++) begin : g_miso
      lvds_ibuf u_ibuf (.i(miso_diff[2*k]), .ib(miso_diff[2*k+1]), .o(miso_int[k]));
    end
  end else begin : g_single
    assign sclk_diff = '0;
    assign miso_int  = miso;
  end

  // A group is only started while it is idle and available.
  assert property (@(posedge clk) disable iff (!reset_n)
                   curstate == TOP_TRIGGERED |-> (enable & ~avail) == '0);

endmodule
