`timescale 1ns / 1ps
// adc_controller: one synchronous group of ADCs.
//
// Combines one spi_master, which reads CHANNELS ADCs through a shared SCLK and
// SS_N, with one raw_to_si conversion unit that is shared by all channels of
// the group, and stores a signed offset and a signed conversion factor per
// channel plus the number of samples to take per trigger.
//
// The LTC2311 returns, in each transfer, the result of the conversion that was
// started at the end of the previous transfer. A trigger therefore first runs
// one dummy transfer whose data is thrown away; its end starts the conversion
// of interest, which the next transfer reads. The FSM:
//   IDLE          SPI master may be driven manually (MANUAL, SS_IN_N, SCLK_IN);
//                 ENABLE = 1 starts a series with a dummy transfer.
//   OCCUPIED      issues one ENABLE pulse to the SPI master.
//   SPI_TRANSFER  waits for the falling edge of the SPI master's BUSY. After
//                 the dummy transfer it returns to OCCUPIED; otherwise the new
//                 frame is published on RAW_VALUE and RAW_VALID is raised.
//   CONVERTING    feeds the channels one per clock into the conversion unit
//                 and collects the results CHANNELS+3 clocks later; the bits
//                 RES_MSB..RES_LSB of each product go to SI_VALUE and SI_VALID
//                 is raised. Then the next sample of the series follows; after
//                 the last one the group returns to IDLE, or, if ENABLE is
//                 still high, starts the next series at once without a dummy
//                 transfer (continuous operation).
// RAW_VALID and SI_VALID are levels: both drop when a transfer starts and rise
// when the respective value is ready. BUSY is high whenever the FSM is not in
// IDLE.
//
// Timing, counting clock edges from the one that samples ENABLE = 1 to the one
// that raises the flag, both included (n_spi is the SPI master's transfer
// time): RAW_VALID rises after 2*n_spi + 5 edges and SI_VALID after
// 2*n_spi + CHANNELS + 8; each further sample of a series takes
// n_spi + CHANNELS + 5 cycles.
//
// Configuration: SET_OFFSET, SET_CONVERSION and SET_SAMPLES write VALUE into
// the offset / factor of every channel whose CHANNEL_SELECT bit is set, or into
// the sample count. This runs independently of the FSM, so values may change
// during a series. Reset values: offset 0, factor 1, one sample per trigger
// (a sample count of 0 is treated as 1); these reset values are this
// implementation's choice, the rest follows the published design.
module adc_controller
  import adc_pkg::*;
#(
  parameter int unsigned DATA_WIDTH        = 16,
  parameter int unsigned CHANNELS          = 4,   // ADCs per group
  parameter int unsigned OFFSET_WIDTH      = 16,
  parameter int unsigned CONVERSION_WIDTH  = 18,
  parameter int unsigned RES_MSB           = 23,
  parameter int unsigned RES_LSB           = 6,
  parameter int unsigned VALUE_WIDTH       = 32,
  localparam int unsigned RES_WIDTH        = RES_MSB - RES_LSB + 1
) (
  input  logic                              clk,
  input  logic                              reset_n,
  // control
  input  logic                              enable,
  output logic                              busy,
  output logic                              raw_valid,
  output logic                              si_valid,
  // manual SPI control, only honoured in IDLE
  input  logic                              manual,
  input  logic                              ss_in_n,
  input  logic                              sclk_in,
  // SPI configuration
  input  logic                              cpol,
  input  logic                              cpha,
  input  logic [C_DELAY_WIDTH-1:0]          pre_delay,
  input  logic [C_DELAY_WIDTH-1:0]          post_delay,
  input  logic [C_CLK_DIV_WIDTH-1:0]        clk_div,
  // SPI
  output logic                              sclk,
  output logic                              ss_n,
  input  logic [CHANNELS-1:0]               miso,
  // results, channel i in [i*W +: W]
  output logic [CHANNELS*DATA_WIDTH-1:0]    raw_value,
  output logic [CHANNELS*RES_WIDTH-1:0]     si_value,
  // operating parameters
  input  logic                              set_offset,
  input  logic                              set_conversion,
  input  logic                              set_samples,
  input  logic [CHANNELS-1:0]               channel_select,
  input  logic [VALUE_WIDTH-1:0]            value
);

  localparam int unsigned CONV_CYCLES = CHANNELS + 3;
  localparam int unsigned CNT_W       = $clog2(CONV_CYCLES + 1);
  localparam int unsigned PROD_WIDTH  = DATA_WIDTH + CONVERSION_WIDTH + 1;
  localparam int unsigned CH_W        = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  ctrl_state_t curstate, nxtstate;

  logic                          s_dummy_sample;
  logic [VALUE_WIDTH-1:0]        s_samples;        // samples per trigger
  logic [VALUE_WIDTH-1:0]        s_sample_cnt;     // samples left in series
  logic [CNT_W-1:0]              s_conv_cnt;
  logic                          s_spi_enable, s_spi_busy, s_spi_busy_d;
  logic                          s_spi_done;
  logic [CHANNELS*DATA_WIDTH-1:0] s_spi_rx;

  logic signed [OFFSET_WIDTH-1:0]     s_offset     [CHANNELS];
  logic signed [CONVERSION_WIDTH-1:0] s_conversion [CHANNELS];

  logic signed [DATA_WIDTH-1:0]       s_ain;
  logic signed [OFFSET_WIDTH-1:0]     s_din;
  logic signed [CONVERSION_WIDTH-1:0] s_bin;
  logic signed [PROD_WIDTH-1:0]       s_mult;
  logic [CH_W-1:0]                    s_feed_idx, s_store_idx;

  // ---------------------------------------------------------------- SPI
  spi_master #(
    .DATA_WIDTH (DATA_WIDTH),
    .CHANNELS   (CHANNELS)
  ) u_spi_master (
    .clk        (clk),
    .reset_n    (reset_n),
    .rx_data    (s_spi_rx),
    .cpha       (cpha),
    .cpol       (cpol),
    .sclk       (sclk),
    .sclk_in    (sclk_in),
    .miso       (miso),
    .ss_out_n   (ss_n),
    .ss_in_n    (ss_in_n),
    .manual     (manual && curstate == CTRL_IDLE),
    .busy       (s_spi_busy),
    .enable     (s_spi_enable),
    .pre_delay  (pre_delay),
    .post_delay (post_delay),
    .clk_div    (clk_div)
  );

  assign s_spi_done = s_spi_busy_d && !s_spi_busy;

  // ---------------------------------------------------------- conversion
  // Channel s_conv_cnt is fed while the counter is below CHANNELS; its
  // product is taken three cycles later.
  assign s_feed_idx  = CH_W'(s_conv_cnt);
  assign s_store_idx = CH_W'(s_conv_cnt - CNT_W'(3));

  always_comb begin
    s_ain = '0;
    s_din = '0;
    s_bin = '0;
    if (s_conv_cnt < CNT_W'(CHANNELS)) begin
      s_ain = raw_value[s_feed_idx*DATA_WIDTH +: DATA_WIDTH];
      s_din = s_offset[s_feed_idx];
      s_bin = s_conversion[s_feed_idx];
    end
  end

  raw_to_si #(
    .AWIDTH (DATA_WIDTH),
    .BWIDTH (CONVERSION_WIDTH),
    .DWIDTH (OFFSET_WIDTH)
  ) u_raw_to_si (
    .clk    (clk),
    .subadd (1'b0),     // the core always adds the offset
    .ain    (s_ain),
    .bin    (s_bin),
    .din    (s_din),
    .mult   (s_mult)
  );

  // ----------------------------------------------------------------- FSM
  always_comb begin
    nxtstate = curstate;
    unique case (curstate)
      CTRL_IDLE:         if (enable) nxtstate = CTRL_OCCUPIED;
      CTRL_OCCUPIED:     nxtstate = CTRL_SPI_TRANSFER;
      CTRL_SPI_TRANSFER: if (s_spi_done)
                           nxtstate = s_dummy_sample ? CTRL_OCCUPIED : CTRL_CONVERTING;
      CTRL_CONVERTING: begin
        if (s_conv_cnt == CNT_W'(CONV_CYCLES - 1)) begin
          if (s_sample_cnt > 1 || enable) nxtstate = CTRL_OCCUPIED;
          else                            nxtstate = CTRL_IDLE;
        end
      end
      default: nxtstate = CTRL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      curstate       <= CTRL_IDLE;
      s_dummy_sample <= 1'b0;
      s_sample_cnt   <= '0;
      s_conv_cnt     <= '0;
      s_spi_enable   <= 1'b0;
      s_spi_busy_d   <= 1'b0;
      busy           <= 1'b0;
      raw_valid      <= 1'b0;
      si_valid       <= 1'b0;
      raw_value      <= '0;
      si_value       <= '0;
    end else begin
      curstate     <= nxtstate;
      s_spi_busy_d <= s_spi_busy;
      s_spi_enable <= 1'b0;
      busy         <= (nxtstate != CTRL_IDLE);
      unique case (nxtstate)
        CTRL_IDLE: ;
        CTRL_OCCUPIED: begin
          if (curstate == CTRL_IDLE) begin
            // new series after a trigger: dummy transfer first
            s_dummy_sample <= 1'b1;
            s_sample_cnt   <= (s_samples == '0) ? VALUE_WIDTH'(1) : s_samples;
          end else if (curstate == CTRL_SPI_TRANSFER) begin
            s_dummy_sample <= 1'b0;                 // dummy done
          end else if (curstate == CTRL_CONVERTING) begin
            if (s_sample_cnt > 1) s_sample_cnt <= s_sample_cnt - 1'b1;
            else s_sample_cnt <= (s_samples == '0) ? VALUE_WIDTH'(1) : s_samples;
          end
        end
        CTRL_SPI_TRANSFER: begin
          if (curstate == CTRL_OCCUPIED) begin
            s_spi_enable <= 1'b1;
            raw_valid    <= 1'b0;
            si_valid     <= 1'b0;
          end
        end
        CTRL_CONVERTING: begin
          if (curstate == CTRL_SPI_TRANSFER) begin
            raw_value  <= s_spi_rx;
            raw_valid  <= 1'b1;
            s_conv_cnt <= '0;
          end else begin
            s_conv_cnt <= s_conv_cnt + 1'b1;
          end
        end
        default: ;
      endcase
      // collect products (also on the last cycle, when leaving CONVERTING)
      if (curstate == CTRL_CONVERTING && s_conv_cnt >= CNT_W'(3))
        si_value[s_store_idx*RES_WIDTH +: RES_WIDTH] <= s_mult[RES_MSB:RES_LSB];
      if (curstate == CTRL_CONVERTING && s_conv_cnt == CNT_W'(CONV_CYCLES - 1))
        si_valid <= 1'b1;
    end
  end

  // ------------------------------------------------- operating parameters
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      s_samples <= VALUE_WIDTH'(1);
      for (int c = 0; c < CHANNELS; c++) begin
        s_offset[c]     <= '0;
        s_conversion[c] <= CONVERSION_WIDTH'(1);
      end
    end else begin
      if (set_samples) s_samples <= value;
      for (int c = 0; c < CHANNELS; c++) begin
        if (set_offset && channel_select[c])
          s_offset[c] <= value[OFFSET_WIDTH-1:0];
        if (set_conversion && channel_select[c])
          s_conversion[c] <= value[CONVERSION_WIDTH-1:0];
      end
    end
  end

  // The SPI master must be idle whenever the controller is.
  assert property (@(posedge clk) disable iff (!reset_n)
                   (curstate == CTRL_IDLE) |-> !s_spi_busy);
  // Results are only collected while converting.
  assert property (@(posedge clk) disable iff (!reset_n)
                   $rose(si_valid) |-> raw_valid);

endmodule
