`timescale 1ns / 1ps
// spi_master: SPI master that reads one frame from CHANNELS ADCs at once.
//
// All CHANNELS slaves share one SCLK and one SS_N and each has its own MISO
// line, so one transfer returns CHANNELS samples of DATA_WIDTH bits. The
// controller is a Mealy machine with a registered output stage: a
// combinational process computes the next state from the current state and
// the counters, and a single clocked process holds the state, the counters
// and every output, which therefore change only on a clock edge and are free
// of glitches.
//
// States: IDLE -> PRE_WAIT -> (SAMPLE <-> SHIFT_OUT)* -> POST_WAIT -> IDLE.
//   IDLE       SS_N high and SCLK at CPOL, or, with MANUAL = 1, both taken
//              from SS_IN_N / SCLK_IN (used for the ADC nap and sleep modes).
//              The timing configuration is latched here, so it may be
//              rewritten during a transfer without effect on it.
//   PRE_WAIT   entered on ENABLE, pulls SS_N low and stays PRE_DELAY+1 clocks.
//   SAMPLE /   each state lasts CLK_DIV+1 clocks, SCLK toggles on every change
//   SHIFT_OUT  between the two, so f_SCLK = f_CLK / (2*(CLK_DIV+1)). MISO is
//              sampled on the change SAMPLE -> SHIFT_OUT. With CPHA = 0 the
//              machine enters SAMPLE first and samples on the first SCLK edge
//              (what the LTC2311 needs); with CPHA = 1 it enters SHIFT_OUT
//              first and samples on the second edge.
//   POST_WAIT  stays POST_DELAY+1 clocks, then SS_N returns high in IDLE.
// DATA_WIDTH+1 bits are sampled per frame into a DATA_WIDTH-bit shift
// register, so the first bit (the MSB that the LTC2311 presents twice) is
// pushed out by the last one.
//
// Timing (CPHA = 0): counting the clock edges from the one that samples
// ENABLE = 1 to the one that drops BUSY and publishes the frame on RX_DATA,
// both included, a transfer takes
//   n_spi = 4 + PRE_DELAY + POST_DELAY + 2*(DATA_WIDTH+1)*(CLK_DIV+1)
// cycles; CPHA = 1 adds CLK_DIV+1. The frame has DATA_WIDTH+1 SCLK periods,
// hence the factor 2*(DATA_WIDTH+1) = 34 for 16-bit data. RX_DATA is
// updated once per frame and holds until the next frame has ended.
//
// The state set, the transition conditions, the 17-bit frame, the manual
// mode and the configuration latch follow the published design; the reset
// values (SS_N high, SCLK at CPOL), the unsigned counter widths and the
// suppressed final toggle in CPHA = 1 mode are this implementation's choices.
module spi_master
  import adc_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 16,  // bits per SPI frame
  parameter int unsigned CHANNELS   = 1    // slaves sharing SS_N and SCLK
) (
  input  logic                             clk,
  input  logic                             reset_n,     // synchronous, low active
  // SPI
  output logic [CHANNELS*DATA_WIDTH-1:0]   rx_data,     // channel i in [i*DW +: DW]
  input  logic                             cpha,
  input  logic                             cpol,
  output logic                             sclk,
  input  logic                             sclk_in,     // manual SCLK level
  input  logic [CHANNELS-1:0]              miso,
  output logic                             ss_out_n,
  input  logic                             ss_in_n,     // manual SS_N level
  input  logic                             manual,
  // control
  output logic                             busy,
  input  logic                             enable,
  input  logic [C_DELAY_WIDTH-1:0]         pre_delay,
  input  logic [C_DELAY_WIDTH-1:0]         post_delay,
  input  logic [C_CLK_DIV_WIDTH-1:0]       clk_div
);

  localparam int unsigned BIT_CNT_W = $clog2(DATA_WIDTH + 2);
  localparam logic [BIT_CNT_W-1:0] FRAME_BITS = BIT_CNT_W'(DATA_WIDTH + 1);

  spi_state_t                      curstate, nxtstate;
  logic [C_DELAY_WIDTH-1:0]        s_pre_delay, s_post_delay, s_del_count;
  logic [C_CLK_DIV_WIDTH-1:0]      s_clk_div, s_del_clk;
  logic [BIT_CNT_W-1:0]            s_bit_count;
  logic                            s_cpol, s_cpha, s_sclk;
  logic [DATA_WIDTH-1:0]           s_rx_buffer [CHANNELS];

  // Transition function.
  always_comb begin
    nxtstate = curstate;
    unique case (curstate)
      SPI_IDLE:      if (enable) nxtstate = SPI_PRE_WAIT;
      SPI_PRE_WAIT:  if (s_del_count == '0) nxtstate = s_cpha ? SPI_SHIFT_OUT : SPI_SAMPLE;
      SPI_SHIFT_OUT: if (s_del_clk == '0) nxtstate = SPI_SAMPLE;
      SPI_SAMPLE: begin
        if (s_bit_count == '0)    nxtstate = SPI_POST_WAIT;
        else if (s_del_clk == '0) nxtstate = SPI_SHIFT_OUT;
      end
      SPI_POST_WAIT: if (s_del_count == '0) nxtstate = SPI_IDLE;
      default:       nxtstate = SPI_IDLE;
    endcase
  end

  // State memory, counters and registered output function.
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      curstate     <= SPI_IDLE;
      s_del_count  <= '0;
      s_del_clk    <= '0;
      s_bit_count  <= '0;
      s_pre_delay  <= '0;
      s_post_delay <= '0;
      s_clk_div    <= '0;
      s_cpol       <= cpol;
      s_cpha       <= 1'b0;
      s_sclk       <= cpol;
      ss_out_n     <= 1'b1;
      busy         <= 1'b0;
      rx_data      <= '0;
      for (int c = 0; c < CHANNELS; c++) s_rx_buffer[c] <= '0;
    end else begin
      curstate <= nxtstate;
      unique case (nxtstate)
        SPI_IDLE: begin
          busy         <= 1'b0;
          s_pre_delay  <= pre_delay;
          s_post_delay <= post_delay;
          s_clk_div    <= clk_div;
          s_cpol       <= cpol;
          s_cpha       <= cpha;
          if (curstate == SPI_POST_WAIT) begin
            // end of frame: SS_N high for at least one clock, publish data
            ss_out_n <= 1'b1;
            s_sclk   <= s_cpol;
            for (int c = 0; c < CHANNELS; c++)
              rx_data[c*DATA_WIDTH +: DATA_WIDTH] <= s_rx_buffer[c];
          end else if (manual) begin
            ss_out_n <= ss_in_n;
            s_sclk   <= sclk_in;
          end else begin
            ss_out_n <= 1'b1;
            s_sclk   <= cpol;
          end
        end
        SPI_PRE_WAIT: begin
          if (curstate == SPI_IDLE) begin
            busy        <= 1'b1;
            ss_out_n    <= 1'b0;
            s_sclk      <= s_cpol;
            s_del_count <= s_pre_delay;
            s_bit_count <= FRAME_BITS;
          end else begin
            s_del_count <= s_del_count - 1'b1;
          end
        end
        SPI_SAMPLE: begin
          if (curstate == SPI_SAMPLE) begin
            s_del_clk <= s_del_clk - 1'b1;
          end else begin
            s_del_clk <= s_clk_div;
            // shift edge; in CPHA = 1 mode the edge after the last sample
            // is suppressed so that SCLK ends at its idle level
            if (curstate == SPI_SHIFT_OUT && !(s_cpha && s_bit_count == '0))
              s_sclk <= ~s_sclk;
          end
        end
        SPI_SHIFT_OUT: begin
          if (curstate == SPI_SHIFT_OUT) begin
            s_del_clk <= s_del_clk - 1'b1;
          end else begin
            s_del_clk <= s_clk_div;
            if (curstate == SPI_SAMPLE) begin
              // sample edge: take one bit from every slave
              s_sclk      <= ~s_sclk;
              s_bit_count <= s_bit_count - 1'b1;
              for (int c = 0; c < CHANNELS; c++)
                s_rx_buffer[c] <= {s_rx_buffer[c][DATA_WIDTH-2:0], miso[c]};
            end
          end
        end
        SPI_POST_WAIT: begin
          if (curstate == SPI_POST_WAIT) s_del_count <= s_del_count - 1'b1;
          else                           s_del_count <= s_post_delay;
        end
        default: ;
      endcase
    end
  end

  assign sclk = s_sclk;

  // SS_N must be low for the whole data phase.
  assert property (@(posedge clk) disable iff (!reset_n)
                   (curstate inside {SPI_SAMPLE, SPI_SHIFT_OUT}) |-> !ss_out_n);
  // BUSY is high exactly while a frame is in progress.
  assert property (@(posedge clk) disable iff (!reset_n)
                   busy == (curstate != SPI_IDLE));

endmodule
