`timescale 1ns / 1ps
// axi4lite_slave: AXI4-Lite register file of the acquisition core.
//
// Sixteen 32-bit registers at byte offsets 0x00..0x3C; ten are used:
//   0x00 ADC_CR          control (mode, trigger, software reset, value valid,
//                        meaning of the configuration value)
//   0x04 ADC_SPI_CR      manual SS_N/SCLK, CPOL, CPHA; bits 1, 3 and 5 are
//                        status bits written by the core
//   0x08 ADC_SPI_CFGR    CLK_DIV [15:0], PRE_WAIT [23:16], POST_WAIT [31:24]
//   0x0C ADC_MASTER_CHANNEL  one-hot group select
//   0x10 ADC_CHANNEL     one-hot channel select within the selected groups
//   0x14 ADC_MASTER_FINISH, 0x18 ADC_MASTER_SI_FINISH, 0x1C ADC_MASTER_BUSY
//                        read only, copied from the core every clock
//   0x20 ADC_CONV_VALUE  offset, factor or sample count to be written
//   0x24 ADC_AVAILABLE   one-hot mask of groups that may be triggered
// Registers 10..15 are plain read/write storage for later use.
//
// Handshake: a write is accepted in the cycle in which both AWVALID and WVALID
// are high and no write response is pending (AWREADY and WREADY pulse
// together); WSTRB selects the bytes; the OKAY response is held until BREADY.
// A read is accepted when ARVALID is high and no read data is pending, and
// RDATA is returned one cycle later and held until RREADY. Writes to the read
// only registers are ignored.
//
// Hardware acknowledge: the core drives ADC_CR_IN, normally all ones; when it
// drives bit TRIGGER or CONV_VALUE_VALID low while that bit is set, the bit is
// cleared, which tells software the request was taken. Writing SW_RESET = 1
// resets all registers to their defaults one clock later (the bit itself
// therefore always reads back as 0); the bus handshake is only reset by
// S_AXI_ARESETN so that the write response still completes.
//
// The register map, the read-only copies and the acknowledge follow the
// published core; the single-outstanding handshake and the read/write status
// bits in ADC_SPI_CR being owned by hardware are this implementation's
// choices.
module axi4lite_slave
  import adc_pkg::*;
(
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
  // register contents for the core
  output logic [31:0]                   adc_cr,
  output logic [31:0]                   adc_spi_cr,
  output logic [31:0]                   adc_spi_cfgr,
  output logic [31:0]                   adc_master_channel,
  output logic [31:0]                   adc_channel,
  output logic [31:0]                   adc_conv_value,
  output logic [31:0]                   adc_available,
  // from the core
  input  logic [31:0]                   adc_cr_in,          // acknowledge, low active
  input  logic [2:0]                    spi_cr_status,      // {CONTROL, SCLK, SS_N} status
  input  logic [31:0]                   adc_master_finish,
  input  logic [31:0]                   adc_master_si_finish,
  input  logic [31:0]                   adc_master_busy
);

  localparam int unsigned ADDR_LSB = 2;
  localparam int unsigned IDX_W    = C_S_AXI_ADDR_WIDTH - ADDR_LSB;

  logic [31:0]      regs [C_NUM_REGS];
  logic             sw_reset;
  logic             wr_en;
  logic [IDX_W-1:0] wr_idx, rd_idx;

  assign sw_reset = regs[R_ADC_CR][C_SW_RESET];
  assign wr_en    = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && !s_axi_awready;
  assign wr_idx   = s_axi_awaddr[C_S_AXI_ADDR_WIDTH-1:ADDR_LSB];
  assign rd_idx   = s_axi_araddr[C_S_AXI_ADDR_WIDTH-1:ADDR_LSB];

  function automatic logic is_read_only(input logic [IDX_W-1:0] idx);
    return idx inside {IDX_W'(R_ADC_MASTER_FINISH), IDX_W'(R_ADC_MASTER_SI_FIN),
                       IDX_W'(R_ADC_MASTER_BUSY)};
  endfunction

  // ------------------------------------------------------ bus handshake
  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn) begin
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_bvalid  <= 1'b0;
      s_axi_arready <= 1'b0;
      s_axi_rvalid  <= 1'b0;
      s_axi_rdata   <= '0;
    end else begin
      s_axi_awready <= wr_en;
      s_axi_wready  <= wr_en;
      if (wr_en)                            s_axi_bvalid <= 1'b1;
      else if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      s_axi_arready <= 1'b0;
      if (s_axi_arvalid && !s_axi_arready && !s_axi_rvalid) begin
        s_axi_arready <= 1'b1;
        s_axi_rvalid  <= 1'b1;
        s_axi_rdata   <= regs[rd_idx];
        if (rd_idx == IDX_W'(R_ADC_CR)) s_axi_rdata[C_SW_RESET] <= 1'b0;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  assign s_axi_bresp = 2'b00;   // OKAY
  assign s_axi_rresp = 2'b00;

  // ----------------------------------------------------- register file
  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn || sw_reset) begin
      for (int r = 0; r < C_NUM_REGS; r++) regs[r] <= '0;
      regs[R_ADC_SPI_CR] <= C_ADC_SPI_CR_RESET;
    end else begin
      // hardware acknowledge of request bits
      if (!adc_cr_in[C_TRIGGER] && regs[R_ADC_CR][C_TRIGGER])
        regs[R_ADC_CR][C_TRIGGER] <= 1'b0;
      if (!adc_cr_in[C_CONV_VALUE_VALID] && regs[R_ADC_CR][C_CONV_VALUE_VALID])
        regs[R_ADC_CR][C_CONV_VALUE_VALID] <= 1'b0;
      // status bits owned by hardware
      regs[R_ADC_SPI_CR][C_SPI_SS_N_STATUS]    <= spi_cr_status[0];
      regs[R_ADC_SPI_CR][C_SPI_SCLK_STATUS]    <= spi_cr_status[1];
      regs[R_ADC_SPI_CR][C_SPI_CONTROL_STATUS] <= spi_cr_status[2];
      // read-only copies
      regs[R_ADC_MASTER_FINISH] <= adc_master_finish;
      regs[R_ADC_MASTER_SI_FIN] <= adc_master_si_finish;
      regs[R_ADC_MASTER_BUSY]   <= adc_master_busy;
      // software write (takes precedence over the acknowledge)
      if (wr_en && !is_read_only(wr_idx)) begin
        for (int b = 0; b < 4; b++) begin
          if (s_axi_wstrb[b]) begin
            regs[wr_idx][b*8 +: 8] <= s_axi_wdata[b*8 +: 8];
            if (wr_idx == IDX_W'(R_ADC_SPI_CR) && b == 0) begin
              regs[wr_idx][C_SPI_SS_N_STATUS]    <= spi_cr_status[0];
              regs[wr_idx][C_SPI_SCLK_STATUS]    <= spi_cr_status[1];
              regs[wr_idx][C_SPI_CONTROL_STATUS] <= spi_cr_status[2];
            end
          end
        end
      end
    end
  end

  assign adc_cr             = regs[R_ADC_CR];
  assign adc_spi_cr         = regs[R_ADC_SPI_CR];
  assign adc_spi_cfgr       = regs[R_ADC_SPI_CFGR];
  assign adc_master_channel = regs[R_ADC_MASTER_CHANNEL];
  assign adc_channel        = regs[R_ADC_CHANNEL];
  assign adc_conv_value     = regs[R_ADC_CONV_VALUE];
  assign adc_available      = regs[R_ADC_AVAILABLE];

  // AXI rules: a response stays valid until it is taken.
  assert property (@(posedge s_axi_aclk) disable iff (!s_axi_aresetn)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  assert property (@(posedge s_axi_aclk) disable iff (!s_axi_aresetn)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
