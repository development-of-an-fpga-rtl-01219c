`timescale 1ns / 1ps
// adc_pkg: constants and types shared by the LTC2311 acquisition core.
//
// Holds the widths of the SPI timing fields (the delay counters are 8 bit,
// the clock divider 16 bit, matching the layout of the SPI configuration
// register), the bit positions inside the control registers, the register
// indices of the AXI4-Lite register file and the state types of the three
// finite state machines (SPI master, ADC controller, top level). The register
// layout follows the published register map of the core; the numeric state
// encodings are left to the synthesis tool.
package adc_pkg;

  // Widths of the SPI timing fields.
  localparam int unsigned C_DELAY_WIDTH   = 8;
  localparam int unsigned C_CLK_DIV_WIDTH = 16;

  // AXI4-Lite register file: 16 registers of 32 bit, byte addressed.
  localparam int unsigned C_S_AXI_DATA_WIDTH = 32;
  localparam int unsigned C_S_AXI_ADDR_WIDTH = 6;
  localparam int unsigned C_NUM_REGS         = 16;

  // Register indices (address offset / 4).
  localparam int unsigned R_ADC_CR             = 0;  // 0x00 control
  localparam int unsigned R_ADC_SPI_CR         = 1;  // 0x04 SPI control
  localparam int unsigned R_ADC_SPI_CFGR       = 2;  // 0x08 SPI timing
  localparam int unsigned R_ADC_MASTER_CHANNEL = 3;  // 0x0C group select
  localparam int unsigned R_ADC_CHANNEL        = 4;  // 0x10 channel select
  localparam int unsigned R_ADC_MASTER_FINISH  = 5;  // 0x14 raw valid (RO)
  localparam int unsigned R_ADC_MASTER_SI_FIN  = 6;  // 0x18 SI valid (RO)
  localparam int unsigned R_ADC_MASTER_BUSY    = 7;  // 0x1C busy (RO)
  localparam int unsigned R_ADC_CONV_VALUE     = 8;  // 0x20 config value
  localparam int unsigned R_ADC_AVAILABLE      = 9;  // 0x24 available mask

  // ADC_CR bits.
  localparam int unsigned C_MODE              = 0;
  localparam int unsigned C_TRIGGER           = 1;
  localparam int unsigned C_SW_RESET          = 2;
  localparam int unsigned C_CONV_VALUE_VALID  = 3;
  localparam int unsigned C_CONFIG_VALUE_LSB  = 4;
  localparam int unsigned C_CONFIG_VALUE_MSB  = 6;

  // ADC_CR[6:4]: meaning of the value in ADC_CONV_VALUE.
  typedef enum logic [2:0] {
    CFG_OFFSET     = 3'b000,
    CFG_CONVERSION = 3'b001,
    CFG_SAMPLES    = 3'b010
  } cfg_sel_t;

  // ADC_SPI_CR bits.
  localparam int unsigned C_SPI_SS_N           = 0;
  localparam int unsigned C_SPI_SS_N_STATUS    = 1;
  localparam int unsigned C_SPI_SCLK           = 2;
  localparam int unsigned C_SPI_SCLK_STATUS    = 3;
  localparam int unsigned C_SPI_CONTROL        = 4;
  localparam int unsigned C_SPI_CONTROL_STATUS = 5;
  localparam int unsigned C_SPI_CPOL           = 6;
  localparam int unsigned C_SPI_CPHA           = 7;

  // ADC_SPI_CFGR fields.
  localparam int unsigned C_CLK_DIV_LSB   = 0;
  localparam int unsigned C_PRE_WAIT_LSB  = 16;
  localparam int unsigned C_POST_WAIT_LSB = 24;

  // Reset values of the writable registers (all others reset to zero).
  localparam logic [31:0] C_ADC_SPI_CR_RESET = 32'h0000_0040;  // CPOL = 1

  // SPI master states.
  typedef enum logic [2:0] {
    SPI_IDLE,
    SPI_PRE_WAIT,
    SPI_SHIFT_OUT,
    SPI_SAMPLE,
    SPI_POST_WAIT
  } spi_state_t;

  // ADC controller states.
  typedef enum logic [1:0] {
    CTRL_IDLE,
    CTRL_OCCUPIED,
    CTRL_SPI_TRANSFER,
    CTRL_CONVERTING
  } ctrl_state_t;

  // Top-level operating modes.
  typedef enum logic [1:0] {
    TOP_TRIGGERED,
    TOP_CONTINUOUS,
    TOP_MANUAL
  } top_state_t;

endpackage
