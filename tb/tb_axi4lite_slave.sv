`timescale 1ns / 1ps
// tb_axi4lite_slave: self-checking testbench of axi4lite_slave.
//
// A small AXI4-Lite master (write and read tasks) checks: reset values of all
// sixteen registers, write and read-back of the read/write registers, byte
// strobes, that writes to the read-only registers are ignored while they
// follow their inputs, the hardware acknowledge of TRIGGER and
// CONV_VALUE_VALID, the hardware-owned status bits of ADC_SPI_CR, the
// register outputs towards the core and the software reset.
module tb_axi4lite_slave;
  import adc_pkg::*;

  logic clk = 1'b0, aresetn = 1'b0;
  logic [5:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, arvalid = 0, bready = 1, rready = 1;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [31:0] adc_cr, adc_spi_cr, adc_spi_cfgr, adc_master_channel, adc_channel;
  logic [31:0] adc_conv_value, adc_available;
  logic [31:0] adc_cr_in = '1;
  logic [2:0]  spi_cr_status = '0;
  logic [31:0] fin = '0, si_fin = '0, mbusy = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi4lite_slave dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid),
    .s_axi_awready(awready), .s_axi_wdata(wdata), .s_axi_wstrb(wstrb),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr),
    .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready),
    .adc_cr, .adc_spi_cr, .adc_spi_cfgr, .adc_master_channel, .adc_channel,
    .adc_conv_value, .adc_available, .adc_cr_in, .spi_cr_status,
    .adc_master_finish(fin), .adc_master_si_finish(si_fin), .adc_master_busy(mbusy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic axi_write(input int idx, input logic [31:0] d, input logic [3:0] s = 4'hf);
    @(negedge clk);
    awaddr = 6'(idx * 4); wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    do @(negedge clk); while (!awready);
    check(wready, "WREADY with AWREADY");
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "BRESP OKAY");
    @(negedge clk);
  endtask

  task automatic axi_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    araddr = 6'(idx * 4); arvalid = 1;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    check(rresp == 2'b00, "RRESP OKAY");
    arvalid = 0;
    @(negedge clk);
  endtask

  task automatic expect_reg(input int idx, input logic [31:0] exp, input string what);
    logic [31:0] d;
    axi_read(idx, d);
    check(d == exp, $sformatf("%s reg%0d got %h exp %h", what, idx, d, exp));
  endtask

  initial begin
    logic [31:0] v [16];
    repeat (3) @(negedge clk);
    aresetn = 1'b1;
    // reset values
    for (int r = 0; r < 16; r++) expect_reg(r, (r == 1) ? 32'h40 : 32'h0, "reset");
    // read/write registers (ADC_CR without SW_RESET)
    for (int r = 0; r < 16; r++) begin
      v[r] = $urandom;
      if (r == 0) v[r][C_SW_RESET] = 1'b0;
      if (r == 1) v[r][5:0] = {1'b0, v[r][4], 1'b0, v[r][2], 1'b0, v[r][0]};
      axi_write(r, v[r]);
    end
    fin = 32'h3; si_fin = 32'h1; mbusy = 32'h2;
    for (int r = 0; r < 16; r++) begin
      if (r inside {5, 6, 7}) continue;
      expect_reg(r, v[r], "write/read");
    end
    expect_reg(5, 32'h3, "finish copy");
    expect_reg(6, 32'h1, "si finish copy");
    expect_reg(7, 32'h2, "busy copy");
    check(adc_spi_cfgr == v[2] && adc_master_channel == v[3] && adc_channel == v[4] &&
          adc_conv_value == v[8] && adc_available == v[9] && adc_cr == v[0] &&
          adc_spi_cr == v[1], "register outputs");
    // byte strobes
    axi_write(10, 32'hAABBCCDD, 4'b0101);
    expect_reg(10, {v[10][31:24], 8'hBB, v[10][15:8], 8'hDD}, "strobe");
    // status bits owned by hardware
    spi_cr_status = 3'b101;
    repeat (2) @(negedge clk);
    check(adc_spi_cr[C_SPI_SS_N_STATUS] && !adc_spi_cr[C_SPI_SCLK_STATUS] &&
          adc_spi_cr[C_SPI_CONTROL_STATUS], "status bits");
    axi_write(1, 32'h0000_00FF);
    expect_reg(1, 32'h0000_00F7, "status bits not writable");
    // acknowledge
    axi_write(0, 32'h0000_000A);   // TRIGGER | CONV_VALUE_VALID
    check(adc_cr[C_TRIGGER] && adc_cr[C_CONV_VALUE_VALID], "request bits set");
    @(negedge clk); adc_cr_in[C_TRIGGER] = 1'b0;
    @(negedge clk); adc_cr_in[C_TRIGGER] = 1'b1;
    check(!adc_cr[C_TRIGGER] && adc_cr[C_CONV_VALUE_VALID], "trigger acknowledged");
    @(negedge clk); adc_cr_in[C_CONV_VALUE_VALID] = 1'b0;
    @(negedge clk); adc_cr_in[C_CONV_VALUE_VALID] = 1'b1;
    check(!adc_cr[C_CONV_VALUE_VALID], "value valid acknowledged");
    expect_reg(0, 32'h0, "after acknowledge");
    // software reset
    axi_write(3, 32'h5);
    axi_write(0, 32'h0000_0005);   // MODE | SW_RESET
    expect_reg(3, 32'h0, "software reset clears registers");
    expect_reg(0, 32'h0, "software reset bit reads 0");
    expect_reg(1, 32'h40 | 32'h22, "software reset default CPOL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
