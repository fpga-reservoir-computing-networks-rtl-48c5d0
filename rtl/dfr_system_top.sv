// dfr_system_top: the two delay-feedback reservoir (DFR) designs side by side.
//
// The first, dfr_accel_top, is the hybrid accelerator: a programmable-logic
// design behind an AXI4-Lite port that drives an analog Mackey-Glass chip
// through a serial DAC and reads it back through the FPGA's ADC, 100 virtual
// nodes per sample, 16-bit fixed point. The second, bladerf_dfr_top, is the
// all-digital software-radio design: a 26-bit floating-point DFR core with
// 50 nodes, sample and result memories and a host bus, fed either from
// memory or live from the radio's I/Q receive stream.
//
// The two designs share nothing, so this module only instantiates them and
// brings every port of each out: signals of the accelerator start with z_,
// those of the radio design with b_. Each has its own clock and active-low
// reset (the accelerator runs at 10 MHz, the float core was timed at about
// 194 MHz). The DAC, the Mackey-Glass chip, the ADC, the host processor and
// the radio front end are outside the FPGA and connect through these ports.
// Timing and protocols are those of the two designs; see their headers.
//
// Lint reports z_rst_n as both synchronous and asynchronous: it resets flops
// asynchronously and also disables handshake assertions, which is intended.
module dfr_system_top
  import dfr_pkg::*;
  import dfr_fp_pkg::*;
#(
  parameter int unsigned Z_N_NODES     = 100,
  parameter int unsigned Z_IN_AW       = 17,
  parameter int unsigned Z_RES_AW      = 17,
  parameter int unsigned Z_W_AW        = 7,
  parameter int unsigned Z_OUT_AW      = 11,
  parameter int unsigned Z_DAC_CLK_DIV = 1,
  parameter int unsigned B_SAMP_AW     = 13,
  parameter int unsigned B_N_NODES     = 50
) (
  // hybrid accelerator: clock, reset, AXI4-Lite slave
  input  logic                 z_clk,
  input  logic                 z_rst_n,
  input  logic [AXI_AW-1:0]    z_axil_awaddr,
  input  logic                 z_axil_awvalid,
  output logic                 z_axil_awready,
  input  logic [31:0]          z_axil_wdata,
  input  logic [3:0]           z_axil_wstrb,
  input  logic                 z_axil_wvalid,
  output logic                 z_axil_wready,
  output logic [1:0]           z_axil_bresp,
  output logic                 z_axil_bvalid,
  input  logic                 z_axil_bready,
  input  logic [AXI_AW-1:0]    z_axil_araddr,
  input  logic                 z_axil_arvalid,
  output logic                 z_axil_arready,
  output logic [31:0]          z_axil_rdata,
  output logic [1:0]           z_axil_rresp,
  output logic                 z_axil_rvalid,
  input  logic                 z_axil_rready,
  // hybrid accelerator: serial DAC, ADC, interrupt
  output logic                 z_dac_cs_n,
  output logic                 z_dac_sclk,
  output logic                 z_dac_sdi,
  output logic                 z_adc_convst,
  input  logic                 z_adc_eoc,
  input  logic [11:0]          z_adc_data,
  output logic                 z_irq_done,
  // software-radio design: clock, reset, host bus
  input  logic                 b_clk,
  input  logic                 b_rst_n,
  input  logic [B_SAMP_AW+1:0] b_host_addr,
  input  logic                 b_host_write,
  input  logic [31:0]          b_host_wdata,
  input  logic                 b_host_read,
  output logic [31:0]          b_host_rdata,
  // software-radio design: receive stream in, score stream out
  input  logic                 b_rx_valid,
  input  logic [11:0]          b_rx_i,
  input  logic [11:0]          b_rx_q,
  output logic                 b_score_valid,
  output fp_t                  b_score
);

  dfr_accel_top #(
    .N_NODES(Z_N_NODES), .IN_AW(Z_IN_AW), .RES_AW(Z_RES_AW),
    .W_AW(Z_W_AW), .OUT_AW(Z_OUT_AW), .DAC_CLK_DIV(Z_DAC_CLK_DIV)
  ) u_accel (
    .clk(z_clk), .rst_n(z_rst_n),
    .s_axil_awaddr(z_axil_awaddr), .s_axil_awvalid(z_axil_awvalid), .s_axil_awready(z_axil_awready),
    .s_axil_wdata(z_axil_wdata), .s_axil_wstrb(z_axil_wstrb), .s_axil_wvalid(z_axil_wvalid),
    .s_axil_wready(z_axil_wready), .s_axil_bresp(z_axil_bresp), .s_axil_bvalid(z_axil_bvalid),
    .s_axil_bready(z_axil_bready), .s_axil_araddr(z_axil_araddr), .s_axil_arvalid(z_axil_arvalid),
    .s_axil_arready(z_axil_arready), .s_axil_rdata(z_axil_rdata), .s_axil_rresp(z_axil_rresp),
    .s_axil_rvalid(z_axil_rvalid), .s_axil_rready(z_axil_rready),
    .dac_cs_n(z_dac_cs_n), .dac_sclk(z_dac_sclk), .dac_sdi(z_dac_sdi),
    .adc_convst(z_adc_convst), .adc_eoc(z_adc_eoc), .adc_data(z_adc_data),
    .irq_done(z_irq_done)
  );

  bladerf_dfr_top #(
    .SAMP_AW(B_SAMP_AW), .N_NODES(B_N_NODES)
  ) u_radio (
    .clk(b_clk), .rst_n(b_rst_n),
    .host_addr(b_host_addr), .host_write(b_host_write), .host_wdata(b_host_wdata),
    .host_read(b_host_read), .host_rdata(b_host_rdata),
    .rx_valid(b_rx_valid), .rx_i(b_rx_i), .rx_q(b_rx_q),
    .score_valid(b_score_valid), .score(b_score)
  );

endmodule
