// dfr_accel_top: programmable-logic part of the hybrid FPGA-ASIC delayed
// feedback reservoir (DFR) accelerator.
//
// A host processor loads masked input samples and trained output weights
// over AXI4-Lite, sets the number of initialization and test samples and the
// feedback scale, and starts a run. The reservoir block streams the masked
// inputs through the external analog loop (16-bit DAC -> Mackey-Glass chip
// -> 12-bit ADC) one subsample at a time, keeping the virtual node chain in a
// shift register and recording node values of the test samples. The matrix
// multiplication block then forms one prediction per test sample from those
// node values and the weights. The host reads the predictions back.
//
// Blocks: dfr_axi_slave (AXI4-Lite to word bus), dfr_regfile (ten registers),
// dfr_controller (init / emulate / evaluate sequencing), dfr_reservoir,
// dfr_dac_spi, dfr_matmul and four dfr_dp_ram memories (input, reservoir,
// weight, output). Port A of each memory belongs to the host, port B to the
// datapath.
//
// Address map (byte address = {region[2:0], word offset[16:0], 2'b00}):
//   region 0 registers, 1 input memory (2**IN_AW x 16), 2 reservoir memory
//   (2**RES_AW x 16), 3 weight memory (2**W_AW x 16, signed), 4 output
//   memory (2**OUT_AW x 32, signed). Memory reads return the value zero
//   extended to 32 bits.
// The structure, the 16-bit datapath, N = 100 nodes and the four memories
// follow the reference design; memory depths, address map and the ADC
// handshake (adc_convst pulse, adc_eoc with adc_data) are this design's own.
//
// Lint notes that stand: the DAC busy flag, the reservoir busy flag and the
// reservoir's saturation event are not needed here (the controller works
// from start/done pulses; the saturation event is for observation), and
// port B read data of the output memory is unused because that port only
// writes. The reset is asynchronous for flops and also feeds the
// 'disable iff' of assertions, which lint reports as a net used both ways.
module dfr_accel_top
  import dfr_pkg::*;
#(
  parameter int unsigned N_NODES     = 100,
  parameter int unsigned IN_AW       = 17,
  parameter int unsigned RES_AW      = 17,
  parameter int unsigned W_AW        = 7,
  parameter int unsigned OUT_AW      = 11,
  parameter int unsigned DAC_CLK_DIV = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [AXI_AW-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [AXI_AW-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // external DAC
  output logic              dac_cs_n,
  output logic              dac_sclk,
  output logic              dac_sdi,
  // ADC
  output logic              adc_convst,
  input  logic              adc_eoc,
  input  logic [11:0]       adc_data,
  // run finished
  output logic              irq_done
);
  // ---------------- host side ----------------
  logic              bus_we, bus_re;
  logic [AXI_AW-3:0] bus_addr;
  logic [31:0]       bus_wdata, bus_rdata;

  dfr_axi_slave #(.AW(AXI_AW)) u_axi (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata
  );

  region_e           bus_rgn, rd_rgn;
  logic [OFFS_W-1:0] bus_off;
  assign bus_rgn = region_e'(bus_addr[OFFS_W +: 3]);
  assign bus_off = bus_addr[OFFS_W-1:0];

  logic sel_reg, sel_in, sel_res, sel_w, sel_out;
  assign sel_reg = (bus_rgn == RGN_REGS);
  assign sel_in  = (bus_rgn == RGN_INPUT);
  assign sel_res = (bus_rgn == RGN_RESERV);
  assign sel_w   = (bus_rgn == RGN_WEIGHT);
  assign sel_out = (bus_rgn == RGN_OUTPUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rd_rgn <= RGN_REGS;
    else if (bus_re) rd_rgn <= bus_rgn;
  end

  // ---------------- registers and control ----------------
  logic        dac_start, dac_done, dac_busy, sat_evt;
  logic [15:0] dac_code;
  logic        start, clear_done, busy, done;
  logic [15:0] num_init, num_test, eta, settle;
  logic [31:0] cycles, reg_rdata;
  logic [11:0] last_adc;
  run_state_e  run_state;
  logic        res_start, res_emul, res_done, res_busy;
  logic        mm_start, mm_done, mm_busy;

  dfr_regfile #(.N_NODES(N_NODES)) u_regs (
    .clk, .rst_n,
    .we(bus_we && sel_reg), .re(bus_re && sel_reg), .addr(bus_off[3:0]),
    .wdata(bus_wdata), .rdata(reg_rdata),
    .start, .clear_done, .num_init, .num_test, .eta, .settle,
    .busy, .done, .state(run_state), .last_dac(dac_code), .last_adc, .cycles
  );

  dfr_controller u_ctrl (
    .clk, .rst_n, .start, .clear_done,
    .res_start, .res_emul, .res_done,
    .mm_start, .mm_done,
    .state(run_state), .busy, .done, .cycles
  );
  assign irq_done = done;

  // ---------------- memories ----------------
  logic [15:0]       in_a_rdata, res_a_rdata, w_a_rdata;
  logic [31:0]       out_a_rdata;
  logic              in_b_en;
  logic [IN_AW-1:0]  in_b_addr;
  logic [15:0]       in_b_rdata;
  logic              res_we;
  logic [RES_AW-1:0] res_waddr, mm_raddr;
  logic [15:0]       res_wdata, res_b_rdata;
  logic              mm_r_en, mm_w_en, mm_o_we;
  logic [W_AW-1:0]   mm_waddr;
  logic [15:0]       w_b_rdata;
  logic [OUT_AW-1:0] mm_oaddr;
  logic [31:0]       mm_owdata;

  dfr_dp_ram #(.WIDTH(16), .AW(IN_AW)) u_in_mem (
    .clk,
    .a_en((bus_we || bus_re) && sel_in), .a_we(bus_we), .a_addr(bus_off[IN_AW-1:0]),
    .a_wdata(bus_wdata[15:0]), .a_rdata(in_a_rdata),
    .b_en(in_b_en), .b_we(1'b0), .b_addr(in_b_addr), .b_wdata(16'd0), .b_rdata(in_b_rdata)
  );

  dfr_dp_ram #(.WIDTH(16), .AW(RES_AW)) u_res_mem (
    .clk,
    .a_en((bus_we || bus_re) && sel_res), .a_we(bus_we), .a_addr(bus_off[RES_AW-1:0]),
    .a_wdata(bus_wdata[15:0]), .a_rdata(res_a_rdata),
    .b_en(res_we || mm_r_en), .b_we(res_we), .b_addr(mm_busy ? mm_raddr : res_waddr),
    .b_wdata(res_wdata), .b_rdata(res_b_rdata)
  );

  dfr_dp_ram #(.WIDTH(16), .AW(W_AW)) u_w_mem (
    .clk,
    .a_en((bus_we || bus_re) && sel_w), .a_we(bus_we), .a_addr(bus_off[W_AW-1:0]),
    .a_wdata(bus_wdata[15:0]), .a_rdata(w_a_rdata),
    .b_en(mm_w_en), .b_we(1'b0), .b_addr(mm_waddr), .b_wdata(16'd0), .b_rdata(w_b_rdata)
  );

  dfr_dp_ram #(.WIDTH(32), .AW(OUT_AW)) u_out_mem (
    .clk,
    .a_en((bus_we || bus_re) && sel_out), .a_we(bus_we), .a_addr(bus_off[OUT_AW-1:0]),
    .a_wdata(bus_wdata), .a_rdata(out_a_rdata),
    .b_en(mm_o_we), .b_we(mm_o_we), .b_addr(mm_oaddr), .b_wdata(mm_owdata), .b_rdata()
  );

  always_comb begin
    unique case (rd_rgn)
      RGN_INPUT:  bus_rdata = {16'd0, in_a_rdata};
      RGN_RESERV: bus_rdata = {16'd0, res_a_rdata};
      RGN_WEIGHT: bus_rdata = {16'd0, w_a_rdata};
      RGN_OUTPUT: bus_rdata = out_a_rdata;
      default:    bus_rdata = reg_rdata;
    endcase
  end

  // ---------------- datapath ----------------

  dfr_reservoir #(.N_NODES(N_NODES), .IN_AW(IN_AW), .RES_AW(RES_AW)) u_res (
    .clk, .rst_n, .start(res_start),
    .num_init, .num_test, .eta, .settle,
    .busy(res_busy), .done(res_done), .emul(res_emul),
    .in_en(in_b_en), .in_addr(in_b_addr), .in_rdata(in_b_rdata),
    .res_we, .res_addr(res_waddr), .res_wdata,
    .dac_start, .dac_code, .dac_done,
    .adc_convst, .adc_eoc, .adc_data,
    .last_adc, .sat_evt
  );

  dfr_dac_spi #(.BITS(16), .CLK_DIV(DAC_CLK_DIV)) u_dac (
    .clk, .rst_n, .start(dac_start), .code(dac_code),
    .busy(dac_busy), .done(dac_done),
    .cs_n(dac_cs_n), .sclk(dac_sclk), .sdi(dac_sdi)
  );

  dfr_matmul #(.N_NODES(N_NODES), .RES_AW(RES_AW), .W_AW(W_AW), .OUT_AW(OUT_AW)) u_mm (
    .clk, .rst_n, .start(mm_start), .num_test,
    .busy(mm_busy), .done(mm_done),
    .w_en(mm_w_en), .w_addr(mm_waddr), .w_rdata(w_b_rdata),
    .r_en(mm_r_en), .r_addr(mm_raddr), .r_rdata(res_b_rdata),
    .o_we(mm_o_we), .o_addr(mm_oaddr), .o_wdata(mm_owdata)
  );

endmodule
