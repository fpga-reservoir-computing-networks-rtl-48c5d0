// dfr_axi_slave: AXI4-Lite slave that gives the host processor access to the
// registers and memories of the DFR accelerator.
//
// The reference design connects the accelerator to the embedded processor
// through an AXI interconnect; the slave itself is this design's own. It
// serves one transaction at a time. A write is accepted when address and data
// are both valid (awready and wready rise together in that cycle), is issued
// on the word bus in the same cycle and answered with an OKAY response. A
// read is accepted when no write is pending, issued on the bus in the same
// cycle, and the bus data, which arrives one cycle later, is returned with
// an OKAY response. Writes win over reads. Byte strobes are not supported: a
// write with any strobe bit set writes the whole word.
//
// Word bus: bus_addr is the AXI byte address without its two low bits (they
// are unused, accesses are whole words);
// bus_rdata must be valid the cycle after bus_re.
module dfr_axi_slave #(
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite
  input  logic [AW-1:0] s_axil_awaddr,
  input  logic          s_axil_awvalid,
  output logic          s_axil_awready,
  input  logic [31:0]   s_axil_wdata,
  input  logic [3:0]    s_axil_wstrb,
  input  logic          s_axil_wvalid,
  output logic          s_axil_wready,
  output logic [1:0]    s_axil_bresp,
  output logic          s_axil_bvalid,
  input  logic          s_axil_bready,
  input  logic [AW-1:0] s_axil_araddr,
  input  logic          s_axil_arvalid,
  output logic          s_axil_arready,
  output logic [31:0]   s_axil_rdata,
  output logic [1:0]    s_axil_rresp,
  output logic          s_axil_rvalid,
  input  logic          s_axil_rready,
  // word bus
  output logic          bus_we,
  output logic          bus_re,
  output logic [AW-3:0] bus_addr,
  output logic [31:0]   bus_wdata,
  input  logic [31:0]   bus_rdata
);
  typedef enum logic [1:0] {A_IDLE, A_BRESP, A_RDATA, A_RRESP} astate_e;
  astate_e state;

  logic wr_go, rd_go;
  assign wr_go = (state == A_IDLE) && s_axil_awvalid && s_axil_wvalid;
  assign rd_go = (state == A_IDLE) && s_axil_arvalid && !wr_go;

  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign s_axil_arready = rd_go;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_bvalid  = (state == A_BRESP);
  assign s_axil_rvalid  = (state == A_RRESP);

  assign bus_we    = wr_go && (s_axil_wstrb != 4'd0);
  assign bus_re    = rd_go;
  assign bus_addr  = wr_go ? s_axil_awaddr[AW-1:2] : s_axil_araddr[AW-1:2];
  assign bus_wdata = s_axil_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= A_IDLE;
      s_axil_rdata <= '0;
    end else begin
      unique case (state)
        A_IDLE:  if (wr_go) state <= A_BRESP; else if (rd_go) state <= A_RDATA;
        A_BRESP: if (s_axil_bready) state <= A_IDLE;
        A_RDATA: begin
          s_axil_rdata <= bus_rdata;
          state        <= A_RRESP;
        end
        A_RRESP: if (s_axil_rready) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  // Response channels hold until accepted; the master must do the same.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_arvalid && !s_axil_arready |=> s_axil_arvalid);
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_awvalid && !s_axil_awready |=> s_axil_awvalid);

endmodule
