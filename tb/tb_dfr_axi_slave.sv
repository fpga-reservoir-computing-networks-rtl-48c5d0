// tb_dfr_axi_slave: self-checking test of the AXI4-Lite slave. The testbench
// is the AXI master and also the word-bus target (a memory with one-cycle
// read latency). Checked: written words reach the bus at the right word
// address, reads return the bus data with OKAY, writes whose address comes
// before the data, a write with all strobes low (no bus write), back-pressure
// on the response channels, and a write given priority over a simultaneous
// read.
module tb_dfr_axi_slave;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic bus_we, bus_re;
  logic [AW-3:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  dfr_axi_slave #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [2**(AW-2)];
  int nwrites = 0;
  always_ff @(posedge clk) begin
    if (bus_we) begin mem[bus_addr] <= bus_wdata; nwrites <= nwrites + 1; end
    if (bus_re) bus_rdata <= mem[bus_addr];
  end

  task automatic axi_write(input logic [AW-1:0] a, input logic [31:0] d, input int aw_lead,
                           input int bdelay, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1;
    repeat (aw_lead) @(negedge clk);
    s_axil_wdata = d; s_axil_wstrb = strb; s_axil_wvalid = 1;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    repeat (bdelay) begin check(s_axil_bvalid, "bvalid held"); @(negedge clk); end
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    check(s_axil_bresp == 2'b00, "bresp");
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axi_read(input logic [AW-1:0] a, output logic [31:0] d, input int rdelay);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    repeat (rdelay) @(negedge clk);
    check(s_axil_rvalid, "rvalid held");
    d = s_axil_rdata;
    check(s_axil_rresp == 2'b00, "rresp");
    s_axil_rready = 1; @(negedge clk); s_axil_rready = 0;
  endtask

  logic [31:0] ref_mem [2**(AW-2)];
  logic [31:0] d;
  int w0;
  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      ref_mem[i] = $urandom;
      axi_write(AW'(i * 4), ref_mem[i], i % 3, i % 2);
    end
    check(nwrites == 40, "bus writes");
    for (int i = 0; i < 40; i++) begin
      axi_read(AW'(i * 4), d, i % 3);
      check(d == ref_mem[i], $sformatf("read %0d got %0h exp %0h", i, d, ref_mem[i]));
    end
    // strobes all low: no bus write
    w0 = nwrites;
    axi_write(AW'(8), 32'hDEADBEEF, 0, 0, 4'h0);
    check(nwrites == w0, "write without strobes ignored");
    axi_read(AW'(8), d, 0);
    check(d == ref_mem[2], "word kept");
    // simultaneous read and write: write first
    @(negedge clk);
    s_axil_awaddr = AW'(12); s_axil_awvalid = 1; s_axil_wdata = 32'h12345678; s_axil_wstrb = 4'hF;
    s_axil_wvalid = 1; s_axil_araddr = AW'(12); s_axil_arvalid = 1;
    #1 check(s_axil_awready && !s_axil_arready, "write wins");
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    s_axil_bready = 1; @(negedge clk); s_axil_bready = 0;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    check(s_axil_rdata == 32'h12345678, "read after write");
    s_axil_rready = 1; @(negedge clk); s_axil_rready = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
