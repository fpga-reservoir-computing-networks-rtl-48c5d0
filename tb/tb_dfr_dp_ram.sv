// tb_dfr_dp_ram: self-checking test of the dual-port RAM. Random reads and
// writes on both ports (never writing the same address from both in one
// cycle) are compared with a shadow array; read data must appear exactly one
// cycle after the address, and a write returns the written word.
module tb_dfr_dp_ram;
  localparam int W = 16, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  dfr_dp_ram #(.WIDTH(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] shadow [2**AW];
  logic [W-1:0] exp_a, exp_b;
  bit chk_a, chk_b;

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = W'($urandom);
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = W'($urandom);
      shadow[i] = a_wdata; shadow[i+1] = b_wdata;
    end
    chk_a = 0; chk_b = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check data of the previous cycle's accesses
      if (chk_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A %0h %0h", a_rdata, exp_a); end end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B %0h %0h", b_rdata, exp_b); end end
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = AW'($urandom); a_wdata = W'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = AW'($urandom); b_wdata = W'($urandom);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      // expected read values: reads see the contents before this cycle's writes
      exp_a = (a_we) ? a_wdata : shadow[a_addr];
      exp_b = (b_we) ? b_wdata : shadow[b_addr];
      if (a_en && !a_we && b_en && b_we && a_addr == b_addr) exp_a = shadow[a_addr];
      if (b_en && !b_we && a_en && a_we && a_addr == b_addr) exp_b = shadow[b_addr];
      chk_a = a_en; chk_b = b_en;
      if (a_en && a_we) shadow[a_addr] = a_wdata;
      if (b_en && b_we) shadow[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
