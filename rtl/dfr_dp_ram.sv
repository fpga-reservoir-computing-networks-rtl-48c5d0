// dfr_dp_ram: true dual-port synchronous RAM, one clock.
//
// Used for the four on-chip memories of the DFR accelerator (masked inputs,
// recorded node values, output weights, predictions). Port A serves the AXI
// host, port B the reservoir and matrix multiplication datapath. Both ports
// can read and write; a read returns the data one clock after the address
// (registered output, as in a block RAM). A write on a port also updates that
// port's read register with the new data (write-first). Writing the same
// address from both ports in one cycle is not allowed (asserted). The content
// is not reset, like block RAM; whatever is read must have been written.
module dfr_dp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 10
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [2**AW];

  // Both ports in one process so that the array has a single driver.
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        mem[a_addr] <= a_wdata;
        a_rdata     <= a_wdata;
      end else begin
        a_rdata     <= mem[a_addr];
      end
    end
    if (b_en) begin
      if (b_we) begin
        mem[b_addr] <= b_wdata;
        b_rdata     <= b_wdata;
      end else begin
        b_rdata     <= mem[b_addr];
      end
    end
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("dfr_dp_ram: both ports write address %0h", a_addr);

endmodule
