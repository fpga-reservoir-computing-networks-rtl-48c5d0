// dfr_dac_spi: serial transmitter for the external 16-bit DAC that drives the
// analog Mackey-Glass node.
//
// The reservoir's sum of masked input and scaled feedback is converted to a
// voltage by an external 16-bit DAC (2.5 V reference) connected to FPGA
// header pins. The reference design only names that DAC, so the link here is
// a generic SPI-style write, this design's own choice: chip select low, 16
// data bits MSB first on sdi, changing after each falling sclk edge and
// sampled by the DAC on the rising edge, chip select back high after the last
// bit, which updates the DAC output.
//
// Interface: pulse `start` for one cycle with `code`; `busy` is high while a
// word is sent; `done` pulses one cycle when chip select returns high.
// Timing: sclk has a period of 2*CLK_DIV clock cycles; `done` is high in the
// cycle that follows the clock edge 32*CLK_DIV edges after the edge that took
// `start`.
module dfr_dac_spi #(
  parameter int unsigned BITS    = 16,
  parameter int unsigned CLK_DIV = 1    // half sclk period in clock cycles
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [BITS-1:0] code,
  output logic            busy,
  output logic            done,
  output logic            cs_n,
  output logic            sclk,
  output logic            sdi
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned BW = $clog2(BITS);

  logic [BITS-1:0] shreg;
  logic [DW-1:0]   div;
  logic [BW-1:0]   bitcnt;

  assign busy = !cs_n;
  assign sdi  = shreg[BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      div    <= '0;
      bitcnt <= '0;
      cs_n   <= 1'b1;
      sclk   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cs_n) begin
        if (start) begin
          shreg  <= code;
          cs_n   <= 1'b0;
          sclk   <= 1'b0;
          div    <= '0;
          bitcnt <= '0;
        end
      end else if (div == DW'(CLK_DIV - 1)) begin
        div <= '0;
        if (!sclk) begin
          sclk <= 1'b1;                 // DAC samples sdi on this edge
        end else begin
          sclk  <= 1'b0;
          shreg <= {shreg[BITS-2:0], 1'b0};
          if (bitcnt == BW'(BITS - 1)) begin
            cs_n <= 1'b1;               // last bit: latch DAC output
            done <= 1'b1;
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

endmodule
