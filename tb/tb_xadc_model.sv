// tb_xadc_model: behavioural model of the FPGA's embedded 12-bit ADC (1 V
// reference) for testbenches. On a convst pulse it samples vin; CONV_CYCLES
// clock cycles later it presents the code on data and pulses eoc for one
// cycle.
module tb_xadc_model #(
  parameter int CONV_CYCLES = 24
) (
  input  logic        clk,
  input  logic        convst,
  input  real         vin,
  output logic        eoc,
  output logic [11:0] data
);
  int   cnt;
  real  held;
  initial begin
    cnt  = 0;
    eoc  = 1'b0;
    data = '0;
    held = 0.0;
  end
  always @(posedge clk) begin
    eoc <= 1'b0;
    if (convst) begin
      held <= vin;
      cnt  <= CONV_CYCLES;
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        eoc  <= 1'b1;
        data <= 12'(dfr_tb_pkg::adc_code(held));
      end
    end
  end
endmodule
