// tb_dac_model: behavioural model of the external 16-bit serial DAC (2.5 V
// reference) for testbenches. Shifts sdi in on rising sclk while cs_n is low
// and updates the output voltage when cs_n rises. Also keeps the last code
// and counts the words received.
module tb_dac_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        sdi,
  output real         vout,
  output logic [15:0] code,
  output int          words
);
  logic [15:0] sh;
  initial begin
    vout  = 0.0;
    code  = '0;
    sh    = '0;
    words = 0;
  end
  always @(posedge sclk) if (!cs_n) sh <= {sh[14:0], sdi};
  always @(posedge cs_n) begin
    code  <= sh;
    vout  <= dfr_tb_pkg::dac_volts(32'(sh));
    words <= words + 1;
  end
endmodule
