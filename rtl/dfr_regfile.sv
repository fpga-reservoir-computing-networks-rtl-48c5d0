// dfr_regfile: the ten 32-bit configuration and status registers of the
// hybrid DFR accelerator.
//
// The reference design has ten registers that control the system, monitor
// its status and give the number of samples used for initialization and
// testing; the layout below is this design's own (see dfr_pkg):
//   0 CTRL     W  bit0 start a run (pulse), bit1 clear the done flag (pulse)
//   1 STATUS   R  bit0 busy, bit1 done, bits 4:2 run state
//   2 NUM_INIT RW initialization samples (16 bit)
//   3 NUM_TEST RW test samples (16 bit)
//   4 ETA      RW feedback scale, unsigned Q1.15 (reset 0x0800 = 0.0625)
//   5 NODES    R  number of virtual nodes
//   6 SETTLE   RW cycles waited after each DAC update (16 bit)
//   7 LAST_DAC R  last DAC code
//   8 LAST_ADC R  last ADC result
//   9 CYCLES   R  cycles of the last run
// Writes to read-only registers and reads of CTRL are ignored / return 0.
//
// Interface: a simple word bus; `re` returns `rdata` one cycle later.
module dfr_regfile
  import dfr_pkg::*;
#(
  parameter int unsigned N_NODES = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic        re,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // control outputs
  output logic        start,
  output logic        clear_done,
  output logic [15:0] num_init,
  output logic [15:0] num_test,
  output logic [15:0] eta,
  output logic [15:0] settle,
  // monitor inputs
  input  logic        busy,
  input  logic        done,
  input  run_state_e  state,
  input  logic [15:0] last_dac,
  input  logic [11:0] last_adc,
  input  logic [31:0] cycles
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start      <= 1'b0;
      clear_done <= 1'b0;
      num_init   <= '0;
      num_test   <= '0;
      eta        <= 16'h0800;
      settle     <= '0;
      rdata      <= '0;
    end else begin
      start      <= 1'b0;
      clear_done <= 1'b0;
      if (we) begin
        unique case (32'(addr))
          REG_CTRL: begin
            start      <= wdata[0];
            clear_done <= wdata[1];
          end
          REG_NUM_INIT: num_init <= wdata[15:0];
          REG_NUM_TEST: num_test <= wdata[15:0];
          REG_ETA:      eta      <= wdata[15:0];
          REG_SETTLE:   settle   <= wdata[15:0];
          default: ;
        endcase
      end
      if (re) begin
        unique case (32'(addr))
          REG_STATUS:   rdata <= {27'd0, state, done, busy};
          REG_NUM_INIT: rdata <= {16'd0, num_init};
          REG_NUM_TEST: rdata <= {16'd0, num_test};
          REG_ETA:      rdata <= {16'd0, eta};
          REG_NODES:    rdata <= 32'(N_NODES);
          REG_SETTLE:   rdata <= {16'd0, settle};
          REG_LAST_DAC: rdata <= {16'd0, last_dac};
          REG_LAST_ADC: rdata <= {20'd0, last_adc};
          REG_CYCLES:   rdata <= cycles;
          default:      rdata <= '0;
        endcase
      end
    end
  end

  // the register map must hold exactly NUM_REGS registers
  if (REG_CYCLES != NUM_REGS - 1) begin : g_map_check
    $error("register map does not match NUM_REGS");
  end

endmodule
