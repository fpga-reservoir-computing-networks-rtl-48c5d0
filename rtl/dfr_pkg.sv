// dfr_pkg: constants and types shared by the hybrid delayed-feedback-reservoir
// (DFR) accelerator.
//
// The accelerator is memory mapped behind an AXI4-Lite slave. The byte address
// is split into a region field (which of the register file or the four
// memories is addressed) and a word offset inside that region. Ten 32-bit
// registers control and monitor a run. The run goes through the three states
// initialization, emulation and evaluation; the number of registers, the
// three run states, 16-bit data and the four memories follow the reference
// design, while the exact register layout and encodings are this design's own.
package dfr_pkg;

  // Address regions, selected by the top three bits of the AXI byte address.
  typedef enum logic [2:0] {
    RGN_REGS   = 3'd0,
    RGN_INPUT  = 3'd1,   // masked input samples J(t), 16 bit
    RGN_RESERV = 3'd2,   // recorded virtual node values, 16 bit
    RGN_WEIGHT = 3'd3,   // output weights, signed 16 bit
    RGN_OUTPUT = 3'd4    // predictions, signed 32 bit
  } region_e;

  // Bits of the word offset that each region uses (word address width of the
  // largest memory). The AXI byte address is {region, word offset, 2'b00}.
  localparam int unsigned OFFS_W = 17;
  localparam int unsigned AXI_AW = 3 + OFFS_W + 2;

  // Register indices (word offsets in RGN_REGS).
  localparam int unsigned NUM_REGS     = 10;
  localparam int unsigned REG_CTRL     = 0;  // W: bit0 start (self clearing), bit1 clear done
  localparam int unsigned REG_STATUS   = 1;  // R: bit0 busy, bit1 done, bits 4:2 run state
  localparam int unsigned REG_NUM_INIT = 2;  // RW: samples used to initialise the reservoir
  localparam int unsigned REG_NUM_TEST = 3;  // RW: samples whose node values are recorded
  localparam int unsigned REG_ETA      = 4;  // RW: feedback scale, unsigned Q1.15
  localparam int unsigned REG_NODES    = 5;  // R : number of virtual nodes (build parameter)
  localparam int unsigned REG_SETTLE   = 6;  // RW: clock cycles waited after a DAC update
  localparam int unsigned REG_LAST_DAC = 7;  // R : last code sent to the DAC
  localparam int unsigned REG_LAST_ADC = 8;  // R : last ADC result
  localparam int unsigned REG_CYCLES   = 9;  // R : clock cycles taken by the last run

  // Run states, visible in REG_STATUS[4:2].
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_INIT = 3'd1,   // reservoir initialization (nodes not recorded)
    ST_EMUL = 3'd2,   // reservoir emulation (nodes recorded)
    ST_EVAL = 3'd3,   // output evaluation (matrix multiplication)
    ST_DONE = 3'd4
  } run_state_e;

  // Fraction bits of the feedback scale eta.
  localparam int unsigned ETA_FRAC = 15;

endpackage
