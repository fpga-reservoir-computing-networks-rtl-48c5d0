// dfr_controller: run sequencer of the hybrid DFR accelerator.
//
// A run passes through the three states of the reference design:
// reservoir initialization and reservoir emulation (both carried out by the
// reservoir block, which reports which phase it is in), then output
// evaluation by the matrix multiplication block. The controller starts the
// reservoir block, starts the matrix multiplication block when the reservoir
// block finishes, and raises `done` until the host clears it or starts a new
// run. It also counts the clock cycles of the run for the host.
//
// Interface: `start` and `clear_done` are one-cycle pulses from the register
// file; `state` is the run state shown in the status register. A start while
// busy is ignored. Timing: res_start follows start by one cycle, mm_start
// follows res_done by one cycle; the cycle counter holds the number of clock
// cycles between the edge that took `start` and the edge that raised `done`.
// Once the reservoir block reports its emulation phase, the state stays
// EMUL until evaluation begins.
module dfr_controller
  import dfr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        clear_done,
  // reservoir block
  output logic        res_start,
  input  logic        res_emul,
  input  logic        res_done,
  // matrix multiplication block
  output logic        mm_start,
  input  logic        mm_done,
  // status
  output run_state_e  state,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles
);
  typedef enum logic [1:0] {C_IDLE, C_RES, C_MM} cstate_e;
  cstate_e cs;
  logic    emul_seen;   // the reservoir block has entered its emulation phase

  assign busy = (cs != C_IDLE);

  always_comb begin
    unique case (cs)
      C_RES:   state = (res_emul || emul_seen) ? ST_EMUL : ST_INIT;
      C_MM:    state = ST_EVAL;
      default: state = done ? ST_DONE : ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs        <= C_IDLE;
      res_start <= 1'b0;
      mm_start  <= 1'b0;
      done      <= 1'b0;
      cycles    <= '0;
      emul_seen <= 1'b0;
    end else begin
      res_start <= 1'b0;
      mm_start  <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      unique case (cs)
        C_IDLE: begin
          if (clear_done) done <= 1'b0;
          if (start) begin
            done      <= 1'b0;
            cycles    <= '0;
            emul_seen <= 1'b0;
            res_start <= 1'b1;
            cs        <= C_RES;
          end
        end
        C_RES: begin
          if (res_emul) emul_seen <= 1'b1;
          if (res_done) begin
            mm_start <= 1'b1;
            cs       <= C_MM;
          end
        end
        C_MM: if (mm_done) begin
          done <= 1'b1;
          cs   <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

endmodule
