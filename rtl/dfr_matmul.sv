// dfr_matmul: the readout layer (matrix multiplication block) of the hybrid
// DFR accelerator.
//
// For each recorded test sample s it computes the prediction
//     y[s] = ( sum_{i=0}^{N-1} W[i] * x[s*N + i] ) >>> OUT_SHIFT
// (Eq. 2.2), with W signed 16-bit output weights from the weight memory and
// x unsigned 16-bit node values from the reservoir memory, and writes y[s]
// (32 bit) to the output memory. As in the reference design, counters select
// the memory words and a small state machine runs them, and one multiplier is
// time-multiplexed over all products. The four-stage pipeline (address,
// memory data, product register, accumulator) and the 48-bit accumulator
// scaled by OUT_SHIFT are this design's choices.
//
// Interface: pulse `start` with num_test stable; `busy` until `done` pulses.
// Timing: one product per cycle; `done` is high in the cycle after the edge
// num_test*N_NODES + 2 edges after the edge that took `start` (num_test > 0).
// With num_test = 0 `done` follows `start` directly.
module dfr_matmul #(
  parameter int unsigned N_NODES   = 100,
  parameter int unsigned RES_AW    = 17,
  parameter int unsigned W_AW      = 7,
  parameter int unsigned OUT_AW    = 11,
  parameter int unsigned OUT_SHIFT = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       num_test,
  output logic              busy,
  output logic              done,
  // weight memory (read)
  output logic              w_en,
  output logic [W_AW-1:0]   w_addr,
  input  logic [15:0]       w_rdata,
  // reservoir memory (read)
  output logic              r_en,
  output logic [RES_AW-1:0] r_addr,
  input  logic [15:0]       r_rdata,
  // output memory (write)
  output logic              o_we,
  output logic [OUT_AW-1:0] o_addr,
  output logic [31:0]       o_wdata
);
  localparam int unsigned NW = $clog2(N_NODES);

  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DRAIN} mstate_e;
  mstate_e state;

  logic [NW-1:0]     node_cnt;
  logic [15:0]       samp_cnt;
  logic [15:0]       n_test;
  logic [RES_AW-1:0] r_ptr;
  logic [OUT_AW-1:0] o_ptr;
  // pipeline valid / last-of-sample flags
  logic              d_valid, d_last, p_valid, p_last;
  logic signed [33:0] prod;
  logic signed [47:0] acc;
  logic signed [47:0] acc_next;

  assign busy   = (state != M_IDLE);
  assign w_en   = (state == M_RUN);
  assign r_en   = (state == M_RUN);
  assign w_addr = W_AW'(node_cnt);
  assign r_addr = r_ptr;
  assign acc_next = acc + 48'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      node_cnt <= '0;
      samp_cnt <= '0;
      n_test   <= '0;
      r_ptr    <= '0;
      o_ptr    <= '0;
      d_valid  <= 1'b0;
      d_last   <= 1'b0;
      p_valid  <= 1'b0;
      p_last   <= 1'b0;
      prod     <= '0;
      acc      <= '0;
      o_we     <= 1'b0;
      o_addr   <= '0;
      o_wdata  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      o_we <= 1'b0;
      // stage 1: memory data valid next cycle
      d_valid <= (state == M_RUN);
      d_last  <= (state == M_RUN) && (node_cnt == NW'(N_NODES - 1));
      // stage 2: product register
      p_valid <= d_valid;
      p_last  <= d_last;
      if (d_valid) prod <= $signed(w_rdata) * $signed({2'b00, r_rdata});
      // stage 3: accumulate, write at the end of each sample
      if (p_valid) begin
        if (p_last) begin
          acc     <= '0;
          o_we    <= 1'b1;
          o_addr  <= o_ptr;
          o_wdata <= 32'(acc_next >>> OUT_SHIFT);
          o_ptr   <= o_ptr + 1'b1;
        end else begin
          acc <= acc_next;
        end
      end

      unique case (state)
        M_IDLE: if (start) begin
          node_cnt <= '0;
          samp_cnt <= '0;
          r_ptr    <= '0;
          o_ptr    <= '0;
          acc      <= '0;
          n_test   <= num_test;
          if (num_test == 16'd0) done <= 1'b1;
          else                   state <= M_RUN;
        end
        M_RUN: begin
          r_ptr <= r_ptr + 1'b1;
          if (node_cnt == NW'(N_NODES - 1)) begin
            node_cnt <= '0;
            samp_cnt <= samp_cnt + 1'b1;
            if (samp_cnt == n_test - 1'b1) state <= M_DRAIN;
          end else begin
            node_cnt <= node_cnt + 1'b1;
          end
        end
        M_DRAIN: if (p_valid && p_last && !d_valid) begin
          state <= M_IDLE;
          done  <= 1'b1;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
