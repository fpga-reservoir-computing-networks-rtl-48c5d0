// hls_dfr_player: feeds the floating-point DFR core on the software radio,
// either from the on-chip test sample memory or from the live receive stream,
// and stores the scores.
//
// Playback mode (start pulse): reads num_samples 32-bit words from the
// sample memory, word s holding I in bits 15:0 and Q in bits 31:16 (signed
// 16 bit, as the radio's receive path packs them), hands each pair to the
// core and writes the score of sample s to result address s. Live mode
// (live = 1, not playing back): each receive-stream sample, 12-bit signed I
// and Q sign-extended to 16 bits, is handed to the core if it is idle, and
// dropped (and counted) if it is still busy; scores go to consecutive result
// addresses, wrapping. Every score is also presented on score_valid/score.
//
// The test memory and the real-time test on the radio follow the reference
// design; the word layout, the live-mode drop policy and the result memory
// are this design's choices. Sample memory read latency is one cycle.
module hls_dfr_player
  import dfr_fp_pkg::*;
#(
  parameter int unsigned SAMP_AW = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               live,
  input  logic [SAMP_AW:0]   num_samples,
  output logic               busy,
  output logic               done,
  output logic [31:0]        dropped,
  output logic [31:0]        scores,
  // sample memory
  output logic               s_en,
  output logic [SAMP_AW-1:0] s_addr,
  input  logic [31:0]        s_rdata,
  // live receive stream
  input  logic               rx_valid,
  input  logic [11:0]        rx_i,
  input  logic [11:0]        rx_q,
  // core
  output logic               c_valid,
  input  logic               c_ready,
  output logic signed [15:0] c_i,
  output logic signed [15:0] c_q,
  input  logic               c_out_valid,
  input  fp_t                c_out,
  // result memory
  output logic               r_we,
  output logic [SAMP_AW-1:0] r_addr,
  output logic [31:0]        r_wdata,
  // score stream
  output logic               score_valid,
  output fp_t                score
);
  typedef enum logic [1:0] {P_IDLE, P_READ, P_FEED, P_WAIT} pstate_e;
  pstate_e state;

  logic [SAMP_AW:0]   idx;
  logic [SAMP_AW:0]   n_samp;
  logic [SAMP_AW-1:0] r_ptr;
  logic               live_act;

  assign busy     = (state != P_IDLE);
  assign live_act = live && (state == P_IDLE);
  assign s_en     = (state == P_READ);
  assign s_addr   = idx[SAMP_AW-1:0];

  always_comb begin
    if (live_act) begin
      c_valid = rx_valid;
      c_i     = {{4{rx_i[11]}}, rx_i};
      c_q     = {{4{rx_q[11]}}, rx_q};
    end else begin
      c_valid = (state == P_FEED);
      c_i     = s_rdata[15:0];
      c_q     = s_rdata[31:16];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= P_IDLE;
      idx         <= '0;
      n_samp      <= '0;
      r_ptr       <= '0;
      done        <= 1'b0;
      dropped     <= '0;
      scores      <= '0;
      r_we        <= 1'b0;
      r_addr      <= '0;
      r_wdata     <= '0;
      score_valid <= 1'b0;
      score       <= FP_ZERO;
    end else begin
      done        <= 1'b0;
      r_we        <= 1'b0;
      score_valid <= 1'b0;
      if (c_out_valid) begin
        r_we        <= 1'b1;
        r_addr      <= r_ptr;
        r_wdata     <= 32'(c_out);
        r_ptr       <= r_ptr + 1'b1;
        score_valid <= 1'b1;
        score       <= c_out;
        scores      <= scores + 1'b1;
      end
      if (live_act && rx_valid && !c_ready) dropped <= dropped + 1'b1;
      unique case (state)
        P_IDLE: if (start) begin
          idx    <= '0;
          n_samp <= num_samples;
          r_ptr  <= '0;
          scores <= '0;
          if (num_samples == '0) done  <= 1'b1;
          else                   state <= P_READ;
        end
        P_READ: state <= P_FEED;           // memory data valid next cycle
        P_FEED: if (c_ready) state <= P_WAIT;
        P_WAIT: if (c_out_valid) begin
          if (idx == n_samp - 1'b1) begin
            state <= P_IDLE;
            done  <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= P_READ;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
