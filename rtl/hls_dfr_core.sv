// hls_dfr_core: all-digital floating-point delayed feedback reservoir for
// spectrum sensing on a software radio.
//
// For every received I/Q pair the core computes one occupancy score:
//   energy  e = sqrt((i/MAX_ADC)^2 + (q/MAX_ADC)^2)            (Eq. 3.1)
//   for each node k (visited from the last node to the first):
//     x_in  = GAMMA * (MASK[k] * e) + ETA * res[k]
//     x_new = MG_CC * x_in / (MG_A + MG_C * (MG_B * x_in)^MG_P)
//     res[k] = x_new;   score += W[k] * x_new
// Each node's new value depends on its own value from the previous I/Q pair,
// so the node array is a ring delayed by one full sample. The reservoir
// starts at zero after reset.
//
// The node loop is unrolled twice, as in the reference core: two lanes, each
// with its own multiplier, adder and divider, work on nodes k and k-1 at the
// same time, and a state machine steps both lanes through the operations of
// one node. The power (MG_B*x_in)^MG_P is computed by square-and-multiply
// over the bits of the constant MG_P, LSB first, skipping the multiply for
// zero bits and the square after the top bit. The two products W*x_new are
// added to the score in node order, (score + term[k]) + term[k-1], so the
// result is the same as a one-node-at-a-time loop. The energy uses lane 0
// and one square-root unit.
//
// Arithmetic is the 26-bit float of dfr_fp_pkg (8-bit exponent, 17-bit
// mantissa, round to nearest even). 50 nodes, gain 0.5, feedback 0.4, 16-bit
// I/Q inputs, the float format and the two-way unroll follow the reference
// design. This design's own choices: the Mackey-Glass constants
// (a = b = c = C = 1) and the integer exponent MG_P = 16, MAX_ADC = 2047
// (12-bit converter), mask and weights held in small register memories
// written through a load port, and single-cycle arithmetic units stepped by
// a state machine where the reference core is a deep pipeline. N_NODES must
// be even.
//
// Timing: out_valid rises 6 + (N_NODES/2)*(11 + PB - 1 + ONES) clock edges
// after the edge that took the input, where PB is the bit length of MG_P and
// ONES its number of one bits: 6 + 25*16 = 406 cycles at the defaults (the
// reference core reports 374).
//
// Interface: in_valid/in_ready handshake on (i_data, q_data); out_valid pulses
// for one cycle with the score in out_data; no back-pressure on the output.
// Load port: cfg_we with cfg_sel = 0 for the mask, 1 for the weights,
// cfg_addr the node and cfg_wdata the float value (write only while idle).
module hls_dfr_core
  import dfr_fp_pkg::*;
#(
  parameter int unsigned N_NODES = 50,
  parameter int unsigned MAX_ADC = 2047,
  parameter int unsigned MG_P    = 16,
  parameter fp_t GAMMA = '{sign: 1'b0, exp: 8'd126, man: 17'h00000},  // 0.5
  parameter fp_t ETA   = '{sign: 1'b0, exp: 8'd125, man: 17'h13333},  // 0.4
  parameter fp_t MG_A  = FP_ONE,
  parameter fp_t MG_B  = FP_ONE,
  parameter fp_t MG_C  = FP_ONE,
  parameter fp_t MG_CC = FP_ONE,
  localparam int unsigned NW = $clog2(N_NODES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // sample input
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] i_data,
  input  logic signed [15:0] q_data,
  // score output
  output logic               out_valid,
  output fp_t                out_data,
  // mask / weight load port
  input  logic               cfg_we,
  input  logic               cfg_sel,
  input  logic [NW-1:0]      cfg_addr,
  input  fp_t                cfg_wdata
);
  localparam int unsigned PB = $clog2(MG_P + 1);
  localparam fp_t MAXF = fp_from_int16(16'(MAX_ADC));

  if (N_NODES % 2 != 0 || MG_P == 0) begin : g_param_check
    $error("hls_dfr_core needs an even N_NODES and MG_P > 0");
  end

  typedef enum logic [4:0] {
    S_IDLE, S_DIVI, S_DIVQ, S_SQI, S_SQQ, S_ADDE, S_SQRT,
    S_MASK, S_GAIN, S_FB, S_SUM, S_BX, S_PWM, S_PWS, S_CPW, S_DEN, S_NUM, S_DIV,
    S_W, S_ACC
  } cstate_e;
  cstate_e state;

  fp_t mask [N_NODES];
  fp_t wt   [N_NODES];
  fp_t res  [N_NODES];

  fp_t ri, rq, energy, acc;
  // per-lane registers: lane 0 works on node k, lane 1 on node k-1
  fp_t t [2], u [2], xin [2], pw [2], base [2], den [2];
  logic [NW-1:0] k;
  logic [4:0] pbit;   // bit of MG_P being processed (MG_P < 2**31)
  logic [NW-1:0] kl [2];
  assign kl[0] = k;
  assign kl[1] = k - 1'b1;

  // arithmetic units, one set per lane, and their operand selection
  fp_t mul_a [2], mul_b [2], add_a [2], add_b [2], div_a [2], div_b [2];
  fp_t mul_r [2], add_r [2], div_r [2];
  fp_t sqrt_r;

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      mul_a[l] = t[l];   mul_b[l] = t[l];
      add_a[l] = t[l];   add_b[l] = u[l];
      div_a[l] = u[l];   div_b[l] = den[l];
      unique case (state)
        S_SQI:   begin mul_a[l] = ri;          mul_b[l] = ri;     end
        S_SQQ:   begin mul_a[l] = rq;          mul_b[l] = rq;     end
        S_MASK:  begin mul_a[l] = mask[kl[l]]; mul_b[l] = energy; end
        S_GAIN:  begin mul_a[l] = GAMMA;       mul_b[l] = t[l];   end
        S_FB:    begin mul_a[l] = ETA;         mul_b[l] = res[kl[l]]; end
        S_BX:    begin mul_a[l] = MG_B;        mul_b[l] = xin[l]; end
        S_PWM:   begin mul_a[l] = pw[l];       mul_b[l] = base[l]; end
        S_PWS:   begin mul_a[l] = base[l];     mul_b[l] = base[l]; end
        S_CPW:   begin mul_a[l] = MG_C;        mul_b[l] = pw[l];  end
        S_NUM:   begin mul_a[l] = MG_CC;       mul_b[l] = xin[l]; end
        S_W:     begin mul_a[l] = wt[kl[l]];   mul_b[l] = t[l];   end
        default: ;
      endcase
      unique case (state)
        S_DEN:   begin add_a[l] = MG_A; add_b[l] = t[l]; end
        default: ;
      endcase
      unique case (state)
        S_DIVI:  begin div_a[l] = ri; div_b[l] = MAXF; end
        S_DIVQ:  begin div_a[l] = rq; div_b[l] = MAXF; end
        default: ;
      endcase
    end
    // score accumulation in node order: (acc + term[k]) + term[k-1]
    if (state == S_ACC) begin
      add_a[0] = acc;
      add_b[0] = t[0];
    end
    for (int l = 0; l < 2; l++) begin
      mul_r[l] = fp_mul(mul_a[l], mul_b[l]);
      div_r[l] = fp_div(div_a[l], div_b[l]);
    end
    add_r[0] = fp_add(add_a[0], add_b[0]);
    if (state == S_ACC) begin
      add_a[1] = add_r[0];
      add_b[1] = t[1];
    end
    add_r[1] = fp_add(add_a[1], add_b[1]);
    sqrt_r   = fp_sqrt(t[0]);
  end

  assign in_ready = (state == S_IDLE);

  // mask and weight memories (load port only)
  always_ff @(posedge clk) begin
    if (cfg_we && state == S_IDLE) begin
      if (cfg_sel) wt[cfg_addr]   <= cfg_wdata;
      else         mask[cfg_addr] <= cfg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ri <= FP_ZERO; rq <= FP_ZERO; energy <= FP_ZERO; acc <= FP_ZERO;
      for (int l = 0; l < 2; l++) begin
        t[l] <= FP_ZERO; u[l] <= FP_ZERO; xin[l] <= FP_ZERO;
        pw[l] <= FP_ZERO; base[l] <= FP_ZERO; den[l] <= FP_ZERO;
      end
      k         <= '0;
      pbit      <= '0;
      out_valid <= 1'b0;
      out_data  <= FP_ZERO;
      for (int i = 0; i < N_NODES; i++) res[i] <= FP_ZERO;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          ri    <= fp_from_int16(i_data);
          rq    <= fp_from_int16(q_data);
          state <= S_DIVI;
        end
        S_DIVI: begin ri   <= div_r[0]; state <= S_DIVQ; end
        S_DIVQ: begin rq   <= div_r[0]; state <= S_SQI;  end
        S_SQI:  begin t[0] <= mul_r[0]; state <= S_SQQ;  end
        S_SQQ:  begin u[0] <= mul_r[0]; state <= S_ADDE; end
        S_ADDE: begin t[0] <= add_r[0]; state <= S_SQRT; end
        S_SQRT: begin
          energy <= sqrt_r;
          acc    <= FP_ZERO;
          k      <= NW'(N_NODES - 1);
          state  <= S_MASK;
        end
        S_MASK: begin t <= mul_r; state <= S_GAIN; end
        S_GAIN: begin t <= mul_r; state <= S_FB;   end
        S_FB:   begin u <= mul_r; state <= S_SUM;  end
        S_SUM:  begin xin <= add_r; state <= S_BX; end
        S_BX: begin
          base  <= mul_r;
          pw    <= '{FP_ONE, FP_ONE};
          pbit  <= '0;
          state <= MG_P[0] ? S_PWM : S_PWS;
        end
        // square-and-multiply over the bits of MG_P, LSB first: multiply for
        // a one bit, square to move to the next bit, stop after the top bit
        S_PWM: begin
          pw <= mul_r;
          if (32'(pbit) == PB - 1) state <= S_CPW;
          else                     state <= S_PWS;
        end
        S_PWS: begin
          base  <= mul_r;
          pbit  <= pbit + 1'b1;
          state <= MG_P[pbit + 1'b1] ? S_PWM : S_PWS;
        end
        S_CPW:  begin t   <= mul_r; state <= S_DEN; end
        S_DEN:  begin den <= add_r; state <= S_NUM; end
        S_NUM:  begin u   <= mul_r; state <= S_DIV; end
        S_DIV:  begin
          t           <= div_r;
          res[kl[0]]  <= div_r[0];
          res[kl[1]]  <= div_r[1];
          state       <= S_W;
        end
        S_W:    begin t <= mul_r; state <= S_ACC; end
        S_ACC: begin
          acc <= add_r[1];
          if (k == NW'(1)) begin
            out_valid <= 1'b1;
            out_data  <= add_r[1];
            state     <= S_IDLE;
          end else begin
            k     <= k - NW'(2);
            state <= S_MASK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
