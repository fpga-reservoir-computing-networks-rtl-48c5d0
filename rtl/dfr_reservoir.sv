// dfr_reservoir: the reservoir layer of the hybrid DFR accelerator.
//
// One nonlinear node (off chip, analog) and a chain of N_NODES virtual nodes
// (on chip, a shift register). For every subsample k of the masked input
// stream J the block computes
//     dac_code = sat16( J[k] + ((x[k-N] * eta) >> 15) )
// where x[k-N] is the value in the last virtual node, sends dac_code to the
// external DAC, waits `settle` cycles for the analog Mackey-Glass circuit,
// starts an ADC conversion and shifts the 12-bit ADC result into the first
// virtual node. After N subsamples the chain holds the reservoir state of one
// input sample (Eq. 2.1 with input gain 1 applied in software, and delay
// tau = N, i.e. node separation 1).
//
// The first `num_init` samples only warm the reservoir up. For the next
// `num_test` samples every new node value is also written to the reservoir
// memory, sample s and node i at address s*N_NODES + i, where the matrix
// multiplication block later reads it.
//
// Follows the reference design: 16-bit masked inputs read from the input
// memory, the sum of input and scaled last node sent to a 16-bit DAC, 12-bit
// ADC result stored in the first node, init and emulation phases. This
// design's own choices: eta as an unsigned Q1.15 multiplier, saturation of the
// sum at 16 bits, ADC result stored MSB-aligned in 16 bits (as the Xilinx ADC
// reports it), the chain cleared at each start, the settle wait.
//
// Interface: pulse `start` with num_init/num_test/eta/settle stable; `busy`
// until `done` pulses. `emul` is high during the emulation phase. Input
// memory read latency is one cycle. Timing per subsample: 2 cycles read and
// sum, the DAC transfer (dac_start to dac_done), settle+1 cycles, then
// adc_convst to adc_eoc, then one cycle for the shift.
module dfr_reservoir
  import dfr_pkg::*;
#(
  parameter int unsigned N_NODES = 100,
  parameter int unsigned IN_AW   = 17,
  parameter int unsigned RES_AW  = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       num_init,
  input  logic [15:0]       num_test,
  input  logic [15:0]       eta,
  input  logic [15:0]       settle,
  output logic              busy,
  output logic              done,
  output logic              emul,
  // input memory (read only, 1-cycle latency)
  output logic              in_en,
  output logic [IN_AW-1:0]  in_addr,
  input  logic [15:0]       in_rdata,
  // reservoir memory (write only)
  output logic              res_we,
  output logic [RES_AW-1:0] res_addr,
  output logic [15:0]       res_wdata,
  // DAC transmitter
  output logic              dac_start,
  output logic [15:0]       dac_code,
  input  logic              dac_done,
  // ADC handshake
  output logic              adc_convst,
  input  logic              adc_eoc,
  input  logic [11:0]       adc_data,
  // monitors
  output logic [11:0]       last_adc,
  output logic              sat_evt
);
  typedef enum logic [2:0] {R_IDLE, R_READ, R_SUM, R_DACW, R_SETTLE, R_ADCW} rstate_e;
  rstate_e state;

  localparam int unsigned NW = $clog2(N_NODES);

  logic [15:0]       node [N_NODES];
  logic [NW-1:0]     sub;        // subsample index within the sample
  logic [15:0]       sample;     // sample index
  logic [15:0]       total;      // num_init + num_test
  logic [15:0]       n_init;
  logic [15:0]       eta_r;
  logic [15:0]       settle_cnt;
  logic [IN_AW-1:0]  in_ptr;
  logic [RES_AW-1:0] res_ptr;

  // feedback and saturating sum
  logic [31:0] fb_prod;
  logic [16:0] fb;
  logic [17:0] sum;
  always_comb begin
    fb_prod = node[N_NODES-1] * eta_r;
    fb      = fb_prod[ETA_FRAC +: 17];
    sum     = {2'b00, in_rdata} + {1'b0, fb};
  end

  assign busy    = (state != R_IDLE);
  assign emul    = busy && (sample >= n_init);
  assign in_en   = (state == R_READ);
  assign in_addr = in_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      sub        <= '0;
      sample     <= '0;
      total      <= '0;
      n_init     <= '0;
      eta_r      <= '0;
      settle_cnt <= '0;
      in_ptr     <= '0;
      res_ptr    <= '0;
      res_we     <= 1'b0;
      res_addr   <= '0;
      res_wdata  <= '0;
      dac_start  <= 1'b0;
      dac_code   <= '0;
      adc_convst <= 1'b0;
      done       <= 1'b0;
      last_adc   <= '0;
      sat_evt    <= 1'b0;
      for (int i = 0; i < N_NODES; i++) node[i] <= '0;
    end else begin
      done       <= 1'b0;
      res_we     <= 1'b0;
      dac_start  <= 1'b0;
      adc_convst <= 1'b0;
      sat_evt    <= 1'b0;
      unique case (state)
        R_IDLE: if (start) begin
          sub     <= '0;
          sample  <= '0;
          total   <= num_init + num_test;
          n_init  <= num_init;
          eta_r   <= eta;
          in_ptr  <= '0;
          res_ptr <= '0;
          for (int i = 0; i < N_NODES; i++) node[i] <= '0;
          if (num_init + num_test == 16'd0) done <= 1'b1;
          else                              state <= R_READ;
        end
        R_READ: state <= R_SUM;
        R_SUM: begin
          dac_code  <= sum[17:16] != 2'b00 ? 16'hFFFF : sum[15:0];
          sat_evt   <= sum[17:16] != 2'b00;
          dac_start <= 1'b1;
          state     <= R_DACW;
        end
        R_DACW: if (dac_done) begin
          settle_cnt <= '0;
          state      <= R_SETTLE;
        end
        R_SETTLE: if (settle_cnt >= settle) begin
          adc_convst <= 1'b1;
          state      <= R_ADCW;
        end else begin
          settle_cnt <= settle_cnt + 1'b1;
        end
        R_ADCW: if (adc_eoc) begin
          node[0] <= {adc_data, 4'b0000};
          for (int i = 1; i < N_NODES; i++) node[i] <= node[i-1];
          last_adc <= adc_data;
          if (sample >= n_init) begin
            res_we    <= 1'b1;
            res_addr  <= res_ptr;
            res_wdata <= {adc_data, 4'b0000};
            res_ptr   <= res_ptr + 1'b1;
          end
          in_ptr <= in_ptr + 1'b1;
          if (sub == NW'(N_NODES - 1)) begin
            sub <= '0;
            if (sample == total - 1'b1) begin
              state <= R_IDLE;
              done  <= 1'b1;
            end else begin
              sample <= sample + 1'b1;
              state  <= R_READ;
            end
          end else begin
            sub   <= sub + 1'b1;
            state <= R_READ;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
