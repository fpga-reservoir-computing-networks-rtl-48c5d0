// bladerf_dfr_top: the floating-point DFR core with its test sample memory,
// as added to the software radio's FPGA.
//
// The radio's own FPGA logic (soft processor, RF transceiver interface,
// receive FIFO, USB bridge) is not part of this design; it connects through
// two ports: a memory-mapped host bus and the receive sample stream tapped
// where 12-bit I/Q samples enter the receive FIFO.
//
// Host bus: word addresses, one-cycle read latency (host_rdata is valid the
// cycle after host_read). Address bits [SAMP_AW+1:SAMP_AW] select:
//   0 registers: 0 CTRL (W: bit0 start playback; RW: bit1 live mode),
//                1 STATUS (R: bit0 busy, bit1 done, sticky until next start),
//                2 NUM_SAMPLES (RW), 3 SCORES (R: scores since start),
//                4 DROPPED (R: live samples dropped while the core was busy)
//   1 sample memory, 2**SAMP_AW words {Q[15:0], I[15:0]}
//   2 result memory, 2**SAMP_AW scores (26-bit float in bits 25:0)
//   3 load port (write only): bit 6 selects weights (1) or mask (0),
//     bits 5:0 the node; data is the 26-bit float
// The default depth of 8192 holds the 6102-frame spectrum data set; the
// register map and bus are this design's choices.
module bladerf_dfr_top
  import dfr_fp_pkg::*;
#(
  parameter int unsigned SAMP_AW = 13,
  parameter int unsigned N_NODES = 50
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [SAMP_AW+1:0] host_addr,
  input  logic               host_write,
  input  logic [31:0]        host_wdata,
  input  logic               host_read,
  output logic [31:0]        host_rdata,
  // receive stream
  input  logic               rx_valid,
  input  logic [11:0]        rx_i,
  input  logic [11:0]        rx_q,
  // score stream
  output logic               score_valid,
  output fp_t                score
);
  localparam int unsigned NW = $clog2(N_NODES);

  logic [1:0]         sel, rd_sel;
  logic [SAMP_AW-1:0] off;
  assign sel = host_addr[SAMP_AW +: 2];
  assign off = host_addr[SAMP_AW-1:0];

  // registers
  logic             start, live, done_flag, busy, done;
  logic [SAMP_AW:0] num_samples;
  logic [31:0]      dropped, scores, reg_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= 1'b0;
      live        <= 1'b0;
      done_flag   <= 1'b0;
      num_samples <= '0;
      reg_rdata   <= '0;
      rd_sel      <= '0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (host_write && sel == 2'd0) begin
        unique case (off[2:0])
          3'd0: begin
            start <= host_wdata[0];
            live  <= host_wdata[1];
            if (host_wdata[0]) done_flag <= 1'b0;
          end
          3'd2: num_samples <= host_wdata[SAMP_AW:0];
          default: ;
        endcase
      end
      if (host_read) begin
        rd_sel <= sel;
        unique case (off[2:0])
          3'd0: reg_rdata <= {30'd0, live, 1'b0};
          3'd1: reg_rdata <= {30'd0, done_flag, busy};
          3'd2: reg_rdata <= 32'(num_samples);
          3'd3: reg_rdata <= scores;
          3'd4: reg_rdata <= dropped;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end

  // memories
  logic               s_en, r_we;
  logic [SAMP_AW-1:0] s_addr, r_addr;
  logic [31:0]        s_rdata, r_wdata, samp_a_rdata, res_a_rdata;

  dfr_dp_ram #(.WIDTH(32), .AW(SAMP_AW)) u_samp_mem (
    .clk,
    .a_en((host_write || host_read) && sel == 2'd1), .a_we(host_write), .a_addr(off),
    .a_wdata(host_wdata), .a_rdata(samp_a_rdata),
    .b_en(s_en), .b_we(1'b0), .b_addr(s_addr), .b_wdata(32'd0), .b_rdata(s_rdata)
  );

  dfr_dp_ram #(.WIDTH(32), .AW(SAMP_AW)) u_res_mem (
    .clk,
    .a_en((host_write || host_read) && sel == 2'd2), .a_we(host_write), .a_addr(off),
    .a_wdata(host_wdata), .a_rdata(res_a_rdata),
    .b_en(r_we), .b_we(r_we), .b_addr(r_addr), .b_wdata(r_wdata), .b_rdata()
  );

  always_comb begin
    unique case (rd_sel)
      2'd1:    host_rdata = samp_a_rdata;
      2'd2:    host_rdata = res_a_rdata;
      default: host_rdata = reg_rdata;
    endcase
  end

  // core and player
  logic               c_valid, c_ready, c_out_valid;
  logic signed [15:0] c_i, c_q;
  fp_t                c_out;

  hls_dfr_player #(.SAMP_AW(SAMP_AW)) u_player (
    .clk, .rst_n, .start, .live, .num_samples, .busy, .done, .dropped, .scores,
    .s_en, .s_addr, .s_rdata,
    .rx_valid, .rx_i, .rx_q,
    .c_valid, .c_ready, .c_i, .c_q, .c_out_valid, .c_out,
    .r_we, .r_addr, .r_wdata,
    .score_valid, .score
  );

  hls_dfr_core #(.N_NODES(N_NODES)) u_core (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .i_data(c_i), .q_data(c_q),
    .out_valid(c_out_valid), .out_data(c_out),
    .cfg_we(host_write && sel == 2'd3), .cfg_sel(off[6]), .cfg_addr(off[NW-1:0]),
    .cfg_wdata(host_wdata[FP_W-1:0])
  );

endmodule
