// tb_hls_dfr_player: self-checking test of the sample player. The testbench
// plays the sample memory (one-cycle read) and a stand-in core that is busy
// for 9 cycles and returns a score computed from its input (I*3 + Q, as an
// integer in the score bits). Checked: playback order and sample word layout
// (I low, Q high), one result per sample at consecutive addresses, done after
// the last score, zero-sample playback, live mode with 12-bit sign extension,
// samples dropped and counted while the core is busy, and the score stream.
module tb_hls_dfr_player;
  import dfr_fp_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, live = 0, busy, done, s_en, rx_valid = 0, c_valid, c_ready, c_out_valid;
  logic [AW:0] num_samples;
  logic [31:0] dropped, scores, s_rdata, r_wdata;
  logic [AW-1:0] s_addr, r_addr;
  logic [11:0] rx_i = 0, rx_q = 0;
  logic signed [15:0] c_i, c_q;
  fp_t c_out, score;
  logic r_we, score_valid;

  hls_dfr_player #(.SAMP_AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] smem [2**AW];
  always_ff @(posedge clk) if (s_en) s_rdata <= smem[s_addr];

  // stand-in core
  int busy_cnt = 0;
  int last_in;
  assign c_ready = (busy_cnt == 0);
  always_ff @(posedge clk) begin
    c_out_valid <= 1'b0;
    if (rst_n && c_valid && c_ready) begin
      busy_cnt <= 9;
      last_in  <= int'(c_i) * 3 + int'(c_q);
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) begin
        c_out_valid <= 1'b1;
        c_out       <= fp_t'(26'(last_in));
      end
    end
  end

  int exp_q[$];
  int nres, nstream;
  always_ff @(posedge clk) if (rst_n) begin
    if (r_we) begin
      if (exp_q.size() > 0) begin
        check(int'(r_addr) == nres % (2**AW), $sformatf("result address %0d", r_addr));
        check(r_wdata == {6'd0, 26'(exp_q[0])}, $sformatf("result %0d got %0h exp %0h", nres, r_wdata, 26'(exp_q[0])));
        void'(exp_q.pop_front());
      end else check(0, "unexpected result");
      nres <= nres + 1;
    end
    if (score_valid) nstream <= nstream + 1;
  end

  initial begin
    num_samples = 0;
    for (int i = 0; i < 2**AW; i++) smem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nres = 0; nstream = 0;
    for (int i = 0; i < 20; i++)
      exp_q.push_back(int'($signed(smem[i][15:0])) * 3 + int'($signed(smem[i][31:16])));
    num_samples = 20;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(nres == 20 && exp_q.size() == 0 && scores == 20 && nstream == 20, "playback count");
    check(!busy, "idle after playback");
    num_samples = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    #1 check(done, "zero-sample playback finishes at once");
    // live mode: a new sample every 4 cycles, the core takes 11
    live = 1; nres = 0;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      rx_valid = 1; rx_i = 12'($urandom); rx_q = 12'($urandom);
      #1;
      if (c_ready) exp_q.push_back(int'($signed(rx_i)) * 3 + int'($signed(rx_q)));
      @(negedge clk); rx_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all accepted live samples scored");
    check(nres > 0 && dropped == 32'(30 - nres), $sformatf("dropped %0d, scored %0d", dropped, nres));
    check(dropped > 0, "no sample was dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
