// tb_bladerf_dfr_top: end-to-end test of the software-radio DFR at its
// default size (8192-word sample and result memories, 50 nodes).
//
// Over the host bus the testbench loads mask and weights, writes 8 I/Q
// sample words (12-bit values sign-extended to 16, I low, Q high), sets the
// sample count, starts playback, polls the status register and reads back
// the scores, comparing each with a double-precision model. Then it turns on
// live mode and streams receive samples faster than the core can take them;
// the scores of accepted samples are checked against the model, and dropped
// plus scored samples must add up to the number sent. Also checked: register
// read-back, sample memory read-back and the score stream.
module tb_bladerf_dfr_top;
  import dfr_fp_pkg::*;
  import dfr_fp_tb_pkg::*;
  import hls_ref_pkg::*;

  localparam int AW = 13, N = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW+1:0] host_addr;
  logic host_write = 0, host_read = 0, rx_valid = 0, score_valid;
  logic [31:0] host_wdata, host_rdata;
  logic [11:0] rx_i = 0, rx_q = 0;
  fp_t score;

  bladerf_dfr_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic hw(input int sel, input int off, input logic [31:0] d);
    @(negedge clk); host_addr = {2'(sel), 13'(off)}; host_wdata = d; host_write = 1;
    @(negedge clk); host_write = 0;
  endtask
  task automatic hr(input int sel, input int off, output logic [31:0] d);
    @(negedge clk); host_addr = {2'(sel), 13'(off)}; host_read = 1;
    @(negedge clk); host_read = 0; d = host_rdata;
  endtask

  hls_dfr_ref mdl;
  int si [8], sq [8];
  int n_stream;
  always_ff @(posedge clk) if (rst_n && score_valid) n_stream <= n_stream + 1;

  // cycle count: core latency is 6 + (N/2)*(11 + 4 + 1) = 406 cycles per sample
  // plus 3 cycles of player overhead (memory read, feed, result write)
  longint cyc = 0, last_sv = -1, min_gap = 1 << 30, max_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && score_valid && !live_chk) begin
      if (last_sv >= 0) begin
        if (cyc - last_sv < min_gap) min_gap = cyc - last_sv;
        if (cyc - last_sv > max_gap) max_gap = cyc - last_sv;
      end
      last_sv = cyc;
    end
  end

  // live-mode checking: accepted inputs are modelled in order
  int acc_i[$], acc_q[$];
  bit live_chk = 0;
  always @(posedge clk) if (live_chk) begin
    if (dut.u_core.in_valid && dut.u_core.in_ready) begin
      acc_i.push_back(int'(dut.u_core.i_data));
      acc_q.push_back(int'(dut.u_core.q_data));
    end
    if (dut.u_core.out_valid) begin
      real e;
      e = mdl.step(acc_i.pop_front(), acc_q.pop_front());
      check(mdl.close(fp_to_real(dut.u_core.out_data), e), "live score");
    end
  end

  logic [31:0] d;
  int sent, polls;
  initial begin
    n_stream = 0;
    mdl = new(N);
    mdl.randomize_params();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      hw(3, k, {6'd0, real_to_fp(mdl.mask[k])});
      hw(3, 64 + k, {6'd0, real_to_fp(mdl.w[k])});
    end
    for (int s = 0; s < 8; s++) begin
      si[s] = $urandom_range(0, 4095) - 2048;
      sq[s] = $urandom_range(0, 4095) - 2048;
      hw(1, s, {16'(sq[s]), 16'(si[s])});
    end
    hr(1, 5, d); check(d == {16'(sq[5]), 16'(si[5])}, "sample memory read-back");
    hw(0, 2, 8);
    hr(0, 2, d); check(d == 8, "num_samples read-back");
    hw(0, 0, 1);
    polls = 0;
    do begin repeat (100) @(negedge clk); hr(0, 1, d); polls++; end
    while (!d[1] && polls < 1000);
    check(d[1] && !d[0], "playback done");
    hr(0, 3, d); check(d == 8, "score count");
    for (int s = 0; s < 8; s++) begin
      real e;
      e = mdl.step(si[s], sq[s]);
      hr(2, s, d);
      check(mdl.close(fp_to_real(fp_t'(d[25:0])), e),
            $sformatf("score %0d got %g exp %g", s, fp_to_real(fp_t'(d[25:0])), e));
    end
    check(n_stream == 8, "score stream during playback");
    $display("playback score interval %0d..%0d cycles", min_gap, max_gap);
    check(min_gap == max_gap && min_gap == 409, "per-sample cycle count");
    // live mode
    hw(0, 0, 2);
    live_chk = 1;
    sent = 0;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk); rx_valid = 1; rx_i = 12'($urandom); rx_q = 12'($urandom); sent++;
      @(negedge clk); rx_valid = 0;
      repeat (400) @(negedge clk);
    end
    repeat (1200) @(negedge clk);
    hr(0, 4, d);
    begin
      logic [31:0] sc;
      hr(0, 3, sc);
      check(d + (sc - 8) == 32'(sent) && d > 0 && sc > 8,
            $sformatf("live: %0d dropped, %0d scored, %0d sent", d, sc - 8, sent));
    end
    check(acc_i.size() == 0, "every accepted live sample scored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
