// tb_dfr_system_top: end-to-end test of both DFR designs in the top level,
// every parameter at its default (100-node accelerator with full memories,
// 50-node float core with 8192-word memories).
//
// The two designs run at the same time on their own clocks (10 MHz for the
// accelerator, 100 MHz for the radio design).
//  - Accelerator: the testbench is the host over AXI4-Lite and closes the
//    analog loop with the DAC, Mackey-Glass and ADC models. One run of
//    1 init + 2 test samples with eta = 0.0625 and some inputs large enough
//    to clip the DAC sum, a start written while busy, then a run without
//    test samples. Predictions and the cycle register are compared with a
//    software model (samples * N * (39 + 22) + N*test + 6 cycles).
//  - Radio design: mask and weights loaded, 4 stored I/Q samples played and
//    their scores compared with a double-precision model, then live mode
//    with receive samples arriving faster than the core takes them.
// Mechanisms counted, each required at least once: initialization,
// emulation and evaluation phases, DAC saturation, ignored busy start,
// host clear of done, run without evaluation, playback from memory, live
// mode switch, dropped live sample, score stream.
module tb_dfr_system_top;
  import dfr_pkg::*;
  import dfr_fp_pkg::*;
  import dfr_tb_pkg::*;
  import dfr_fp_tb_pkg::*;
  import hls_ref_pkg::*;

  localparam int N = 100, ALAT = 22, BN = 50;

  logic z_clk = 0, z_rst_n = 0, b_clk = 0, b_rst_n = 0;
  always #50 z_clk = ~z_clk;
  always #5  b_clk = ~b_clk;

  logic [AXI_AW-1:0] z_axil_awaddr, z_axil_araddr;
  logic z_axil_awvalid, z_axil_awready, z_axil_wvalid, z_axil_wready;
  logic [31:0] z_axil_wdata, z_axil_rdata;
  logic [3:0] z_axil_wstrb;
  logic [1:0] z_axil_bresp, z_axil_rresp;
  logic z_axil_bvalid, z_axil_bready, z_axil_arvalid, z_axil_arready, z_axil_rvalid, z_axil_rready;
  logic z_dac_cs_n, z_dac_sclk, z_dac_sdi, z_adc_convst, z_adc_eoc, z_irq_done;
  logic [11:0] z_adc_data;
  logic [14:0] b_host_addr;
  logic b_host_write = 0, b_host_read = 0, b_rx_valid = 0, b_score_valid;
  logic [31:0] b_host_wdata, b_host_rdata;
  logic [11:0] b_rx_i = 0, b_rx_q = 0;
  fp_t b_score;

  dfr_system_top dut (.*);

  real v_dac, v_mg;
  logic [15:0] dac_word;
  int dac_words;
  tb_dac_model u_dac (.cs_n(z_dac_cs_n), .sclk(z_dac_sclk), .sdi(z_dac_sdi), .vout(v_dac), .code(dac_word), .words(dac_words));
  mg_asic_model u_mg (.vin(v_dac), .vout(v_mg));
  tb_xadc_model #(.CONV_CYCLES(ALAT)) u_adc (.clk(z_clk), .convst(z_adc_convst), .vin(v_mg), .eoc(z_adc_eoc), .data(z_adc_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- accelerator host ----------------
  task automatic axi_write(input region_e r, input int w, input logic [31:0] d);
    @(negedge z_clk);
    z_axil_awaddr = {r, OFFS_W'(w), 2'b00}; z_axil_awvalid = 1;
    z_axil_wdata = d; z_axil_wstrb = 4'hF; z_axil_wvalid = 1; z_axil_bready = 1;
    #1;
    while (!(z_axil_awready && z_axil_wready)) begin @(negedge z_clk); #1; end
    @(negedge z_clk);
    z_axil_awvalid = 0; z_axil_wvalid = 0;
    while (!z_axil_bvalid) @(negedge z_clk);
    @(negedge z_clk); z_axil_bready = 0;
  endtask

  task automatic axi_read(input region_e r, input int w, output logic [31:0] d);
    @(negedge z_clk);
    z_axil_araddr = {r, OFFS_W'(w), 2'b00}; z_axil_arvalid = 1; z_axil_rready = 1;
    #1;
    while (!z_axil_arready) begin @(negedge z_clk); #1; end
    @(negedge z_clk); z_axil_arvalid = 0;
    while (!z_axil_rvalid) @(negedge z_clk);
    d = z_axil_rdata;
    @(negedge z_clk); z_axil_rready = 0;
  endtask

  int n_init, n_emul, n_eval, n_sat, n_busy_start, n_clear, n_noeval;
  int n_play, n_live, n_drop, n_stream;
  always_ff @(posedge z_clk) if (z_rst_n) begin
    if (dut.u_accel.run_state == ST_INIT) n_init <= n_init + 1;
    if (dut.u_accel.run_state == ST_EMUL) n_emul <= n_emul + 1;
    if (dut.u_accel.run_state == ST_EVAL) n_eval <= n_eval + 1;
    if (dut.u_accel.dac_start && dut.u_accel.dac_code == 16'hFFFF) n_sat <= n_sat + 1;
  end
  always_ff @(posedge b_clk) if (b_rst_n && b_score_valid) n_stream <= n_stream + 1;

  logic [15:0] inp [];
  logic [15:0] wts [N];
  int          exp_nodes [];
  longint      exp_out [];

  task automatic reference(input int ni, input int nt, input int e);
    int node[N];
    int code, k;
    exp_nodes = new[nt * N];
    exp_out   = new[nt];
    for (int i = 0; i < N; i++) node[i] = 0;
    k = 0;
    for (int s = 0; s < ni + nt; s++)
      for (int i = 0; i < N; i++) begin
        code = int'(res_sum(32'(inp[k]), 32'(node[N-1]), 32'(e)));
        for (int j = N - 1; j > 0; j--) node[j] = node[j-1];
        node[0] = int'(loop_adc(32'(code))) << 4;
        if (s >= ni) exp_nodes[(s - ni) * N + i] = node[0];
        k++;
      end
    for (int s = 0; s < nt; s++) begin
      longint acc = 0;
      for (int i = 0; i < N; i++) acc += longint'($signed(wts[i])) * longint'(exp_nodes[s*N + i]);
      exp_out[s] = acc >>> 16;
    end
  endtask

  task automatic accel_run(input int ni, input int nt, input int e);
    logic [31:0] d;
    int polls, exp_cycles;
    inp = new[(ni + nt) * N];
    for (int i = 0; i < (ni + nt) * N; i++)
      inp[i] = ($urandom_range(0, 7) == 0) ? 16'($urandom_range(60000, 65535)) : 16'($urandom_range(0, 30000));
    for (int i = 0; i < N; i++) wts[i] = 16'($urandom);
    for (int i = 0; i < (ni + nt) * N; i++) axi_write(RGN_INPUT, i, {16'd0, inp[i]});
    for (int i = 0; i < N; i++) axi_write(RGN_WEIGHT, i, {16'd0, wts[i]});
    axi_write(RGN_REGS, REG_NUM_INIT, ni);
    axi_write(RGN_REGS, REG_NUM_TEST, nt);
    axi_write(RGN_REGS, REG_ETA, e);
    reference(ni, nt, e);
    axi_write(RGN_REGS, REG_CTRL, 1);
    axi_write(RGN_REGS, REG_CTRL, 1);   // ignored while busy
    n_busy_start++;
    polls = 0;
    do begin
      repeat (200) @(negedge z_clk);
      axi_read(RGN_REGS, REG_STATUS, d);
      polls++;
    end while (!d[1] && polls < 10000);
    check(d[1] && !d[0] && d[4:2] == ST_DONE && z_irq_done, "accelerator done");
    axi_read(RGN_REGS, REG_CYCLES, d);
    exp_cycles = (ni + nt) * N * (39 + ALAT) + ((nt > 0) ? N * nt + 6 : 4);
    check(int'(d) == exp_cycles, $sformatf("cycles %0d exp %0d", d, exp_cycles));
    for (int s = 0; s < nt; s++) begin
      axi_read(RGN_OUTPUT, s, d);
      check($signed(d) == 32'(exp_out[s]), $sformatf("y[%0d] got %0d exp %0d", s, $signed(d), exp_out[s]));
    end
    for (int i = 0; i < nt * N; i += 11) begin
      axi_read(RGN_RESERV, i, d);
      check(int'(d) == exp_nodes[i], $sformatf("node %0d", i));
    end
    axi_write(RGN_REGS, REG_CTRL, 2);
    axi_read(RGN_REGS, REG_STATUS, d);
    check(!d[1] && !z_irq_done, "done cleared");
    n_clear++;
    if (nt == 0) n_noeval++;
  endtask

  // ---------------- radio-design host ----------------
  task automatic hw(input int sel, input int off, input logic [31:0] d);
    @(negedge b_clk); b_host_addr = {2'(sel), 13'(off)}; b_host_wdata = d; b_host_write = 1;
    @(negedge b_clk); b_host_write = 0;
  endtask
  task automatic hr(input int sel, input int off, output logic [31:0] d);
    @(negedge b_clk); b_host_addr = {2'(sel), 13'(off)}; b_host_read = 1;
    @(negedge b_clk); b_host_read = 0; d = b_host_rdata;
  endtask

  hls_dfr_ref mdl;
  int acc_i[$], acc_q[$];
  bit live_chk = 0;
  always @(posedge b_clk) if (live_chk) begin
    if (dut.u_radio.u_core.in_valid && dut.u_radio.u_core.in_ready) begin
      acc_i.push_back(int'(dut.u_radio.u_core.i_data));
      acc_q.push_back(int'(dut.u_radio.u_core.q_data));
    end
    if (dut.u_radio.u_core.out_valid) begin
      real e;
      e = mdl.step(acc_i.pop_front(), acc_q.pop_front());
      check(mdl.close(fp_to_real(dut.u_radio.u_core.out_data), e), "live score");
    end
  end

  task automatic radio_run();
    logic [31:0] d, sc;
    int si[4], sq[4], polls, sent;
    longint t0, t1;
    mdl = new(BN);
    mdl.randomize_params();
    for (int k = 0; k < BN; k++) begin
      hw(3, k, {6'd0, real_to_fp(mdl.mask[k])});
      hw(3, 64 + k, {6'd0, real_to_fp(mdl.w[k])});
    end
    for (int s = 0; s < 4; s++) begin
      si[s] = $urandom_range(0, 4095) - 2048;
      sq[s] = $urandom_range(0, 4095) - 2048;
      hw(1, s, {16'(sq[s]), 16'(si[s])});
    end
    hw(0, 2, 4);
    t0 = $time;
    hw(0, 0, 1);
    polls = 0;
    do begin repeat (50) @(negedge b_clk); hr(0, 1, d); polls++; end
    while (!d[1] && polls < 1000);
    t1 = $time;
    check(d[1], "playback done");
    // 4 samples at 409 cycles each, plus polling granularity
    check((t1 - t0) / 10 >= 4 * 409 && (t1 - t0) / 10 <= 4 * 409 + 60,
          $sformatf("playback took %0d cycles", (t1 - t0) / 10));
    for (int s = 0; s < 4; s++) begin
      real e;
      e = mdl.step(si[s], sq[s]);
      hr(2, s, d);
      check(mdl.close(fp_to_real(fp_t'(d[25:0])), e), $sformatf("stored score %0d", s));
    end
    n_play++;
    hw(0, 0, 2);
    n_live++;
    live_chk = 1;
    sent = 0;
    for (int k = 0; k < 8; k++) begin
      @(negedge b_clk); b_rx_valid = 1; b_rx_i = 12'($urandom); b_rx_q = 12'($urandom); sent++;
      @(negedge b_clk); b_rx_valid = 0;
      repeat (300) @(negedge b_clk);
    end
    repeat (1200) @(negedge b_clk);
    hr(0, 4, d);
    hr(0, 3, sc);
    n_drop = int'(d);
    check(d + (sc - 4) == 32'(sent), $sformatf("live: %0d dropped, %0d scored, %0d sent", d, sc - 4, sent));
    check(acc_i.size() == 0, "every accepted live sample scored");
  endtask

  initial begin
    z_axil_awvalid = 0; z_axil_wvalid = 0; z_axil_arvalid = 0; z_axil_bready = 0; z_axil_rready = 0;
    z_axil_awaddr = 0; z_axil_araddr = 0; z_axil_wdata = 0; z_axil_wstrb = 0;
    b_host_addr = 0; b_host_wdata = 0;
    n_init = 0; n_emul = 0; n_eval = 0; n_sat = 0; n_busy_start = 0; n_clear = 0; n_noeval = 0;
    n_play = 0; n_live = 0; n_drop = 0; n_stream = 0;
    repeat (3) @(negedge z_clk);
    z_rst_n = 1; b_rst_n = 1;
    fork
      begin accel_run(1, 2, 16'h0800); accel_run(1, 0, 16'h0800); end
      radio_run();
    join
    check(n_init > 0, "initialization phase never seen");
    check(n_emul > 0, "emulation phase never seen");
    check(n_eval > 0, "evaluation phase never seen");
    check(n_sat > 0, "DAC saturation never happened");
    check(n_busy_start > 0, "busy start never issued");
    check(n_clear > 0, "done never cleared");
    check(n_noeval > 0, "run without evaluation never happened");
    check(n_play > 0, "playback never happened");
    check(n_live > 0, "live mode never entered");
    check(n_drop > 0, "no live sample dropped");
    check(n_stream > 4, "score stream");
    $display("mechanisms: init %0d cycles, emul %0d, eval %0d, saturations %0d, busy starts %0d, clears %0d, runs without evaluation %0d, playbacks %0d, live switches %0d, drops %0d, streamed scores %0d",
             n_init, n_emul, n_eval, n_sat, n_busy_start, n_clear, n_noeval, n_play, n_live, n_drop, n_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge z_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
