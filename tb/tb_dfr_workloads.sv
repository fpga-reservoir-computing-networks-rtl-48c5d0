// tb_dfr_workloads: the two evaluated workloads at the largest size one run
// of each design holds, every parameter at its default.
//
//  - NARMA10 on the hybrid accelerator: the input series u(k), uniform in
//    [0, 0.5], and the target y(k+1) = 0.3 y(k) + 0.05 y(k) sum_{i=0..9}
//    y(k-i) + 1.5 u(k-9) u(k) + 0.1 are generated here. Each sample is masked
//    with 100 random 16-bit mask values (J = u * M). One run of 100
//    initialization + 1210 test samples fills the 131072-word input and node
//    memories; eta = 0.5 as for this benchmark. All 1210 predictions and
//    every 97th node value are compared bit-exactly with the software model,
//    and the cycle register against 1310 * 6100 + 1210 * 100 + 6.
//    The weights are random: training is done offline, so the check is of
//    the arithmetic, not of the benchmark's error figure.
//  - Spectrum sensing on the float core: 6102 I/Q frames (the size of the
//    20 + 980 + 5082-sample data set), half carrying a QPSK-like symbol of
//    random phase plus noise, half noise only, as signed 12-bit values in
//    the receive-FIFO word layout. They are played from the sample memory;
//    every score is compared with the double-precision model, and the
//    playback time against 6102 * 409 cycles.
module tb_dfr_workloads;
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

  int n_init, n_emul, n_eval, n_sat, n_clear, n_noeval;
  int n_play, n_stream;
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
    begin
      real u [$], y [$], mk [N];
      foreach (mk[i]) mk[i] = real'($urandom_range(0, 65535));
      for (int k = 0; k < ni + nt; k++) begin
        real yn, s10;
        u.push_back(real'($urandom_range(0, 1 << 20)) / real'(1 << 21));
        s10 = 0.0;
        for (int j = 0; j < 10 && j < y.size(); j++) s10 += y[y.size() - 1 - j];
        yn = (y.size() == 0) ? 0.1 : 0.3 * y[$] + 0.05 * y[$] * s10 +
             ((k >= 9) ? 1.5 * u[k - 9] * u[k] : 0.0) + 0.1;
        y.push_back(yn);
        for (int i = 0; i < N; i++) inp[k * N + i] = 16'(int'(u[k] * mk[i]));
      end
      $display("NARMA10 series: %0d samples, last target %f", y.size(), y[$]);
    end
    for (int i = 0; i < N; i++) wts[i] = 16'($urandom);
    for (int i = 0; i < (ni + nt) * N; i++) axi_write(RGN_INPUT, i, {16'd0, inp[i]});
    for (int i = 0; i < N; i++) axi_write(RGN_WEIGHT, i, {16'd0, wts[i]});
    axi_write(RGN_REGS, REG_NUM_INIT, ni);
    axi_write(RGN_REGS, REG_NUM_TEST, nt);
    axi_write(RGN_REGS, REG_ETA, e);
    reference(ni, nt, e);
    axi_write(RGN_REGS, REG_CTRL, 1);
    polls = 0;
    do begin
      repeat (200) @(negedge z_clk);
      axi_read(RGN_REGS, REG_STATUS, d);
      polls++;
    end while (!d[1] && polls < 100000);
    check(d[1] && !d[0] && d[4:2] == ST_DONE && z_irq_done, "accelerator done");
    axi_read(RGN_REGS, REG_CYCLES, d);
    exp_cycles = (ni + nt) * N * (39 + ALAT) + ((nt > 0) ? N * nt + 6 : 4);
    check(int'(d) == exp_cycles, $sformatf("cycles %0d exp %0d", d, exp_cycles));
    for (int s = 0; s < nt; s++) begin
      axi_read(RGN_OUTPUT, s, d);
      check($signed(d) == 32'(exp_out[s]), $sformatf("y[%0d] got %0d exp %0d", s, $signed(d), exp_out[s]));
    end
    for (int i = 0; i < nt * N; i += 97) begin
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

  localparam int NF = 6102;
  task automatic radio_run();
    logic [31:0] d;
    int si[NF], sq[NF], polls, bad;
    longint t0, t1;
    mdl = new(BN);
    mdl.randomize_params();
    for (int k = 0; k < BN; k++) begin
      hw(3, k, {6'd0, real_to_fp(mdl.mask[k])});
      hw(3, 64 + k, {6'd0, real_to_fp(mdl.w[k])});
    end
    for (int s = 0; s < NF; s++) begin
      int amp, ni, nq;
      amp = (s % 2 == 0) ? 900 : 0;                   // occupied / free frame
      ni = $urandom_range(0, 400) - 200;
      nq = $urandom_range(0, 400) - 200;
      si[s] = (($urandom_range(0, 1) == 1) ? amp : -amp) + ni;
      sq[s] = (($urandom_range(0, 1) == 1) ? amp : -amp) + nq;
      hw(1, s, {16'(sq[s]), 16'(si[s])});
    end
    hw(0, 2, NF);
    t0 = $time;
    hw(0, 0, 1);
    polls = 0;
    do begin repeat (1000) @(negedge b_clk); hr(0, 1, d); polls++; end
    while (!d[1] && polls < 20000);
    t1 = $time;
    check(d[1], "playback done");
    check((t1 - t0) / 10 >= NF * 409 && (t1 - t0) / 10 <= NF * 409 + 1010,
          $sformatf("playback took %0d cycles", (t1 - t0) / 10));
    bad = 0;
    for (int s = 0; s < NF; s++) begin
      real e;
      e = mdl.step(si[s], sq[s]);
      hr(2, s, d);
      if (!mdl.close(fp_to_real(fp_t'(d[25:0])), e)) begin
        bad++;
        if (bad < 5) $display("FAIL: score %0d got %g exp %g", s, fp_to_real(fp_t'(d[25:0])), e);
      end
    end
    check(bad == 0, $sformatf("%0d of %0d scores differ from the model", bad, NF));
    hr(0, 3, d);
    check(d == NF, "score count");
    n_play++;
  endtask

  initial begin
    z_axil_awvalid = 0; z_axil_wvalid = 0; z_axil_arvalid = 0; z_axil_bready = 0; z_axil_rready = 0;
    z_axil_awaddr = 0; z_axil_araddr = 0; z_axil_wdata = 0; z_axil_wstrb = 0;
    b_host_addr = 0; b_host_wdata = 0;
    n_init = 0; n_emul = 0; n_eval = 0; n_sat = 0; n_clear = 0; n_noeval = 0;
    n_play = 0; n_stream = 0;
    repeat (3) @(negedge z_clk);
    z_rst_n = 1; b_rst_n = 1;
    fork
      accel_run(100, 1210, 16'h4000);
      radio_run();
    join
    check(n_init > 0 && n_emul > 0 && n_eval > 0, "all three phases");
    check(n_play > 0 && n_stream == NF, "score stream");
    $display("workloads: NARMA10 run %0d cycles in init, %0d in emulation, %0d in evaluation; %0d spectrum scores streamed",
             n_init, n_emul, n_eval, n_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12000000) @(posedge z_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
