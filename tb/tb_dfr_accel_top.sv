// tb_dfr_accel_top: end-to-end test of the hybrid DFR accelerator at its
// default size (100 virtual nodes, full memories).
//
// The testbench acts as the host processor over AXI4-Lite and closes the
// analog loop with behavioural models: serial DAC (2.5 V), Mackey-Glass chip
// model, and the FPGA ADC (1 V, 22-cycle conversion). Each run loads masked
// inputs and output weights, sets the sample counts and feedback scale,
// starts, polls the status register and reads back predictions and recorded
// node values, which are compared with a software DFR (reference analog
// arithmetic, Q1.15 feedback, 16-bit saturation, 48-bit dot product >> 16).
//
// Runs: (1) 2 init + 3 test samples, eta = 0.0625 (the spectrum-sensing
// setting), inputs that drive the DAC sum into saturation; (2) 1 init + 2
// test samples, eta = 0.5 (the NARMA10 setting), settle time 2; (3) a run
// with no test samples. Mechanisms counted and required at least once:
// initialization phase, emulation phase, evaluation phase, DAC saturation,
// a start written while busy (ignored), done cleared by the host, a run
// that skips evaluation. Also checked: the cycle register against
// samples * N * (39 + settle + 22) + N*test + 6, which at 10 MHz gives about
// 1640 samples per second.
module tb_dfr_accel_top;
  import dfr_pkg::*;
  import dfr_tb_pkg::*;

  localparam int N    = 100;
  localparam int ALAT = 22;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;   // 10 MHz

  logic [AXI_AW-1:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic dac_cs_n, dac_sclk, dac_sdi, adc_convst, adc_eoc, irq_done;
  logic [11:0] adc_data;

  dfr_accel_top dut (.*);

  real v_dac, v_mg;
  logic [15:0] dac_word;
  int dac_words;
  tb_dac_model u_dac (.cs_n(dac_cs_n), .sclk(dac_sclk), .sdi(dac_sdi), .vout(v_dac), .code(dac_word), .words(dac_words));
  mg_asic_model u_mg (.vin(v_dac), .vout(v_mg));
  tb_xadc_model #(.CONV_CYCLES(ALAT)) u_adc (.clk, .convst(adc_convst), .vin(v_mg), .eoc(adc_eoc), .data(adc_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- AXI host ----------------
  function automatic logic [AXI_AW-1:0] byte_addr(input region_e r, input int w);
    return {r, OFFS_W'(w), 2'b00};
  endfunction

  task automatic axi_write(input region_e r, input int w, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = byte_addr(r, w); s_axil_awvalid = 1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1; s_axil_bready = 1;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic axi_read(input region_e r, input int w, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = byte_addr(r, w); s_axil_arvalid = 1; s_axil_rready = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
    @(negedge clk); s_axil_rready = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_init_cyc, n_emul_cyc, n_eval_cyc, n_sat, n_busy_start, n_clear, n_noeval;
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.run_state == ST_INIT) n_init_cyc <= n_init_cyc + 1;
    if (dut.run_state == ST_EMUL) n_emul_cyc <= n_emul_cyc + 1;
    if (dut.run_state == ST_EVAL) n_eval_cyc <= n_eval_cyc + 1;
    if (dut.dac_start && dut.dac_code == 16'hFFFF) n_sat <= n_sat + 1;
  end

  // ---------------- reference model ----------------
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

  task automatic do_run(input int ni, input int nt, input int e, input int st, input bit hi_inputs);
    logic [31:0] d;
    int polls, exp_cycles;
    inp = new[(ni + nt) * N];
    for (int i = 0; i < (ni + nt) * N; i++)
      inp[i] = (hi_inputs && $urandom_range(0, 7) == 0) ? 16'($urandom_range(60000, 65535))
                                                       : 16'($urandom_range(0, 30000));
    for (int i = 0; i < N; i++) wts[i] = 16'($urandom);
    for (int i = 0; i < (ni + nt) * N; i++) axi_write(RGN_INPUT, i, {16'd0, inp[i]});
    for (int i = 0; i < N; i++) axi_write(RGN_WEIGHT, i, {16'd0, wts[i]});
    axi_write(RGN_REGS, REG_NUM_INIT, ni);
    axi_write(RGN_REGS, REG_NUM_TEST, nt);
    axi_write(RGN_REGS, REG_ETA, e);
    axi_write(RGN_REGS, REG_SETTLE, st);
    reference(ni, nt, e);
    axi_write(RGN_REGS, REG_CTRL, 1);
    // a second start while busy must be ignored
    axi_read(RGN_REGS, REG_STATUS, d);
    check(d[0] == 1'b1, "busy after start");
    axi_write(RGN_REGS, REG_CTRL, 1);
    n_busy_start++;
    polls = 0;
    do begin
      repeat (200) @(negedge clk);
      axi_read(RGN_REGS, REG_STATUS, d);
      polls++;
    end while (!d[1] && polls < 10000);
    check(d[1] && !d[0] && d[4:2] == ST_DONE && irq_done, "done status");
    axi_read(RGN_REGS, REG_CYCLES, d);
    exp_cycles = (ni + nt) * N * (39 + st + ALAT) + ((nt > 0) ? N * nt + 6 : 4);
    check(int'(d) == exp_cycles, $sformatf("cycles %0d exp %0d", d, exp_cycles));
    if (nt > 0 && st == 0)
      $display("run: %0d cycles per sample -> %0d samples/s at 10 MHz", (ni + nt) * N * (39 + ALAT) / (ni + nt),
               10_000_000 / (N * (39 + ALAT)));
    for (int s = 0; s < nt; s++) begin
      axi_read(RGN_OUTPUT, s, d);
      check($signed(d) == 32'(exp_out[s]), $sformatf("y[%0d] got %0d exp %0d", s, $signed(d), exp_out[s]));
    end
    for (int i = 0; i < nt * N; i += 7) begin
      axi_read(RGN_RESERV, i, d);
      check(int'(d) == exp_nodes[i], $sformatf("node %0d got %0h exp %0h", i, d, exp_nodes[i]));
    end
    axi_read(RGN_REGS, REG_LAST_ADC, d);
    if (nt > 0) check(int'(d) << 4 == exp_nodes[nt * N - 1], "last adc register");
    check(dac_word == dut.dac_code, "DAC model received last code");
    axi_write(RGN_REGS, REG_CTRL, 2);
    axi_read(RGN_REGS, REG_STATUS, d);
    check(!d[1] && !irq_done, "done cleared");
    n_clear++;
    if (nt == 0) n_noeval++;
  endtask

  logic [31:0] d0;
  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_arvalid = 0; s_axil_bready = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    n_init_cyc = 0; n_emul_cyc = 0; n_eval_cyc = 0; n_sat = 0; n_busy_start = 0; n_clear = 0; n_noeval = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    axi_read(RGN_REGS, REG_NODES, d0);
    check(d0 == N, "node count register");
    do_run(2, 3, 16'h0800, 0, 1);
    do_run(1, 2, 16'h4000, 2, 0);
    do_run(1, 0, 16'h4000, 0, 0);
    check(n_init_cyc > 0, "initialization phase never seen");
    check(n_emul_cyc > 0, "emulation phase never seen");
    check(n_eval_cyc > 0, "evaluation phase never seen");
    check(n_sat > 0, "DAC saturation never happened");
    check(n_busy_start > 0 && n_clear > 0 && n_noeval > 0, "host mechanisms");
    $display("mechanisms: init %0d cycles, emul %0d, eval %0d, saturations %0d, busy starts %0d, clears %0d, runs without evaluation %0d",
             n_init_cyc, n_emul_cyc, n_eval_cyc, n_sat, n_busy_start, n_clear, n_noeval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
