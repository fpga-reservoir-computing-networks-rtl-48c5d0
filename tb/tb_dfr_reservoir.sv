// tb_dfr_reservoir: self-checking test of the reservoir block.
//
// A small reservoir (5 nodes) runs 3 initialization and 4 test samples of
// random masked inputs, a few close to full scale so that the DAC sum
// saturates. The testbench plays the input memory (one-cycle read), the DAC
// transmitter (done a fixed time after start) and the analog loop plus ADC
// (result from the reference Mackey-Glass arithmetic a fixed time after
// convst). A software reservoir computes every expected DAC code and every
// expected reservoir-memory write. Checked: each DAC code, each memory write
// (address and data), the phase flag, the number of saturations, the cycle
// count per subsample (DAC + ADC + settle + 7) and of the whole run, and a
// second run with a different feedback scale and settle time.
module tb_dfr_reservoir;
  import dfr_tb_pkg::*;

  localparam int N      = 5;
  localparam int IN_AW  = 8;
  localparam int RES_AW = 8;
  localparam int DLAT   = 9;
  localparam int ALAT   = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start = 0;
  logic [15:0]       num_init, num_test, eta, settle;
  logic              busy, done, emul;
  logic              in_en;
  logic [IN_AW-1:0]  in_addr;
  logic [15:0]       in_rdata;
  logic              res_we;
  logic [RES_AW-1:0] res_addr;
  logic [15:0]       res_wdata;
  logic              dac_start, dac_done;
  logic [15:0]       dac_code;
  logic              adc_convst, adc_eoc;
  logic [11:0]       adc_data, last_adc;
  logic              sat_evt;

  dfr_reservoir #(.N_NODES(N), .IN_AW(IN_AW), .RES_AW(RES_AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // input memory
  logic [15:0] imem [2**IN_AW];
  always_ff @(posedge clk) if (in_en) in_rdata <= imem[in_addr];

  // DAC responder
  int dcnt = 0;
  logic [15:0] dac_held;
  always_ff @(posedge clk) begin
    dac_done <= 1'b0;
    if (dac_start) begin
      dcnt     <= DLAT;
      dac_held <= dac_code;
    end else if (dcnt > 0) begin
      dcnt <= dcnt - 1;
      if (dcnt == 1) dac_done <= 1'b1;
    end
  end
  // ADC responder
  int acnt = 0;
  always_ff @(posedge clk) begin
    adc_eoc <= 1'b0;
    if (adc_convst) acnt <= ALAT;
    else if (acnt > 0) begin
      acnt <= acnt - 1;
      if (acnt == 1) begin
        adc_eoc  <= 1'b1;
        adc_data <= 12'(loop_adc(32'(dac_held)));
      end
    end
  end

  // expected streams
  int exp_codes[$];
  int exp_waddr[$];
  int exp_wdata[$];
  int exp_sats;
  int seen_sats;

  task automatic build_expect(input int ni, input int nt, input int e);
    int node[N];
    int code, k, a;
    k = 0; a = 0; exp_sats = 0;
    exp_codes.delete(); exp_waddr.delete(); exp_wdata.delete();
    for (int i = 0; i < N; i++) node[i] = 0;
    for (int s = 0; s < ni + nt; s++)
      for (int i = 0; i < N; i++) begin
        if (32'(imem[k]) + ((node[N-1] * e) >> 15) > 65535) exp_sats++;
        code = int'(res_sum(32'(imem[k]), 32'(node[N-1]), 32'(e)));
        exp_codes.push_back(code);
        for (int j = N - 1; j > 0; j--) node[j] = node[j-1];
        node[0] = int'(loop_adc(32'(code))) << 4;
        if (s >= ni) begin
          exp_waddr.push_back(a);
          exp_wdata.push_back(node[0]);
          a++;
        end
        k++;
      end
  endtask

  // monitors
  int code_idx, wr_idx;
  int last_dac_cyc, cyc, period_bad, period_seen, emul_bad;
  int samples_done;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sat_evt) seen_sats <= seen_sats + 1;
    if (rst_n && dac_start) begin
      if (code_idx < exp_codes.size())
        check(dac_code == 16'(exp_codes[code_idx]),
              $sformatf("dac code %0d: got %0h exp %0h", code_idx, dac_code, exp_codes[code_idx]));
      else check(0, "extra dac code");
      if (code_idx > 0 && last_dac_cyc >= 0) begin
        period_seen <= period_seen + 1;
        if (cyc - last_dac_cyc != DLAT + ALAT + int'(settle) + 7) period_bad <= period_bad + 1;
      end
      last_dac_cyc <= cyc;
      // emulation flag matches the sample index
      if (emul != ((code_idx / N) >= int'(num_init))) emul_bad <= emul_bad + 1;
      code_idx <= code_idx + 1;
    end
    if (rst_n && res_we) begin
      if (wr_idx < exp_waddr.size()) begin
        check(int'(res_addr) == exp_waddr[wr_idx], $sformatf("res addr %0d", wr_idx));
        check(int'(res_wdata) == exp_wdata[wr_idx],
              $sformatf("res data %0d: got %0h exp %0h", wr_idx, res_wdata, exp_wdata[wr_idx]));
      end else check(0, "extra reservoir write");
      wr_idx <= wr_idx + 1;
    end
  end

  task automatic run(input int ni, input int nt, input int e, input int st);
    int t0, t1;
    num_init = 16'(ni); num_test = 16'(nt); eta = 16'(e); settle = 16'(st);
    build_expect(ni, nt, e);
    code_idx = 0; wr_idx = 0; seen_sats = 0; period_bad = 0; period_seen = 0;
    emul_bad = 0; last_dac_cyc = -1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    check(code_idx == (ni + nt) * N, $sformatf("dac count %0d", code_idx));
    check(wr_idx == nt * N, $sformatf("write count %0d", wr_idx));
    check(seen_sats == exp_sats, $sformatf("saturations %0d exp %0d", seen_sats, exp_sats));
    check(period_bad == 0 && period_seen == (ni + nt) * N - 1,
          $sformatf("subsample period wrong %0d of %0d", period_bad, period_seen));
    check(emul_bad == 0, "emulation flag");
    check(t1 - t0 == (ni + nt) * N * (DLAT + ALAT + st + 7),
          $sformatf("run length %0d", t1 - t0));
    check(!busy, "busy after done");
    $display("run init=%0d test=%0d eta=%0h: %0d saturations, %0d cycles", ni, nt, e,
             seen_sats, t1 - t0 + 1);
  endtask

  initial begin
    cyc = 0;
    for (int i = 0; i < 2**IN_AW; i++)
      imem[i] = ($urandom_range(0, 9) == 0) ? 16'hFFF0 : 16'($urandom_range(0, 40000));
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(3, 4, 16'h4000, 0);
    check(exp_sats > 0, "test stimulus produced no saturation");
    run(2, 3, 16'h7000, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
