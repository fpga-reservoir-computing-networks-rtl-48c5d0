// tb_dfr_regfile: self-checking test of the ten-register file. Checked:
// reset values, read-write registers, the start and clear-done bits as
// one-cycle pulses, the status layout, the read-only monitors, writes to
// read-only registers ignored, and one-cycle read latency.
module tb_dfr_regfile;
  import dfr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [3:0] addr;
  logic [31:0] wdata, rdata;
  logic start, clear_done;
  logic [15:0] num_init, num_test, eta, settle;
  logic busy, done;
  run_state_e state;
  logic [15:0] last_dac;
  logic [11:0] last_adc;
  logic [31:0] cycles;

  dfr_regfile #(.N_NODES(100)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_start = 0, n_clear = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (start) n_start <= n_start + 1;
    if (clear_done) n_clear <= n_clear + 1;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); we = 1; addr = 4'(a); wdata = d; @(negedge clk); we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); re = 1; addr = 4'(a); @(negedge clk); re = 0; d = rdata;
  endtask

  logic [31:0] d;
  initial begin
    addr = 0; wdata = 0; busy = 0; done = 0; state = ST_IDLE;
    last_dac = 16'hBEEF; last_adc = 12'hABC; cycles = 32'd123456;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(REG_ETA, d);      check(d == 32'h0800, "eta reset");
    rd(REG_NUM_INIT, d); check(d == 0, "num_init reset");
    rd(REG_NODES, d);    check(d == 100, "nodes");
    wr(REG_NUM_INIT, 32'hFFFF0014); rd(REG_NUM_INIT, d); check(d == 32'h14, "num_init");
    check(num_init == 16'h14, "num_init out");
    wr(REG_NUM_TEST, 980);  rd(REG_NUM_TEST, d); check(d == 980 && num_test == 980, "num_test");
    wr(REG_ETA, 32'h4000);  rd(REG_ETA, d);      check(d == 32'h4000 && eta == 16'h4000, "eta");
    wr(REG_SETTLE, 5);      rd(REG_SETTLE, d);   check(d == 5 && settle == 5, "settle");
    wr(REG_NODES, 7);       rd(REG_NODES, d);    check(d == 100, "nodes read only");
    rd(REG_LAST_DAC, d); check(d == 32'hBEEF, "last dac");
    rd(REG_LAST_ADC, d); check(d == 32'hABC, "last adc");
    rd(REG_CYCLES, d);   check(d == 123456, "cycles");
    busy = 1; done = 0; state = ST_EMUL;
    rd(REG_STATUS, d);   check(d == {27'd0, ST_EMUL, 1'b0, 1'b1}, "status busy");
    busy = 0; done = 1; state = ST_DONE;
    rd(REG_STATUS, d);   check(d == {27'd0, ST_DONE, 1'b1, 1'b0}, "status done");
    wr(REG_CTRL, 1); wr(REG_CTRL, 2); wr(REG_CTRL, 3);
    @(negedge clk);
    check(n_start == 2 && n_clear == 2, $sformatf("pulses %0d %0d", n_start, n_clear));
    check(!start && !clear_done, "pulses end");
    rd(REG_CTRL, d); check(d == 0, "ctrl reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
