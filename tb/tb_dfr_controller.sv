// tb_dfr_controller: self-checking test of the run sequencer. The testbench
// stands in for the reservoir block (busy for a set time, emulation flag in
// its second half) and the matrix multiplication block. Checked: the run
// states INIT, EMUL, EVAL, DONE in order, one res_start and one mm_start per
// run, mm_start one cycle after res_done, done held until cleared, a start
// during a run ignored, and the cycle counter equal to the run length.
module tb_dfr_controller;
  import dfr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, clear_done = 0;
  logic res_start, res_emul, res_done, mm_start, mm_done;
  run_state_e state;
  logic busy, done;
  logic [31:0] cycles;

  dfr_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // stand-in blocks
  localparam int RES_T = 20, MM_T = 7;
  int rcnt = 0, mcnt = 0, n_rs = 0, n_ms = 0, gap = -1;
  always_ff @(posedge clk) begin
    res_done <= 1'b0;
    mm_done  <= 1'b0;
    if (rst_n && res_start) begin rcnt <= RES_T; n_rs <= n_rs + 1; end
    else if (rcnt > 0) begin rcnt <= rcnt - 1; if (rcnt == 1) begin res_done <= 1'b1; gap <= 0; end end
    if (gap >= 0) gap <= gap + 1;
    if (rst_n && mm_start) begin
      mcnt <= MM_T; n_ms <= n_ms + 1;
      check(gap == 1, $sformatf("mm_start %0d cycles after res_done", gap));
      gap <= -1;
    end
    else if (mcnt > 0) begin mcnt <= mcnt - 1; if (mcnt == 1) mm_done <= 1'b1; end
  end
  assign res_emul = (rcnt > 0) && (rcnt <= RES_T / 2);

  run_state_e seen[$];
  always_ff @(posedge clk) if (rst_n && (seen.size() == 0 || seen[$] != state)) seen.push_back(state);

  task automatic run_once(input bit poke_start);
    int n;
    seen.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 1;
    while (!done) begin
      @(negedge clk); n++;
      if (poke_start && n == 10) begin start = 1; @(negedge clk); start = 0; n++; end
    end
    check(cycles == 32'(n - 1), $sformatf("cycles %0d, run %0d", cycles, n - 1));
    repeat (3) @(negedge clk);
    check(done && state == ST_DONE, "done held");
    check(seen.size() >= 5 && seen[$-3] == ST_INIT && seen[$-2] == ST_EMUL &&
          seen[$-1] == ST_EVAL && seen[$] == ST_DONE, "state order");
    clear_done = 1; @(negedge clk); clear_done = 0; @(negedge clk);
    check(!done && state == ST_IDLE, "done cleared");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_once(0);
    run_once(1);
    check(n_rs == 2 && n_ms == 2, $sformatf("starts %0d/%0d", n_rs, n_ms));
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
