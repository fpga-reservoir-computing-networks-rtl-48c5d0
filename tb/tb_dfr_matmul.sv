// tb_dfr_matmul: self-checking test of the matrix multiplication block.
// A 7-node readout runs over 5 test samples of random node values with random
// signed weights (including the extreme values -32768 and 65535 nodes); the
// testbench plays the weight and reservoir memories (one-cycle read) and
// compares each prediction with a software dot product shifted right by 16.
// Checked: every output value and address, the number of outputs, done
// exactly num_test*N + 2 edges after start, and a num_test = 0 run.
module tb_dfr_matmul;
  localparam int N = 7, RES_AW = 8, W_AW = 3, OUT_AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [15:0] num_test;
  logic busy, done;
  logic w_en, r_en, o_we;
  logic [W_AW-1:0] w_addr;
  logic [RES_AW-1:0] r_addr;
  logic [OUT_AW-1:0] o_addr;
  logic [15:0] w_rdata, r_rdata;
  logic [31:0] o_wdata;

  dfr_matmul #(.N_NODES(N), .RES_AW(RES_AW), .W_AW(W_AW), .OUT_AW(OUT_AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [15:0] wmem [2**W_AW];
  logic [15:0] rmem [2**RES_AW];
  always_ff @(posedge clk) begin
    if (w_en) w_rdata <= wmem[w_addr];
    if (r_en) r_rdata <= rmem[r_addr];
  end

  longint expv [16];
  int nout;
  always_ff @(posedge clk) if (rst_n && o_we) begin
    check(int'(o_addr) == nout, $sformatf("output address %0d", o_addr));
    check($signed(o_wdata) == 32'(expv[nout]),
          $sformatf("y[%0d] got %0d exp %0d", nout, $signed(o_wdata), expv[nout]));
    nout <= nout + 1;
  end

  task automatic run(input int nt);
    int n;
    for (int s = 0; s < nt; s++) begin
      longint acc = 0;
      for (int i = 0; i < N; i++)
        acc += longint'($signed(wmem[i])) * longint'(rmem[s*N + i]);
      expv[s] = acc >>> 16;
    end
    nout = 0;
    num_test = 16'(nt);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    check(n == ((nt == 0) ? 1 : nt * N + 3), $sformatf("done after %0d cycles (nt=%0d)", n, nt));
    @(negedge clk);
    check(nout == nt, $sformatf("outputs %0d of %0d", nout, nt));
  endtask

  initial begin
    for (int i = 0; i < N; i++) wmem[i] = 16'($urandom);
    for (int i = 0; i < 2**RES_AW; i++) rmem[i] = 16'($urandom);
    wmem[0] = 16'h8000; rmem[0] = 16'hFFFF; rmem[N] = 16'hFFFF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5);
    run(0);
    for (int i = 0; i < N; i++) wmem[i] = 16'($urandom);
    run(3);
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
