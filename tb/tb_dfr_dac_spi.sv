// tb_dfr_dac_spi: self-checking test of the DAC serial transmitter. Two
// instances (CLK_DIV 1 and 3) send random codes to two DAC models; each
// received word must equal the code sent, chip select must stay low for
// exactly 16 rising sclk edges, and done must come 32*CLK_DIV clock edges
// after the edge that took start.
module tb_dfr_dac_spi;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        start [2];
  logic [15:0] code  [2];
  logic        busy [2], done [2], cs_n [2], sclk [2], sdi [2];
  real         vout [2];
  logic [15:0] rx   [2];
  int          words[2];

  dfr_dac_spi #(.CLK_DIV(1)) u0 (.clk, .rst_n, .start(start[0]), .code(code[0]), .busy(busy[0]),
    .done(done[0]), .cs_n(cs_n[0]), .sclk(sclk[0]), .sdi(sdi[0]));
  dfr_dac_spi #(.CLK_DIV(3)) u1 (.clk, .rst_n, .start(start[1]), .code(code[1]), .busy(busy[1]),
    .done(done[1]), .cs_n(cs_n[1]), .sclk(sclk[1]), .sdi(sdi[1]));
  tb_dac_model m0 (.cs_n(cs_n[0]), .sclk(sclk[0]), .sdi(sdi[0]), .vout(vout[0]), .code(rx[0]), .words(words[0]));
  tb_dac_model m1 (.cs_n(cs_n[1]), .sclk(sclk[1]), .sdi(sdi[1]), .vout(vout[1]), .code(rx[1]), .words(words[1]));

  int edges [2];
  int w0, w1;
  always @(posedge sclk[0]) if (!cs_n[0]) edges[0]++;
  always @(posedge sclk[1]) if (!cs_n[1]) edges[1]++;

  task automatic send(input int k, input int div, input logic [15:0] c);
    int n;
    edges[k] = 0;
    @(negedge clk); start[k] = 1; code[k] = c;
    @(negedge clk); start[k] = 0; code[k] = 16'h0;
    n = 1;
    while (!done[k]) begin @(negedge clk); n++; end
    check(n == 32 * div + 1, $sformatf("div %0d: done after %0d cycles", div, n));
    #1;
    check(rx[k] == c, $sformatf("div %0d: got %0h sent %0h", div, rx[k], c));
    check(edges[k] == 16, $sformatf("div %0d: %0d sclk edges", div, edges[k]));
    check(cs_n[k] && !busy[k], "cs_n high after done");
  endtask

  initial begin
    start[0] = 0; start[1] = 0; code[0] = 0; code[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    w0 = words[0]; w1 = words[1];
    send(0, 1, 16'hA5C3); send(0, 1, 16'hFFFF); send(0, 1, 16'h0001);
    for (int i = 0; i < 20; i++) send(0, 1, 16'($urandom));
    for (int i = 0; i < 10; i++) send(1, 3, 16'($urandom));
    check(words[0] - w0 == 23 && words[1] - w1 == 10, "word counts");
    check(vout[0] == real'(rx[0]) * 2.5 / 65536.0, "dac voltage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
