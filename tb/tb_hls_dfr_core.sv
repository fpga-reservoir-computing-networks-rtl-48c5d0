// tb_hls_dfr_core: self-checking test of the floating-point DFR core at its
// default size (50 nodes, gain 0.5, feedback 0.4, Mackey-Glass exponent 16).
//
// Mask values in [-0.5, 0.5] and weights in [-2, 2] (multiples of 2^-12, so
// exact in the float format) are loaded through the load port. A stream of
// random 12-bit I/Q pairs (sign-extended to 16 bits, with one all-zero pair
// and one full-scale pair) is fed in, with idle gaps. A double-precision
// software DFR computes each expected score; the core's score must agree to
// within 1e-3 of the sum of |W[k]*x[k]| (float rounding only). Also checked:
// in_ready low while busy, a load-port write while busy is ignored, and the
// latency of 6 + 25*(11 + 4 + 1) = 406 cycles from input handshake to output.
module tb_hls_dfr_core;
  import dfr_fp_pkg::*;
  import dfr_fp_tb_pkg::*;

  localparam int N = 50;
  localparam int LAT = 6 + (N / 2) * (11 + 4 + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, cfg_we = 0, cfg_sel = 0;
  logic signed [15:0] i_data, q_data;
  fp_t out_data, cfg_wdata;
  logic [5:0] cfg_addr;

  hls_dfr_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  real mask_r [N], w_r [N], res_r [N];

  task automatic cfg_write(input bit sel, input int addr, input real v);
    @(negedge clk); cfg_we = 1; cfg_sel = sel; cfg_addr = 6'(addr); cfg_wdata = real_to_fp(v);
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic real ref_step(input int i, input int q, output real mag);
    real e, xin, pw, xn, score;
    e = $sqrt((real'(i) / 2047.0) ** 2 + (real'(q) / 2047.0) ** 2);
    score = 0.0; mag = 0.0;
    for (int k = N - 1; k >= 0; k--) begin
      xin = 0.5 * (mask_r[k] * e) + 0.4 * res_r[k];
      pw  = xin ** 16;
      xn  = xin / (1.0 + pw);
      res_r[k] = xn;
      score += w_r[k] * xn;
      mag += (w_r[k] * xn < 0.0) ? -(w_r[k] * xn) : w_r[k] * xn;
    end
    return score;
  endfunction

  task automatic one_sample(input int i, input int q);
    real expv, mag, got;
    int n;
    expv = ref_step(i, q, mag);
    @(negedge clk); in_valid = 1; i_data = 16'(i); q_data = 16'(q);
    #1 check(in_ready, "ready when idle");
    @(negedge clk); in_valid = 0; i_data = 16'h7FFF; q_data = 16'h7FFF;
    #1 check(!in_ready, "not ready while busy");
    // load-port write while busy must not change the mask
    cfg_we = 1; cfg_sel = 0; cfg_addr = 6'd3; cfg_wdata = real_to_fp(0.375);
    @(negedge clk); cfg_we = 0;
    n = 2;
    while (!out_valid) begin @(negedge clk); n++; end
    check(n == LAT + 1, $sformatf("latency %0d exp %0d", n - 1, LAT));
    got = fp_to_real(out_data);
    check((got - expv) <= 1e-3 * mag + 1e-6 && (expv - got) <= 1e-3 * mag + 1e-6,
          $sformatf("score got %g exp %g (scale %g)", got, expv, mag));
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      mask_r[k] = real'($urandom_range(0, 4096)) / 4096.0 - 0.5;
      w_r[k]    = real'($urandom_range(0, 16384)) / 4096.0 - 2.0;
      res_r[k]  = 0.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      cfg_write(0, k, mask_r[k]);
      cfg_write(1, k, w_r[k]);
    end
    one_sample(0, 0);
    one_sample(2047, -2048);
    for (int s = 0; s < 10; s++) begin
      one_sample($urandom_range(0, 4095) - 2048, $urandom_range(0, 4095) - 2048);
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
