// tb_dfr_fp_pkg: self-checking test of the 26-bit floating-point operations.
// Random operands are fed to multiply, add (both signs), divide and square
// root; each result must equal, bit for bit, the exact real result rounded to
// the format by an independent real-number conversion (round to nearest
// even). Integer conversion is checked over a sweep of 16-bit values, and
// zero, cancellation, overflow and underflow cases are checked by hand.
module tb_dfr_fp_pkg;
  import dfr_fp_pkg::*;
  import dfr_fp_tb_pkg::*;

  int checks = 0, failures = 0;
  task automatic check_fp(input fp_t got, input fp_t exp, input string msg);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %h (%g) exp %h (%g)", msg, got, fp_to_real(got), exp, fp_to_real(exp));
    end
  endtask

  function automatic fp_t rnd(input int emin, input int emax);
    fp_t x;
    x.sign = 1'($urandom);
    x.exp  = 8'($urandom_range(emin, emax));
    x.man  = 17'($urandom);
    return x;
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;

  fp_t a, b;
  real ra, rb;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = rnd(100, 150); b = rnd(100, 150);
      ra = fp_to_real(a); rb = fp_to_real(b);
      check_fp(fp_mul(a, b), real_to_fp(ra * rb), "mul");
      check_fp(fp_add(a, b), real_to_fp(ra + rb), "add");
      check_fp(fp_div(a, b), real_to_fp(ra / rb), "div");
      a.sign = 0; ra = fp_to_real(a);
      check_fp(fp_sqrt(a), real_to_fp($sqrt(ra)), "sqrt");
      // nearly equal magnitudes, opposite signs: cancellation
      b = a; b.sign = 1; b.man = a.man ^ 17'($urandom_range(0, 7));
      check_fp(fp_add(a, b), real_to_fp(ra + fp_to_real(b)), "cancel");
      if (i % 200 == 0) @(posedge clk);
    end
    for (int v = -32768; v < 32768; v += 97)
      check_fp(fp_from_int16(16'(v)), real_to_fp(real'(v)), "int16");
    check_fp(fp_from_int16(-16'sd32768), real_to_fp(-32768.0), "int16 min");
    check_fp(fp_add(FP_ONE, '{sign: 1'b1, exp: 8'd127, man: '0}), FP_ZERO, "1 - 1");
    check_fp(fp_mul(FP_ZERO, FP_ONE), FP_ZERO, "0 * 1");
    check_fp(fp_mul('{sign: 1'b0, exp: 8'd250, man: '0}, '{sign: 1'b0, exp: 8'd250, man: '0}),
             '{sign: 1'b0, exp: 8'd254, man: '1}, "overflow saturates");
    check_fp(fp_mul('{sign: 1'b0, exp: 8'd3, man: '0}, '{sign: 1'b0, exp: 8'd3, man: '0}),
             FP_ZERO, "underflow flushes");
    check_fp(fp_sqrt('{sign: 1'b0, exp: 8'd129, man: '0}), '{sign: 1'b0, exp: 8'd128, man: '0}, "sqrt 4");
    check_fp(fp_div(FP_ONE, '{sign: 1'b0, exp: 8'd128, man: 17'h10000}), real_to_fp(1.0 / 3.0), "1/3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
