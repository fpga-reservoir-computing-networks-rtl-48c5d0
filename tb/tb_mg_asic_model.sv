// tb_mg_asic_model: self-checking test of the behavioural Mackey-Glass chip
// model against hand-worked points of v / (1 + v^16): f(0) = 0, f(1) = 0.5,
// f(0.5) = 0.5 / (1 + 2^-16), f(2) = 2 / 65537, and the peak of the curve,
// which lies at v = 15^(-1/16) = 0.8443 with height 0.7916.
module tb_mg_asic_model;
  real vin, vout;
  mg_asic_model dut (.vin, .vout);
  int checks = 0, failures = 0;
  task automatic near(input real got, input real exp, input string msg);
    checks++;
    if (got - exp > 1e-6 || exp - got > 1e-6) begin
      failures++; $display("FAIL: %s got %f exp %f", msg, got, exp);
    end
  endtask
  real best_v, best_out;
  initial begin
    vin = 0.0;  #1 near(vout, 0.0, "f(0)");
    vin = 1.0;  #1 near(vout, 0.5, "f(1)");
    vin = 0.5;  #1 near(vout, 0.5 / (1.0 + 1.0/65536.0), "f(0.5)");
    vin = 2.0;  #1 near(vout, 2.0 / 65537.0, "f(2)");
    vin = -0.3; #1 near(vout, 0.0, "negative input clamps");
    best_v = 0.0; best_out = 0.0;
    for (int i = 0; i <= 2500; i++) begin
      vin = real'(i) / 1000.0; #1;
      if (vout > best_out) begin best_out = vout; best_v = vin; end
    end
    near(best_v, 0.844, "peak position");
    checks++;
    if (best_out < 0.7910 || best_out > 0.7920) begin failures++; $display("FAIL: peak %f", best_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
