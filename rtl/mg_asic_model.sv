// mg_asic_model: behavioural model (not synthesizable logic) of the analog
// Mackey-Glass nonlinearity chip that serves as the single nonlinear node of
// the hybrid DFR.
//
// The real part is a 180 nm CMOS analog circuit whose measured transfer curve
// resembles the ideal Mackey-Glass nonlinearity with scaling a = 1 and
// exponent xi = 16. This model gives the static curve
//     vout = A * vin / (1 + (vin / V_SCALE)**XI)
// instantly; the real circuit settles over time and its output jitters,
// which is not modelled. Input voltage comes from the external 16-bit DAC
// (0 to 2.5 V), output goes to the FPGA's 12-bit ADC (0 to 1 V). A and XI
// follow the reference design; V_SCALE = 1 V (the mapping of the curve onto
// volts) is this model's assumption.
module mg_asic_model #(
  parameter real A       = 1.0,
  parameter real XI      = 16.0,
  parameter real V_SCALE = 1.0
) (
  input  real vin,
  output real vout
);
  real vpos;
  always_comb begin
    vpos = (vin < 0.0) ? 0.0 : vin;
    vout = A * vpos / (1.0 + (vpos / V_SCALE) ** XI);
  end
endmodule
