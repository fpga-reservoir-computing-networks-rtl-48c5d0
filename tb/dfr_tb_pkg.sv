// dfr_tb_pkg: reference arithmetic shared by the DFR testbenches.
//
// Gives, independently of the RTL, what the analog loop returns for a DAC
// code (16-bit DAC with 2.5 V reference, Mackey-Glass curve with a = 1 and
// xi = 16, 12-bit ADC with 1 V reference) and what the digital reservoir and
// readout compute.
package dfr_tb_pkg;

  function automatic real dac_volts(input int unsigned code);
    return real'(code) * 2.5 / 65536.0;
  endfunction

  function automatic real mg_curve(input real v);
    real vp;
    vp = (v < 0.0) ? 0.0 : v;
    return vp / (1.0 + vp ** 16.0);
  endfunction

  function automatic int unsigned adc_code(input real v);
    real c;
    c = v / 1.0 * 4096.0;
    if (c < 0.0) return 0;
    if (c >= 4095.0) return 4095;
    return int'($floor(c));
  endfunction

  // ADC result for a given DAC code
  function automatic int unsigned loop_adc(input int unsigned code);
    return adc_code(mg_curve(dac_volts(code)));
  endfunction

  // One reservoir step: DAC code from masked input and last node (Q1.15 eta)
  function automatic int unsigned res_sum(input int unsigned j, input int unsigned last,
                                          input int unsigned eta);
    longint unsigned s;
    s = longint'(j) + ((longint'(last) * longint'(eta)) >> 15);
    return (s > 65535) ? 65535 : int'(s);
  endfunction

endpackage
