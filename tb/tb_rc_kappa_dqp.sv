// Test of the I-frame QP offset table F(kappa).
// Sweeps kappa (Q8) from -300 to 1400 and compares with the step function written
// with real-valued breakpoints 4, 2, 1.5, 1.25, 0.875, 0.75, 0.625. Combinational
// block: one check per value, a small delay between values.
module tb_rc_kappa_dqp;
  import rc_pkg::*;
  word_t kappa;
  logic signed [3:0] dqp;
  int checks = 0, failures = 0;

  rc_kappa_dqp dut (.kappa, .dqp);

  function automatic int ref_f(input real x);
    if (x >= 4.0)   return -4;
    if (x >= 2.0)   return -3;
    if (x >= 1.5)   return -2;
    if (x >= 1.25)  return -1;
    if (x >= 0.875) return 0;
    if (x >= 0.75)  return 1;
    if (x >= 0.625) return 2;
    return 4;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -300; k <= 1400; k++) begin
      kappa = word_t'(k);
      #1;
      checks++;
      if (int'(dqp) != ref_f(real'(k) / 256.0)) begin
        failures++;
        $display("FAIL kappa=%0d dqp=%0d expected %0d", k, dqp, ref_f(real'(k) / 256.0));
      end
    end
    kappa = 48'sh7FFF_FFFF_FFFF; #1; checks++; if (dqp != -4'sd4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
