// Test of the quantiser-step-squared to QP conversion.
// For every Q^2 from -5 to 4500 the expected QP is round(sqrt(Q^2)/2) limited to 1..31,
// computed with the real square root. Combinational block, one check per value.
module tb_rc_qp_from_qsq;
  import rc_pkg::*;
  word_t qsq;
  logic [4:0] qp;
  int checks = 0, failures = 0;

  rc_qp_from_qsq dut (.qsq, .qp);

  function automatic int ref_qp(input int v);
    int r;
    if (v <= 0) return 1;
    r = int'($floor($sqrt(real'(v)) / 2.0 + 0.5));
    return r < 1 ? 1 : (r > 31 ? 31 : r);
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -5; v <= 4500; v++) begin
      qsq = word_t'(v);
      #1;
      checks++;
      if (int'(qp) != ref_qp(v)) begin
        failures++;
        if (failures < 20) $display("FAIL qsq=%0d qp=%0d expected %0d", v, qp, ref_qp(v));
      end
    end
    qsq = 48'sh7FFF_FFFF_FFFF; #1; checks++; if (qp != 5'd31) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
