// Test of the micro-program.
// Checks the stage lengths (6, 9, 11, 3 cycles), that steps past the end are no-ops,
// and, stage by stage, which registers the program writes, compared with the values
// each stage of the algorithm must produce: the frame layer sets alpha, the frame
// target (also as remaining budget), the I-frame QP and the previous-frame average
// MAE; the MB layer sets the QP; the update sets buffer, frame bits, remaining
// budget, SACC, MAE sum, theta and mu; frame skipping sets the skip count, the
// buffer, QP_I, T_I and the previous-frame MAE sum.
module tb_rc_ucode_rom;
  import rc_pkg::*;
  stage_e stage;
  logic [3:0] step, last_step;
  uinstr_t ui;
  int checks = 0, failures = 0;

  rc_ucode_rom dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [NREG-1:0] bit_of(input reg_e r);
    return NREG'(1) << r;
  endfunction

  task automatic writes_of(input stage_e s, output logic [NREG-1:0] w, output int acts);
    w = '0; acts = 0;
    stage = s;
    for (int i = 0; i <= 15; i++) begin
      step = 4'(i);
      #1;
      if (i > int'(last_step)) begin
        chk("no-op past end", {ui.dst0_en, ui.dst1_en, ui.cond != C_NEVER, ui.mva_cond != C_NEVER,
                               ui.mvb_cond != C_NEVER, ui.act != '0}, 0);
      end else begin
        if (ui.dst0_en && ui.cond != C_NEVER) w |= bit_of(ui.dst0);
        if (ui.dst1_en && ui.cond != C_NEVER) w |= bit_of(ui.dst1);
        if (ui.mva_cond != C_NEVER) w |= bit_of(ui.mva_dst);
        if (ui.mvb_cond != C_NEVER) w |= bit_of(ui.mvb_dst);
        if (ui.act != '0) acts++;
      end
    end
    w &= ~(bit_of(R_T0) | bit_of(R_T1) | bit_of(R_T2));
  endtask

  initial begin
    logic [NREG-1:0] w;
    int acts;
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NREG-1:0] w;
    int acts;
    step = 0;
    stage = ST_FRAME; #1 chk("frame length", last_step + 1, 6);
    stage = ST_MB;    #1 chk("mb length", last_step + 1, 9);
    stage = ST_UPD;   #1 chk("update length", last_step + 1, 11);
    stage = ST_SKIP;  #1 chk("skip length", last_step + 1, 3);
    writes_of(ST_FRAME, w, acts);
    chk("frame writes", w, bit_of(R_ALPHA) | bit_of(R_THAT) | bit_of(R_TR) | bit_of(R_QPF) | bit_of(R_AVGP));
    chk("frame actions", acts, 0);
    writes_of(ST_MB, w, acts);
    chk("mb writes", w, bit_of(R_QP));
    chk("mb actions", acts, 1);
    writes_of(ST_UPD, w, acts);
    chk("update writes", w, bit_of(R_B) | bit_of(R_FBITS) | bit_of(R_TR) | bit_of(R_SACC) |
                            bit_of(R_SMAEC) | bit_of(R_THETA) | bit_of(R_MU));
    chk("update actions", acts, 2);
    writes_of(ST_SKIP, w, acts);
    chk("skip writes", w, bit_of(R_NSKIP) | bit_of(R_B) | bit_of(R_QPI) | bit_of(R_TI) | bit_of(R_SMAEP));
    // the MB-layer quantiser step uses the divider and the square-root table
    stage = ST_MB; step = 4'd3; #1;
    chk("mb eq3 divides", ui.pe.div, 1);
    chk("mb eq3 sqrt", ui.pe.post, PO_SQRTQP);
    chk("mb eq3 divisor", ui.e, S_T0);
    // the I-frame QP uses the F(kappa) table on T^/T_I
    stage = ST_FRAME; step = 4'd4; #1;
    chk("frame F", ui.pe.post, PO_FKAPPA);
    chk("frame F divisor", ui.e, S_TI);
    chk("frame F base", ui.f, S_QPI);
    chk("frame F only I", ui.cond, C_I);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
