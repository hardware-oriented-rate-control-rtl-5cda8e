// Test of the state machine.
// For each of the four stages: start is taken only when idle, the stage inputs are
// latched on the taking edge (load strobes, frame clear, SACC clear on I frames),
// busy stays high for 6, 9, 11 or 3 cycles, the step counter walks 0..n-1, and done
// pulses for one cycle afterwards. Inside the stages it checks the condition logic:
// the MB-layer QP selection (forced intra, normal P, I frame), the mode decision,
// the intra counter, the last-MB condition, the model-update condition, and the
// scene change test strobe.
module tb_rc_ctrl;
  import rc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, busy, done, mb_intra;
  stage_e stage_in, stage;
  ftype_e ftype_in, ftype;
  uinstr_t ui;
  logic w0_en, w1_en, mva_en, mvb_en, ld_mae, ld_bits, clr_frame, clr_sacc, inc_mb, inc_imbc;
  logic s1_pos, r_pos, forced, sc_cur, frame_start, det_en, det_row, no_gop;
  word_t mbcnt, n_mb, mae;
  logic [3:0] step;
  int checks = 0, failures = 0;

  rc_ctrl dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // strobes seen during the last stage, by step
  logic [15:0] seen_w0, seen_mva, seen_mvb, seen_det, seen_imbc, seen_incmb;
  logic mode_at_done;

  task automatic run(input stage_e s, input ftype_e t, input int len);
    int n;
    @(negedge clk);
    start = 1; stage_in = s; ftype_in = t;
    #1;
    chk("frame_start", frame_start, s == ST_FRAME);
    chk("clr_sacc", clr_sacc, (s == ST_FRAME) && (t == FT_I));
    chk("ld_mae", ld_mae, s == ST_MB);
    chk("ld_bits", ld_bits, s == ST_UPD);
    @(negedge clk);
    start = 0;
    seen_w0 = 0; seen_mva = 0; seen_mvb = 0; seen_det = 0; seen_imbc = 0; seen_incmb = 0;
    n = 0;
    while (busy) begin
      chk("step", step, n);
      chk("no load while busy", ld_mae | ld_bits | frame_start, 0);
      seen_w0[step] = w0_en; seen_mva[step] = mva_en; seen_mvb[step] = mvb_en;
      seen_det[step] = det_en; seen_imbc[step] = inc_imbc; seen_incmb[step] = inc_mb;
      n++;
      @(negedge clk);
      if (n > 20) break;
    end
    chk("busy cycles", n, len);
    chk("done", done, 1);
    @(negedge clk);
    chk("done one cycle", done, 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; stage_in = ST_FRAME; ftype_in = FT_I; s1_pos = 0; r_pos = 0; forced = 0; sc_cur = 0;
    mbcnt = 0; n_mb = 396; mae = 100; det_row = 1; no_gop = 0;
    rst = 1; @(negedge clk); @(negedge clk); rst = 0;
    chk("idle after reset", busy, 0);
    // frame layer of an I frame: QPF written at step 4 only for I frames
    run(ST_FRAME, FT_I, 6);
    chk("ftype I", ftype, FT_I);
    chk("QPF write in I", seen_w0[4], 1);
    // MB layer in an I frame: QP from QPF (move b), mode intra
    run(ST_MB, FT_I, 9);
    chk("I: QP from QPF", seen_mvb[4], 1);
    chk("I: no model QP", seen_mva[4], 0);
    chk("I: intra", mb_intra, 1);
    // update in an I frame: intra counted, no model update
    run(ST_UPD, FT_I, 11);
    chk("I: imbc counted", seen_imbc[0], 1);
    chk("I: no theta update", seen_w0[5], 0);
    chk("I: mb counted", seen_incmb[10], 1);
    chk("I: scene test strobe", seen_det[10], 1);
    run(ST_SKIP, FT_I, 3);
    chk("I: QP_I from QPF", seen_mvb[0], 1);
    // P frame
    run(ST_FRAME, FT_P, 6);
    chk("ftype P", ftype, FT_P);
    chk("no QPF write in P", seen_w0[4], 0);
    chk("no SACC clear in P", clr_sacc, 0);
    // normal P MB, MAE below threshold
    r_pos = 0;
    run(ST_MB, FT_P, 9);
    chk("P: model QP", seen_mva[4], 1);
    chk("P: no forced QP", seen_w0[4], 0);
    chk("P: inter", mb_intra, 0);
    mbcnt = 395;
    run(ST_UPD, FT_P, 11);
    chk("P: theta update", seen_w0[5], 1);
    chk("P: mu update", seen_w0[9], 1);
    chk("P: no imbc", seen_imbc[0], 0);
    chk("P: last MB SACC", seen_w0[3], 1);
    mbcnt = 10;
    // MAE above threshold: intra, no model update
    r_pos = 1;
    run(ST_MB, FT_P, 9);
    chk("P: threshold intra", mb_intra, 1);
    r_pos = 0;
    run(ST_UPD, FT_P, 11);
    chk("P intra: no theta update", seen_w0[5], 0);
    chk("P intra: imbc", seen_imbc[0], 1);
    det_row = 0;
    run(ST_MB, FT_P, 9);
    run(ST_UPD, FT_P, 11);
    chk("intra outside row k not counted", seen_imbc[0], 0);
    det_row = 1;
    chk("not last MB", seen_w0[3], 0);
    // forced intra MB
    forced = 1;
    run(ST_MB, FT_P, 9);
    chk("forced: QP_I+2", seen_w0[4], 1);
    chk("forced: no model QP", seen_mva[4], 0);
    chk("forced: intra", mb_intra, 1);
    forced = 0;
    // inter MB with MAE 0: no model update
    mae = 0;
    run(ST_MB, FT_P, 9);
    run(ST_UPD, FT_P, 11);
    chk("mae 0: no mu update", seen_w0[9], 0);
    mae = 100;
    // frame skip conditions
    s1_pos = 1; sc_cur = 1;
    run(ST_SKIP, FT_P, 3);
    chk("skip: nskip written", seen_w0[0], 1);
    chk("skip: scene QP_I", seen_w0[2], 1);
    chk("skip: SMAEP copy", seen_mvb[1], 1);
    s1_pos = 0; sc_cur = 0;
    run(ST_SKIP, FT_P, 3);
    chk("skip: nskip not written", seen_w0[0], 0);
    chk("skip: no scene QP_I", seen_w0[2], 0);
    // no GOP structure: alpha is a copy of rho_v and SACC stays untouched
    run(ST_FRAME, FT_P, 6);
    chk("GOP: alpha divide", seen_w0[1], 1);
    chk("GOP: no alpha copy", seen_mva[1], 0);
    no_gop = 1;
    run(ST_FRAME, FT_P, 6);
    chk("no GOP: no alpha divide", seen_w0[1], 0);
    chk("no GOP: alpha copy", seen_mva[1], 1);
    mbcnt = 395;
    run(ST_UPD, FT_P, 11);
    chk("no GOP: no SACC update", seen_w0[3], 0);
    no_gop = 0; mbcnt = 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
