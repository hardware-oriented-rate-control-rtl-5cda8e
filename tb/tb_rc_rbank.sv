// Test of the register bank.
// Checks the reset values, every constant and configuration operand source and the
// derived ones (rho of the frame type, B^i/4, KMB, QP_I+2 clipped), that each of the six
// read ports reads any register, the write ports and their priority (a PE write wins
// over a move to the same register), the encoder load port, the frame-start clear with
// and without the SACC clear, and the two counters. One check per compared value.
module tb_rc_rbank;
  import rc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  rc_cfg_t cfg;
  ftype_e ftype;
  src_e sa, sb, sc, sd, se, sf;
  logic [15:0] imm;
  word_t oa, ob, oc, od, oe, of_;
  word_t wdata;
  logic w0_en, w1_en, mva_en, mvb_en, ld_mae, ld_bits, clr_frame, clr_sacc, inc_mb, inc_imbc;
  reg_e w0_reg, w1_reg, mva_dst, mvb_dst;
  src_e mva_src, mvb_src;
  logic [15:0] mae, bits, hbits;
  word_t regs_o [NREG];
  int checks = 0, failures = 0;

  rc_rbank dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    w0_en = 0; w1_en = 0; mva_en = 0; mvb_en = 0; ld_mae = 0; ld_bits = 0;
    clr_frame = 0; clr_sacc = 0; inc_mb = 0; inc_imbc = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.br = 33333; cfg.gop_len = 12; cfg.rho_i = 768; cfg.rho_p = 256; cfg.buf_size = 66666;
    cfg.n_mb = 396; cfg.mb_w = 22; cfg.search_range = 32; cfg.tau = 128; cfg.mae_intra_th = 320;
    cfg.init_mu = 61440; cfg.init_theta = 240; cfg.init_qpi = 30; cfg.init_ti = 80000;
    cfg.init_smae = 31680;
    ftype = FT_I; imm = 16'd4321;
    sa = S_ZERO; sb = S_ZERO; sc = S_ZERO; sd = S_ZERO; se = S_ZERO; sf = S_ZERO;
    mva_src = S_ZERO; mvb_src = S_ZERO; mva_dst = R_T0; mvb_dst = R_T0; w0_reg = R_T0; w1_reg = R_T0;
    wdata = 0; mae = 0; bits = 0; hbits = 0;
    idle();
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // reset values
    chk("mu", regs_o[R_MU], 61440);
    chk("theta", regs_o[R_THETA], 240);
    chk("qpi", regs_o[R_QPI], 30);
    chk("ti", regs_o[R_TI], 80000);
    chk("smaep", regs_o[R_SMAEP], 31680);
    chk("b", regs_o[R_B], 0);
    // sources
    sa = S_ONE; sb = S_IMM; sc = S_BR; sd = S_L; se = S_RHOI; sf = S_RHOP; #1;
    chk("one", oa, 1); chk("imm", ob, 4321); chk("br", oc, 33333); chk("L", od, 12);
    chk("rhoi", oe, 768); chk("rhop", of_, 256);
    sa = S_RHOV; sb = S_BUFSZ; sc = S_BI4; sd = S_NMB; se = S_KMB; sf = S_TAU; #1;
    chk("rhov I", oa, 768); chk("bufsz", ob, 66666); chk("bi4", oc, 66666 / 32);
    chk("nmb", od, 396); chk("kmb", oe, 3 * 22); chk("tau", of_, 128);
    ftype = FT_P; sb = S_MAETH; sc = S_QPS; #1;
    chk("rhov P", oa, 256); chk("maeth", ob, 320); chk("qps clipped", oc, 31);
    sd = S_MBW; #1 chk("mbw", od, 22);
    // writes through every port, then read back through every read port
    for (int i = 0; i < NREG; i++) begin
      @(negedge clk);
      w0_en = 1; w0_reg = reg_e'(i); wdata = word_t'(1000 + 7 * i);
    end
    @(negedge clk); idle();
    for (int i = 0; i < NREG; i++) begin
      sa = src_e'(i); sb = src_e'(i); sc = src_e'(i); sd = src_e'(i); se = src_e'(i); sf = src_e'(i);
      #1;
      chk("read a", oa, 1000 + 7 * i); chk("read b", ob, 1000 + 7 * i); chk("read c", oc, 1000 + 7 * i);
      chk("read d", od, 1000 + 7 * i); chk("read e", oe, 1000 + 7 * i); chk("read f", of_, 1000 + 7 * i);
    end
    chk("qps", regs_o[R_QPI] + 2, 1014 + 2);
    // second PE port and moves; PE write wins over a move to the same register
    @(negedge clk);
    w0_en = 1; w0_reg = R_T0; w1_en = 1; w1_reg = R_T1; wdata = 55;
    mva_en = 1; mva_src = S_IMM; mva_dst = R_T0;
    mvb_en = 1; mvb_src = S_B; mvb_dst = R_T2;
    @(negedge clk); idle();
    chk("w0 over move", regs_o[R_T0], 55); chk("w1", regs_o[R_T1], 55);
    chk("mvb", regs_o[R_T2], 1000 + 7 * R_B);
    // encoder loads
    mae = 16'd333; bits = 16'd4444; hbits = 16'd55; ld_mae = 1;
    @(negedge clk); idle();
    chk("mae", regs_o[R_MAE], 333); chk("bits unchanged", regs_o[R_BITS], 1000 + 7 * R_BITS);
    ld_bits = 1;
    @(negedge clk); idle();
    chk("bits", regs_o[R_BITS], 4444); chk("hbits", regs_o[R_HBITS], 55);
    // counters
    inc_mb = 1; inc_imbc = 1;
    @(negedge clk); idle();
    chk("mbcnt+1", regs_o[R_MBCNT], 1000 + 7 * R_MBCNT + 1);
    chk("imbc+1", regs_o[R_IMBC], 1000 + 7 * R_IMBC + 1);
    // frame clear without SACC
    clr_frame = 1;
    @(negedge clk); idle();
    chk("fbits clr", regs_o[R_FBITS], 0); chk("smaec clr", regs_o[R_SMAEC], 0);
    chk("mbcnt clr", regs_o[R_MBCNT], 0); chk("imbc clr", regs_o[R_IMBC], 0);
    chk("sacc kept", regs_o[R_SACC], 1000 + 7 * R_SACC);
    clr_frame = 1; clr_sacc = 1;
    @(negedge clk); idle();
    chk("sacc clr", regs_o[R_SACC], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
