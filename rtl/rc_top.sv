// Macroblock-level rate controller for a realtime video encoder.
//
// The encoder calls the controller four times per frame or MB: at the start of a
// frame (frame layer: bit budget of the frame, QP of an I frame), after motion
// estimation of each MB (MB layer: QP and intra/inter mode from the MB's MAE), after
// each MB is coded (update: buffer, rate model mu/theta, scene change detection), and
// at the end of the frame (frame skip: buffer drain, number of frames to skip).
// All four run on one shared processing element (rc_pe) fed from a register bank
// (rc_rbank) under a micro-programmed state machine (rc_ctrl); rc_scd keeps the scene
// change state.
//
// Interface: the host sets cfg (held constant while coding). For each stage the
// encoder pulses start with stage and the stage's inputs: ftype for the frame layer,
// mae (per-pixel MAE of the MB, Q4) for the MB layer, mb_bits and hdr_bits for the
// update. busy is high for 6, 9, 11 or 3 cycles, then done pulses for one cycle and
// the outputs belong to the stage just finished: qp and mb_intra after the MB layer,
// frame_qp and target_bits after the frame layer, n_skip after frame skipping.
// buffer_bits and scene_change are always visible. Single clock, synchronous
// active-high reset.
module rc_top
  import rc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  rc_cfg_t     cfg,
  input  logic        start,
  input  stage_e      stage,
  input  ftype_e      ftype,
  input  logic [15:0] mae,
  input  logic [15:0] mb_bits,
  input  logic [15:0] hdr_bits,
  output logic        busy,
  output logic        done,
  output logic [4:0]  qp,
  output logic        mb_intra,
  output logic [4:0]  frame_qp,
  output logic [31:0] target_bits,
  output logic [31:0] buffer_bits,
  output logic [15:0] n_skip,
  output logic        scene_change
);
  // The state machine's micro-instruction; the fields that only the state machine
  // itself uses (conditions, side actions) are not read here.
  uinstr_t ui;
  ftype_e  cur_ftype;
  logic    w0_en, w1_en, mva_en, mvb_en, ld_mae, ld_bits, clr_frame, clr_sacc;
  logic    inc_mb, inc_imbc, s1_pos, r_pos, frame_start, det_en;
  logic    forced, sc_cur, det_row;
  word_t   oa, ob, oc, od, oe, of_, res;
  word_t   regs [NREG];
  word_t   kmb;

  rc_ctrl u_ctrl (
    .clk, .rst, .start, .stage_in(stage), .ftype_in(ftype), .busy, .done,
    .stage(), .ftype(cur_ftype), .mb_intra,
    .ui, .w0_en, .w1_en, .mva_en, .mvb_en, .ld_mae, .ld_bits, .clr_frame, .clr_sacc,
    .inc_mb, .inc_imbc, .s1_pos, .r_pos,
    .mbcnt(regs[R_MBCNT]), .n_mb(word_t'(cfg.n_mb)), .mae(regs[R_MAE]),
      .forced, .sc_cur, .det_row, .no_gop(cfg.gop_len == 16'd0), .frame_start, .det_en, .step()
  );

  rc_rbank u_rbank (
    .clk, .rst, .cfg, .ftype(cur_ftype),
    .sa(ui.a), .sb(ui.b), .sc(ui.c), .sd(ui.d), .se(ui.e), .sf(ui.f), .imm(ui.imm),
    .oa, .ob, .oc, .od, .oe, .of_,
    .wdata(res), .w0_en, .w1_en, .w0_reg(ui.dst0), .w1_reg(ui.dst1),
    .mva_en, .mvb_en, .mva_src(ui.mva_src), .mvb_src(ui.mvb_src),
    .mva_dst(ui.mva_dst), .mvb_dst(ui.mvb_dst),
    .ld_mae, .ld_bits, .mae, .bits(mb_bits), .hbits(hdr_bits),
    .clr_frame, .clr_sacc, .inc_mb, .inc_imbc, .regs_o(regs)
  );

  rc_pe u_pe (
    .a(oa), .b(ob), .c(oc), .d(od), .e(oe), .f(of_), .cfg(ui.pe),
    .r(res), .s1_pos, .r_pos
  );

  // Same KMB as the one the R bank offers to the PE.
  assign kmb = (word_t'(cfg.search_range[7:4]) + word_t'(1)) * word_t'(cfg.mb_w);

  rc_scd u_scd (
    .clk, .rst, .frame_start, .ftype_in(ftype), .ftype(cur_ftype),
    .det_en, .det_hit(r_pos), .mbcnt(regs[R_MBCNT]), .kmb, .mbw(word_t'(cfg.mb_w)), .det_row,
    .sc_cur, .sc_prev(), .forced, .sc_event()
  );

  assign qp           = regs[R_QP][4:0];
  assign frame_qp     = regs[R_QPF][4:0];
  assign target_bits  = regs[R_THAT][31:0];
  assign buffer_bits  = regs[R_B][31:0];
  assign n_skip       = regs[R_NSKIP][15:0];
  assign scene_change = sc_cur;
endmodule
