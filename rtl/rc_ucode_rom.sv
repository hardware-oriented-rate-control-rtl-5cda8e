// Micro-program of the rate controller: what the PE does in each cycle of each stage.
//
// The four stages of the algorithm run on the one PE as fixed sequences of
// micro-instructions, 6 cycles for the frame layer, 9 for the MB layer, 11 for the
// parameter update and 3 for frame skipping, the cycle counts of the architecture
// this design follows. The sequences themselves are this design's: which value is
// computed in which cycle is not published. Cycles with nothing left to compute
// are no-ops, so that every stage takes its documented length.
//
// Frame layer (frame type known):
//   0  T0    = (L-1)*rho_P + rho_I
//   1  alpha = rho_v*L*256 / T0                       alpha_v of the frame type, Q8
//            (alpha = rho_v when there is no GOP structure)
//   2  T2    = ((BR*SACC>>8) - B)/4 + B^i/4            (B^f - B)/4
//   3  THAT  = TR = BR*alpha>>8 + T2                  T^ = T^i - (B - B^f)/4
//   4  QPF   = clip(QP_I + F(THAT*256/T_I))           I frames only
//   5  AVGP  = SMAEP / N                              previous-frame average MAE
// MB layer (MAE latched):
//   0  T0    = TR - (N-MBCNT)*theta                   bits left for texture
//   1  T1    = (N-MBCNT)*AVGP + MAE - AVGP            MAE sum of the MBs left
//   2  T2    = mu*MAE>>8
//   3  T2    = clip(sqrtQP((T2*T1>>8)/T0))            Eq. 3 as a QP
//   4  QP    = QP_I+2 if forced intra, T2 for other P MBs, QPF in I frames
//   5  mode  = intra if I frame, forced, or MAE > MAE threshold
//   6..8      no-op
// Parameter update (bits and header bits latched):
//   0  B     = B + bits, count the MB if intra and in row k
//   1  FBITS = FBITS + bits
//   2  TR    = TR - bits
//   3  SACC  = SACC + alpha - 256                     last MB, with GOP structure
//   4  SMAEC = SMAEC + MAE
//   5  theta = theta + (16*hbits - theta)/8           P inter MBs only
//   6  T0    = (2*QP)^2                               Q^2
//   7  T1    = max(0, (bits-hbits)*T0*256/MAE)        P inter MBs only
//   8  T1    = max(0, T1*256/MAE)                     mu of this MB
//   9  mu    = mu + (T1 - mu)/8                       P inter MBs only
//  10  scene change test IMBC*256/MBs per row - tau > 0, count MB
// Frame skip (end of frame):
//   0  NSKIP = (B - BUFSZ - 1)/BR if B > BUFSZ else 0; I frame: QP_I = QPF
//   1  B     = max(0, B - (NSKIP+1)*BR); I: T_I = FBITS; P: SMAEP = SMAEC
//   2  scene change frame: QP_I = clip(QP_I+2 + F(THAT*256/FBITS)), T_I = THAT
// Combinational: stage and step in, instruction out.
module rc_ucode_rom
  import rc_pkg::*;
(
  input  stage_e     stage,
  input  logic [3:0] step,
  output uinstr_t    ui,
  output logic [3:0] last_step   // index of the final step of the stage
);
  localparam pe_cfg_t PE_NOP = '{sub1: 1'b0, sq: 1'b0, msh: 4'd0, op2: A2_ADD, div: 1'b0,
                                 dsh: 4'd0, post: PO_NONE, sub3: 1'b0, clamp: CL_NONE};
  localparam uinstr_t NOP = '{a: S_ZERO, b: S_ZERO, c: S_ONE, d: S_ZERO, e: S_ONE, f: S_ZERO,
                              pe: PE_NOP, dst0: R_T0, dst0_en: 1'b0, dst1: R_T0, dst1_en: 1'b0,
                              cond: C_NEVER, mva_src: S_ZERO, mva_dst: R_T0, mva_cond: C_NEVER,
                              mvb_src: S_ZERO, mvb_dst: R_T0, mvb_cond: C_NEVER, imm: 16'd0,
                              act: '0};

  always_comb begin
    unique case (stage)
      ST_FRAME: last_step = 4'(LEN_FRAME - 1);
      ST_MB:    last_step = 4'(LEN_MB - 1);
      ST_UPD:   last_step = 4'(LEN_UPD - 1);
      default:  last_step = 4'(LEN_SKIP - 1);
    endcase
  end

  always_comb begin
    ui = NOP;
    unique case (stage)
      // ---------------------------------------------------------------- frame layer
      ST_FRAME: unique case (step)
        4'd0: begin
          ui.a = S_L; ui.b = S_ONE; ui.pe.sub1 = 1'b1; ui.c = S_RHOP; ui.d = S_RHOI;
          ui.dst0 = R_T0; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd1: begin
          ui.a = S_RHOV; ui.c = S_L; ui.pe.div = 1'b1; ui.pe.dsh = 4'd8; ui.e = S_T0;
          ui.dst0 = R_ALPHA; ui.dst0_en = 1'b1; ui.cond = C_GOP;
          ui.mva_src = S_RHOV; ui.mva_dst = R_ALPHA; ui.mva_cond = C_NOGOP;
        end
        4'd2: begin
          ui.a = S_BR; ui.c = S_SACC; ui.pe.msh = 4'd8; ui.pe.op2 = A2_SUB; ui.d = S_B;
          ui.pe.dsh = 4'd2; ui.f = S_BI4;
          ui.dst0 = R_T2; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd3: begin
          ui.a = S_BR; ui.c = S_ALPHA; ui.pe.msh = 4'd8; ui.d = S_T2;
          ui.dst0 = R_THAT; ui.dst0_en = 1'b1; ui.dst1 = R_TR; ui.dst1_en = 1'b1;
          ui.cond = C_ALWAYS;
        end
        4'd4: begin
          ui.a = S_THAT; ui.pe.div = 1'b1; ui.pe.dsh = 4'd8; ui.e = S_TI;
          ui.pe.post = PO_FKAPPA; ui.f = S_QPI; ui.pe.clamp = CL_QP;
          ui.dst0 = R_QPF; ui.dst0_en = 1'b1; ui.cond = C_I;
        end
        4'd5: begin
          ui.a = S_SMAEP; ui.pe.div = 1'b1; ui.e = S_NMB;
          ui.dst0 = R_AVGP; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        default: ;
      endcase
      // ---------------------------------------------------------------- MB layer
      ST_MB: unique case (step)
        4'd0: begin
          ui.a = S_NMB; ui.b = S_MBCNT; ui.pe.sub1 = 1'b1; ui.c = S_THETA; ui.pe.msh = 4'd4;
          ui.pe.op2 = A2_RSUB; ui.d = S_TR;
          ui.dst0 = R_T0; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd1: begin
          ui.a = S_NMB; ui.b = S_MBCNT; ui.pe.sub1 = 1'b1; ui.c = S_AVGP; ui.d = S_MAE;
          ui.pe.sub3 = 1'b1; ui.f = S_AVGP;
          ui.dst0 = R_T1; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd2: begin
          ui.a = S_MU; ui.c = S_MAE; ui.pe.msh = 4'd8;
          ui.dst0 = R_T2; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd3: begin
          ui.a = S_T2; ui.c = S_T1; ui.pe.msh = 4'd8; ui.pe.div = 1'b1; ui.e = S_T0;
          ui.pe.post = PO_SQRTQP; ui.pe.clamp = CL_QP;
          ui.dst0 = R_T2; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd4: begin
          ui.a = S_QPS; ui.pe.clamp = CL_QP;
          ui.dst0 = R_QP; ui.dst0_en = 1'b1; ui.cond = C_FORCED;
          ui.mva_src = S_T2;  ui.mva_dst = R_QP; ui.mva_cond = C_PNF;
          ui.mvb_src = S_QPF; ui.mvb_dst = R_QP; ui.mvb_cond = C_I;
        end
        4'd5: begin
          ui.a = S_MAE; ui.b = S_MAETH; ui.pe.sub1 = 1'b1;
          ui.act.mode = 1'b1;
        end
        default: ;
      endcase
      // ---------------------------------------------------------------- update parameters
      ST_UPD: unique case (step)
        4'd0: begin
          ui.a = S_B; ui.b = S_BITS;
          ui.dst0 = R_B; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
          ui.act.inc_imbc = 1'b1;
        end
        4'd1: begin
          ui.a = S_FBITS; ui.b = S_BITS;
          ui.dst0 = R_FBITS; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd2: begin
          ui.a = S_TR; ui.b = S_BITS; ui.pe.sub1 = 1'b1;
          ui.dst0 = R_TR; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd3: begin
          ui.a = S_SACC; ui.b = S_ALPHA; ui.pe.op2 = A2_SUB; ui.d = S_IMM; ui.imm = 16'd256;
          ui.dst0 = R_SACC; ui.dst0_en = 1'b1; ui.cond = C_LASTMB;
        end
        4'd4: begin
          ui.a = S_SMAEC; ui.b = S_MAE;
          ui.dst0 = R_SMAEC; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd5: begin
          ui.a = S_HBITS; ui.c = S_IMM; ui.imm = 16'd16; ui.pe.op2 = A2_SUB; ui.d = S_THETA;
          ui.pe.dsh = 4'd3; ui.f = S_THETA;
          ui.dst0 = R_THETA; ui.dst0_en = 1'b1; ui.cond = C_UPD;
        end
        4'd6: begin
          ui.a = S_QP; ui.b = S_QP; ui.pe.sq = 1'b1;
          ui.dst0 = R_T0; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
        end
        4'd7: begin
          ui.a = S_BITS; ui.b = S_HBITS; ui.pe.sub1 = 1'b1; ui.c = S_T0;
          ui.pe.div = 1'b1; ui.pe.dsh = 4'd8; ui.e = S_MAE; ui.pe.clamp = CL_ZERO;
          ui.dst0 = R_T1; ui.dst0_en = 1'b1; ui.cond = C_UPD;
        end
        4'd8: begin
          ui.a = S_T1; ui.pe.div = 1'b1; ui.pe.dsh = 4'd8; ui.e = S_MAE; ui.pe.clamp = CL_ZERO;
          ui.dst0 = R_T1; ui.dst0_en = 1'b1; ui.cond = C_UPD;
        end
        4'd9: begin
          ui.a = S_T1; ui.b = S_MU; ui.pe.sub1 = 1'b1; ui.pe.dsh = 4'd3; ui.f = S_MU;
          ui.dst0 = R_MU; ui.dst0_en = 1'b1; ui.cond = C_UPD;
        end
        4'd10: begin
          ui.a = S_IMBC; ui.c = S_IMM; ui.imm = 16'd256; ui.pe.div = 1'b1; ui.e = S_MBW;
          ui.pe.sub3 = 1'b1; ui.f = S_TAU;
          ui.act.sc_det = 1'b1; ui.act.inc_mb = 1'b1;
        end
        default: ;
      endcase
      // ---------------------------------------------------------------- frame skipping
      default: unique case (step)
        4'd0: begin
          ui.a = S_B; ui.b = S_BUFSZ; ui.pe.sub1 = 1'b1; ui.pe.op2 = A2_SUB; ui.d = S_ONE;
          ui.pe.div = 1'b1; ui.e = S_BR;
          ui.dst0 = R_NSKIP; ui.dst0_en = 1'b1; ui.cond = C_S1POS;
          ui.mva_src = S_ZERO; ui.mva_dst = R_NSKIP; ui.mva_cond = C_ALWAYS;
          ui.mvb_src = S_QPF;  ui.mvb_dst = R_QPI;   ui.mvb_cond = C_I;
        end
        4'd1: begin
          ui.a = S_NSKIP; ui.b = S_ONE; ui.c = S_BR; ui.pe.op2 = A2_RSUB; ui.d = S_B;
          ui.pe.clamp = CL_ZERO;
          ui.dst0 = R_B; ui.dst0_en = 1'b1; ui.cond = C_ALWAYS;
          ui.mva_src = S_FBITS; ui.mva_dst = R_TI;    ui.mva_cond = C_I;
          ui.mvb_src = S_SMAEC; ui.mvb_dst = R_SMAEP; ui.mvb_cond = C_P;
        end
        4'd2: begin
          ui.a = S_THAT; ui.pe.div = 1'b1; ui.pe.dsh = 4'd8; ui.e = S_FBITS;
          ui.pe.post = PO_FKAPPA; ui.f = S_QPS; ui.pe.clamp = CL_QP;
          ui.dst0 = R_QPI; ui.dst0_en = 1'b1; ui.cond = C_SC;
          ui.mva_src = S_THAT; ui.mva_dst = R_TI; ui.mva_cond = C_SC;
        end
        default: ;
      endcase
    endcase
  end
endmodule
