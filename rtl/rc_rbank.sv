// Register bank (R bank) of the rate controller.
//
// Holds the model parameters (M Reg: mu, theta, QP_I, T_I) and the statistics and
// scratch values (S Reg) listed in rc_pkg::reg_e, 24 words of DW bits; it is made of
// flip-flops, not a memory macro. It also selects the six PE operands: an operand
// code below 32 reads the register of that number, the other codes give constants,
// the instruction's immediate or a configuration value (see rc_pkg::src_e). The
// derived configuration values are formed here: B^i/4 = buffer size/32, the number
// of MBs in the first k = SR/16 + 1 rows, rho of the current frame type, and the
// forced-intra QP, QP_I + 2 clipped to 31.
//
// Writes, all on the rising clock edge, lowest priority first:
//   two move ports (mva, mvb), copying any source to a register;
//   two PE result ports (w0, w1), carrying the same PE result;
//   the load port, which latches MAE, bits and header bits from the encoder;
//   the frame-start clear of the per-frame counters, and of SACC when an I frame
//   starts a new GOP;
//   the MB and intra-MB counter increments.
// Synchronous active-high reset loads the M Reg from the configuration and clears
// the S Reg, except the previous-frame MAE sum and its average, which start from the
// configured value. The reset values and the write priority are this design's own.
module rc_rbank
  import rc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  rc_cfg_t  cfg,
  input  ftype_e   ftype,
  // operand read
  input  src_e     sa, sb, sc, sd, se, sf,
  input  logic [15:0] imm,
  output word_t    oa, ob, oc, od, oe, of_,
  // PE result write
  input  word_t    wdata,
  input  logic     w0_en, w1_en,
  input  reg_e     w0_reg, w1_reg,
  // moves
  input  logic     mva_en, mvb_en,
  input  src_e     mva_src, mvb_src,
  input  reg_e     mva_dst, mvb_dst,
  // encoder inputs
  input  logic     ld_mae, ld_bits,
  input  logic [15:0] mae,
  input  logic [15:0] bits,
  input  logic [15:0] hbits,
  // frame start and counters
  input  logic     clr_frame,
  input  logic     clr_sacc,
  input  logic     inc_mb,
  input  logic     inc_imbc,
  // direct views for the controller and the outputs
  output word_t    regs_o [NREG]
);
  word_t rf [NREG];

  word_t qps, kmb;

  always_comb begin
    kmb   = (word_t'(cfg.search_range[7:4]) + word_t'(1)) * word_t'(cfg.mb_w);
    qps   = rf[R_QPI] + word_t'(2);
    if (qps > word_t'(QP_MAX)) qps = word_t'(QP_MAX);
  end

  function automatic word_t rd(input src_e s);
    if (s < S_ZERO) begin
      if (int'(s) < NREG) return rf[s[4:0]];
      return '0;
    end
    unique case (s)
      S_ZERO:  return '0;
      S_ONE:   return word_t'(1);
      S_IMM:   return word_t'(imm);
      S_BR:    return word_t'(cfg.br);
      S_L:     return word_t'(cfg.gop_len);
      S_RHOI:  return word_t'(cfg.rho_i);
      S_RHOP:  return word_t'(cfg.rho_p);
      S_RHOV:  return (ftype == FT_I) ? word_t'(cfg.rho_i) : word_t'(cfg.rho_p);
      S_BUFSZ: return word_t'(cfg.buf_size);
      S_BI4:   return word_t'(cfg.buf_size[31:5]);
      S_NMB:   return word_t'(cfg.n_mb);
      S_KMB:   return kmb;
      S_TAU:   return word_t'(cfg.tau);
      S_MAETH: return word_t'(cfg.mae_intra_th);
      S_QPS:   return qps;
      S_MBW:   return word_t'(cfg.mb_w);
      default: return '0;
    endcase
  endfunction

  always_comb begin
    oa  = rd(sa);
    ob  = rd(sb);
    oc  = rd(sc);
    od  = rd(sd);
    oe  = rd(se);
    of_ = rd(sf);
  end

  word_t mva_val, mvb_val;
  always_comb begin
    mva_val = rd(mva_src);
    mvb_val = rd(mvb_src);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
      rf[R_MU]    <= word_t'(cfg.init_mu);
      rf[R_THETA] <= word_t'(cfg.init_theta);
      rf[R_QPI]   <= word_t'(cfg.init_qpi);
      rf[R_TI]    <= word_t'(cfg.init_ti);
      rf[R_SMAEP] <= word_t'(cfg.init_smae);
      rf[R_QPF]   <= word_t'(cfg.init_qpi);
      rf[R_QP]    <= word_t'(cfg.init_qpi);
    end else begin
      if (mva_en) rf[mva_dst] <= mva_val;
      if (mvb_en) rf[mvb_dst] <= mvb_val;
      if (w0_en)  rf[w0_reg]  <= wdata;
      if (w1_en)  rf[w1_reg]  <= wdata;
      if (ld_mae) rf[R_MAE]   <= word_t'(mae);
      if (ld_bits) begin
        rf[R_BITS]  <= word_t'(bits);
        rf[R_HBITS] <= word_t'(hbits);
      end
      if (clr_frame) begin
        rf[R_FBITS] <= '0;
        rf[R_SMAEC] <= '0;
        rf[R_MBCNT] <= '0;
        rf[R_IMBC]  <= '0;
        if (clr_sacc) rf[R_SACC] <= '0;
      end
      if (inc_mb)   rf[R_MBCNT] <= rf[R_MBCNT] + word_t'(1);
      if (inc_imbc) rf[R_IMBC]  <= rf[R_IMBC] + word_t'(1);
    end
  end

  always_comb begin
    for (int i = 0; i < NREG; i++) regs_o[i] = rf[i];
  end
endmodule
