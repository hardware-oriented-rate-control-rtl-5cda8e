// End-to-end test of the rate controller at its default size (CIF, 396 MBs per frame).
//
// A small encoder model drives the controller through a sequence of frames exactly as
// an encoder would: frame layer at the start of each frame, MB layer and update for
// each of the 396 MBs, frame skip at the end, and no calls at all for frames the
// controller says to skip. The encoder's MB bit counts come from a synthetic rate
// model whose complexity changes at scene cuts, so the controller runs closed-loop.
//
// Alongside, a reference model written directly from the algorithm's equations (frame
// budget, I-frame QP table, MB quantiser equation, model update, scene change rules,
// buffer and skipping) keeps its own copy of every state value and predicts each
// output; the testbench compares target bits, I-frame QP, MB QP and mode, frames to
// skip and buffer fullness, and checks that every stage keeps busy high for its
// documented number of cycles (6, 9, 11, 3).
//
// Sequence: IPPP with GOP length 12, 48 source frames. At frame 20 the scene cuts to a
// much busier one and the next frames are badly predicted too (source frames 20-22),
// so the coded frame after the scene change frame looks like a cut again and its
// detection must be suppressed; a further cut follows at frame 40. Each mechanism is
// counted; one that never occurs is a failure.
module tb_rc_top;
  import rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;

  rc_cfg_t cfg;
  logic start;
  stage_e stage;
  ftype_e ftype;
  logic [15:0] mae, mb_bits, hdr_bits;
  logic busy, done, mb_intra, scene_change;
  logic [4:0] qp, frame_qp;
  logic [31:0] target_bits, buffer_bits;
  logic [15:0] n_skip;

  rc_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // ------------------------------------------------------------------ reference model
  localparam int NMB = 396, MBW = 22;
  longint m_mu, m_theta, m_qpi, m_ti, m_b, m_that, m_tr, m_fbits, m_sacc, m_alpha;
  longint m_smaep, m_smaec, m_avgp, m_mbcnt, m_imbc, m_qpf, m_qp, m_nskip;
  bit     m_intra, m_sc, m_scprev, m_isI;
  longint kmb;

  function automatic longint clipqp(input longint v);
    return v < 1 ? 1 : (v > 31 ? 31 : v);
  endfunction
  // F(kappa) from the breakpoints 4, 2, 1.5, 1.25, 0.875, 0.75, 0.625 (kappa in Q8)
  function automatic longint fk(input longint k);
    real x;
    x = real'(k) / 256.0;
    if (x >= 4.0)   return -4;
    if (x >= 2.0)   return -3;
    if (x >= 1.5)   return -2;
    if (x >= 1.25)  return -1;
    if (x >= 0.875) return 0;
    if (x >= 0.75)  return 1;
    if (x >= 0.625) return 2;
    return 4;
  endfunction
  function automatic longint sdiv(input longint n, input longint d);
    return (d <= 0) ? 64'sh3FFF_FFFF_FFFF : n / d;
  endfunction
  // QP whose quantiser step 2*QP is nearest to sqrt(qsq)
  function automatic longint qp_of(input longint qsq);
    real r;
    if (qsq <= 0) return 1;
    r = $sqrt(real'(qsq)) / 2.0;
    return clipqp(longint'($floor(r + 0.5)));
  endfunction

  task automatic ref_frame(input bit isI);
    m_isI = isI;
    m_scprev = m_sc && !isI;
    m_sc = 0;
    m_fbits = 0; m_smaec = 0; m_mbcnt = 0; m_imbc = 0;
    if (isI) m_sacc = 0;
    // alpha_v = rho_v * L / (rho_I + (L-1) rho_P), Q8
    if (cfg.gop_len == 0) m_alpha = longint'(isI ? cfg.rho_i : cfg.rho_p);
    else m_alpha = ((longint'(isI ? cfg.rho_i : cfg.rho_p) * cfg.gop_len) * 256) /
                   (longint'(cfg.rho_i) + longint'(cfg.gop_len - 1) * cfg.rho_p);
    // T^ = BR*alpha + (B^f - B)/4 with B^f = B^i + BR*sum(alpha-1)
    m_that = ((longint'(cfg.br) * m_alpha) >>> 8) +
             ((((longint'(cfg.br) * m_sacc) >>> 8) - m_b) >>> 2) + (longint'(cfg.buf_size) >> 5);
    m_tr = m_that;
    if (isI) m_qpf = clipqp(m_qpi + fk(sdiv(m_that * 256, m_ti)));
    m_avgp = m_smaep / NMB;
  endtask

  task automatic ref_mb(input longint mae_i);
    longint den, srem, qsq, nr;
    bit forced;
    nr = NMB - m_mbcnt;
    den = m_tr - ((nr * m_theta) >>> 4);
    srem = nr * m_avgp + mae_i - m_avgp;
    qsq = sdiv((((m_mu * mae_i) >>> 8) * srem) >>> 8, den);
    forced = !m_isI && (m_sc || (m_scprev && m_mbcnt < kmb));
    if (m_isI) m_qp = m_qpf;
    else if (forced) m_qp = clipqp(m_qpi + 2);
    else m_qp = qp_of(qsq);
    m_intra = m_isI || forced || (mae_i > cfg.mae_intra_th);
  endtask

  task automatic ref_upd(input longint mae_i, input longint bits, input longint hb);
    longint q2, mui;
    m_b += bits;
    m_fbits += bits;
    m_tr -= bits;
    if (m_intra && m_mbcnt >= kmb - MBW && m_mbcnt < kmb) m_imbc++;
    if (m_mbcnt == NMB - 1 && cfg.gop_len != 0) m_sacc = m_sacc + m_alpha - 256;
    m_smaec += mae_i;
    if (!m_isI && !m_intra && mae_i > 0) begin
      m_theta = m_theta + ((hb * 16 - m_theta) >>> 3);
      q2 = 4 * m_qp * m_qp;
      mui = ((bits - hb) * q2 * 256) / mae_i;
      if (mui < 0) mui = 0;
      mui = (mui * 256) / mae_i;
      m_mu = m_mu + ((mui - m_mu) >>> 3);
    end
    if (!m_isI && !m_scprev && !m_sc && m_mbcnt == kmb - 1 &&
        ((m_imbc * 256) / MBW) > cfg.tau) m_sc = 1;
    m_mbcnt++;
  endtask

  task automatic ref_skip();
    longint x;
    x = m_b - cfg.buf_size;
    m_nskip = (x > 0) ? (x - 1) / cfg.br : 0;
    m_b = m_b - (m_nskip + 1) * cfg.br;
    if (m_b < 0) m_b = 0;
    if (m_isI) begin m_qpi = m_qpf; m_ti = m_fbits; end
    else m_smaep = m_smaec;
    if (m_sc) begin
      m_qpi = clipqp(clipqp(m_qpi + 2) + fk(sdiv(m_that * 256, m_fbits)));
      m_ti = m_that;
    end
  endtask

  // ------------------------------------------------------------------ stage driver
  int stage_len_bad = 0;
  task automatic run_stage(input stage_e s, input ftype_e ft, input int exp_len);
    int n;
    @(negedge clk);
    start = 1'b1; stage = s; ftype = ft;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (busy) begin
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != exp_len || !done) begin
      failures++;
      $display("FAIL stage %s busy for %0d cycles, expected %0d (done=%0b)", s.name(), n, exp_len, done);
    end
  endtask

  // ------------------------------------------------------------------ encoder model
  int n_iqp_change = 0, n_eq3 = 0, n_forced = 0, n_scdet = 0, n_sc_suppressed = 0;
  int n_skipframes = 0, n_thr_intra = 0, n_qpmax = 0, n_gop = 0, n_frames = 0, n_nogop = 0;

  function automatic int scene_of(input int f);
    // scene cuts at frames 20, 21 and 40
    if (f < 20) return 0;
    if (f < 21) return 1;
    if (f < 40) return 2;
    return 3;
  endfunction

  initial begin
    int f, skip_left, sc_cnt_before;
    longint lm, bits, hb, k, cmae;
    bit isI, high_ratio;
    cfg = '0;
    cfg.br           = 32'd33333;      // 1 Mbit/s at 30 frames/s
    cfg.gop_len      = 16'd12;
    cfg.rho_i        = 16'd768;        // 3.0
    cfg.rho_p        = 16'd256;        // 1.0
    cfg.buf_size     = 32'd66666;
    cfg.n_mb         = 16'(NMB);
    cfg.mb_w         = 8'(MBW);
    cfg.search_range = 8'd16;          // k = 2 rows
    cfg.tau          = 9'd128;         // half of the MBs of the first k rows
    cfg.mae_intra_th = 16'd320;        // MAE 20.0
    cfg.init_mu      = 32'd61440;      // mu = 240
    cfg.init_theta   = 16'd240;        // 15 bits
    cfg.init_qpi     = 5'd12;
    cfg.init_ti      = 32'd80000;
    cfg.init_smae    = 32'(NMB * 80);
    kmb = (cfg.search_range / 16 + 1) * MBW;
    start = 0; stage = ST_FRAME; ftype = FT_I; mae = 0; mb_bits = 0; hdr_bits = 0;
    m_mu = cfg.init_mu; m_theta = cfg.init_theta; m_qpi = cfg.init_qpi; m_ti = cfg.init_ti;
    m_smaep = cfg.init_smae; m_b = 0; m_sacc = 0; m_sc = 0; m_scprev = 0; m_qp = cfg.init_qpi;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    skip_left = 0;
    for (f = 0; f < 48; f++) begin
      if (skip_left > 0) begin
        skip_left--;
        continue;
      end
      isI = (f % 12) == 0;
      n_frames++;
      if (isI && f > 0) n_gop++;
      ref_frame(isI);
      run_stage(ST_FRAME, isI ? FT_I : FT_P, LEN_FRAME);
      check("target_bits", longint'(signed'(target_bits)), m_that);
      if (isI) begin
        check("frame_qp", frame_qp, m_qpf);
        if (m_qpf != m_qpi) n_iqp_change++;
      end
      sc_cnt_before = n_scdet;
      high_ratio = 0;
      for (int i = 0; i < NMB; i++) begin
        // MAE: scene 0 calm, scenes 1-3 busy; the frame right after each cut is
        // badly predicted (large MAE) except where forced intra would catch it
        case (scene_of(f))
          0: lm = 48 + $urandom_range(0, 40);
          1: lm = 200 + $urandom_range(0, 80);
          2: lm = 90 + $urandom_range(0, 60);
          default: lm = 120 + $urandom_range(0, 60);
        endcase
        if (f == 20 || f == 21 || f == 22 || f == 40) lm = 340 + $urandom_range(0, 200);
        if (f == 3 && i == 5) lm = 0;   // a perfect match: no model update
        mae = 16'(lm);
        ref_mb(lm);
        run_stage(ST_MB, isI ? FT_I : FT_P, LEN_MB);
        check("mb_qp", qp, m_qp);
        check("mb_intra", mb_intra, m_intra);
        if (!isI && !m_intra) n_eq3++;
        if (!isI && m_intra && lm <= cfg.mae_intra_th) n_forced++;
        if (!isI && lm > cfg.mae_intra_th && !(m_sc || m_scprev)) n_thr_intra++;
        if (m_qp == 31) n_qpmax++;
        // encoder: bits from a model with a per-scene complexity
        k = 180 + 60 * scene_of(f);
        hb = 8 + $urandom_range(0, 16);
        cmae = lm;
        if (m_intra) bits = hb + 60 + (k * cmae * cmae) / (256 * 8 * longint'(qp) * qp);
        else         bits = hb + (k * cmae * cmae) / (256 * 4 * longint'(qp) * qp);
        if (bits > 60000) bits = 60000;
        mb_bits = 16'(bits); hdr_bits = 16'(hb);
        ref_upd(lm, bits, hb);
        run_stage(ST_UPD, isI ? FT_I : FT_P, LEN_UPD);
        check("scene_change", scene_change, m_sc);
        if (i == kmb - 1 && !isI && m_scprev && m_imbc * 256 / MBW > cfg.tau) high_ratio = 1;
      end
      if (m_sc) n_scdet++;
      if (high_ratio) n_sc_suppressed++;
      ref_skip();
      run_stage(ST_SKIP, isI ? FT_I : FT_P, LEN_SKIP);
      check("n_skip", n_skip, m_nskip);
      check("buffer_bits", buffer_bits, m_b);
      check("qp_i", dut.u_rbank.rf[R_QPI], m_qpi);
      check("mu", dut.u_rbank.rf[R_MU], m_mu);
      if (m_nskip > 0) n_skipframes++;
      skip_left = int'(m_nskip);
      $display("frame %0d %s target=%0d bits=%0d buffer=%0d qpI=%0d mu=%0d theta=%0d sc=%0b skip=%0d",
               f, isI ? "I" : "P", m_that, m_fbits, m_b, m_qpi, m_mu, m_theta, m_sc, m_nskip);
    end

    $display("frames=%0d I-QP changes=%0d eq3 MBs=%0d forced intra=%0d scene changes=%0d",
             n_frames, n_iqp_change, n_eq3, n_forced, n_scdet);
    $display("suppressed detections=%0d skip events=%0d threshold intra=%0d QP=31 MBs=%0d new GOPs=%0d",
             n_sc_suppressed, n_skipframes, n_thr_intra, n_qpmax, n_gop);
    checks++; if (n_iqp_change == 0)   begin failures++; $display("FAIL no I-frame QP change"); end
    checks++; if (n_eq3 == 0)          begin failures++; $display("FAIL no MB QP from the model"); end
    checks++; if (n_forced == 0)       begin failures++; $display("FAIL no forced intra MB"); end
    checks++; if (n_scdet < 2)         begin failures++; $display("FAIL fewer than two scene changes"); end
    checks++; if (n_sc_suppressed == 0) begin failures++; $display("FAIL no suppressed detection"); end
    checks++; if (n_skipframes == 0)   begin failures++; $display("FAIL no frame skip"); end
    checks++; if (n_thr_intra == 0)    begin failures++; $display("FAIL no MAE-threshold intra MB"); end
    checks++; if (n_gop == 0)          begin failures++; $display("FAIL no second GOP"); end

    // second run: no GOP structure, one I frame followed by P frames only
    cfg.gop_len = 16'd0;
    start = 0; stage = ST_FRAME; ftype = FT_I; mae = 0; mb_bits = 0; hdr_bits = 0;
    m_mu = cfg.init_mu; m_theta = cfg.init_theta; m_qpi = cfg.init_qpi; m_ti = cfg.init_ti;
    m_smaep = cfg.init_smae; m_b = 0; m_sacc = 0; m_sc = 0; m_scprev = 0; m_qp = cfg.init_qpi;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    skip_left = 0;
    for (f = 0; f < 12; f++) begin
      if (skip_left > 0) begin
        skip_left--;
        continue;
      end
      isI = (f == 0);
      ref_frame(isI);
      run_stage(ST_FRAME, isI ? FT_I : FT_P, LEN_FRAME);
      check("target_bits", longint'(signed'(target_bits)), m_that);
      if (isI) check("frame_qp", frame_qp, m_qpf);
      for (int i = 0; i < NMB; i++) begin
        lm = 60 + $urandom_range(0, 60);
        mae = 16'(lm);
        ref_mb(lm);
        run_stage(ST_MB, isI ? FT_I : FT_P, LEN_MB);
        check("mb_qp", qp, m_qp);
        check("mb_intra", mb_intra, m_intra);
        hb = 8 + $urandom_range(0, 16);
        if (m_intra) bits = hb + 60 + (200 * lm * lm) / (256 * 8 * longint'(qp) * qp);
        else         bits = hb + (200 * lm * lm) / (256 * 4 * longint'(qp) * qp);
        if (bits > 60000) bits = 60000;
        mb_bits = 16'(bits); hdr_bits = 16'(hb);
        ref_upd(lm, bits, hb);
        run_stage(ST_UPD, isI ? FT_I : FT_P, LEN_UPD);
        check("scene_change", scene_change, m_sc);
      end
      ref_skip();
      run_stage(ST_SKIP, isI ? FT_I : FT_P, LEN_SKIP);
      check("n_skip", n_skip, m_nskip);
      check("buffer_bits", buffer_bits, m_b);
      check("sacc", dut.u_rbank.rf[R_SACC], 0);
      if (!isI) n_nogop++;
      skip_left = int'(m_nskip);
      $display("no-GOP frame %0d %s target=%0d bits=%0d buffer=%0d skip=%0d",
               f, isI ? "I" : "P", m_that, m_fbits, m_b, m_nskip);
    end
    checks++; if (n_nogop == 0)        begin failures++; $display("FAIL no frame without GOP structure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
