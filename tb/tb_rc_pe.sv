// Test of the processing element.
// Directed cases for each feature (add/subtract, square, shifts, the three second-adder
// forms, division with and without shift, division by zero or a negative divisor, the
// F(kappa) and sqrt-QP tables, both clamps, the sign flags), then 20000 random
// configurations with operands small enough that a 64-bit reference is exact. The
// reference evaluates the PE's published chain with plain integer arithmetic and
// its own table functions. Combinational block.
module tb_rc_pe;
  import rc_pkg::*;
  word_t a, b, c, d, e, f, r;
  pe_cfg_t cfg;
  logic s1_pos, r_pos;
  int checks = 0, failures = 0;

  rc_pe dut (.*);

  function automatic longint fk(input longint k);
    if (k >= 1024) return -4;
    if (k >= 512)  return -3;
    if (k >= 384)  return -2;
    if (k >= 320)  return -1;
    if (k >= 224)  return 0;
    if (k >= 192)  return 1;
    if (k >= 160)  return 2;
    return 4;
  endfunction
  function automatic longint sq(input longint v);
    longint r2;
    if (v <= 0) return 1;
    r2 = longint'($floor($sqrt(real'(v)) / 2.0 + 0.5));
    return r2 < 1 ? 1 : (r2 > 31 ? 31 : r2);
  endfunction

  task automatic expect_r(input longint ea, eb, ec, ed, ee, ef, output longint res, output bit s1p);
    longint s1, p, s2, q, g, s3;
    s1 = cfg.sub1 ? ea - eb : ea + eb;
    p  = ((cfg.sq ? s1 : ec) * s1) >>> cfg.msh;
    case (cfg.op2)
      A2_SUB:  s2 = p - ed;
      A2_RSUB: s2 = ed - p;
      default: s2 = p + ed;
    endcase
    if (cfg.div) q = (ee <= 0) ? 64'sh3FFF_FFFF_FFFF : (s2 <<< cfg.dsh) / ee;
    else         q = s2 >>> cfg.dsh;
    case (cfg.post)
      PO_FKAPPA: g = fk(q);
      PO_SQRTQP: g = sq(q);
      default:   g = q;
    endcase
    s3 = cfg.sub3 ? g - ef : g + ef;
    case (cfg.clamp)
      CL_ZERO: res = s3 < 0 ? 0 : s3;
      CL_QP:   res = s3 < 1 ? 1 : (s3 > 31 ? 31 : s3);
      default: res = s3;
    endcase
    s1p = s1 > 0;
  endtask

  task automatic run(input string name);
    longint er;
    bit es1;
    #1;
    expect_r(a, b, c, d, e, f, er, es1);
    checks++;
    if (longint'(r) != er || s1_pos != es1 || r_pos != (er > 0)) begin
      failures++;
      if (failures < 20) $display("FAIL %s: r=%0d expected %0d s1_pos=%0b", name, r, er, s1_pos);
    end
  endtask

  task automatic set(input longint va, vb, vc, vd, ve, vf);
    a = word_t'(va); b = word_t'(vb); c = word_t'(vc); d = word_t'(vd); e = word_t'(ve); f = word_t'(vf);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    // a + b, pass-through
    set(100, 23, 1, 0, 1, 0); run("add");
    checks++; if (r != 123) failures++;
    cfg.sub1 = 1; set(100, 23, 1, 0, 1, 0); run("sub");
    checks++; if (r != 77) failures++;
    // (L-1)*rho_P + rho_I
    cfg = '0; cfg.sub1 = 1; set(12, 1, 256, 768, 1, 0); run("mac");
    checks++; if (r != 11 * 256 + 768) failures++;
    // square
    cfg = '0; cfg.sq = 1; set(7, 7, 0, 0, 1, 0); run("square");
    checks++; if (r != 196) failures++;
    // divide with pre-shift: rho*L*256 / sum
    cfg = '0; cfg.div = 1; cfg.dsh = 8; set(768, 0, 12, 0, 3584, 0); run("div");
    checks++; if (r != (768 * 12 * 256) / 3584) failures++;
    // divide by zero and by a negative number saturate
    set(5, 0, 1, 0, 0, 0); run("div0");
    checks++; if (r != 48'sh3FFF_FFFF_FFFF) failures++;
    set(5, 0, 1, 0, -3, 0); run("divneg");
    checks++; if (r != 48'sh3FFF_FFFF_FFFF) failures++;
    // reverse subtract and arithmetic right shift of a negative value
    cfg = '0; cfg.op2 = A2_RSUB; cfg.dsh = 2; set(10, 0, 5, 30, 1, 0); run("rsub");
    checks++; if (r != -5) failures++;
    // F(kappa) + QP_I with QP clamp: kappa = 2.0 gives -3
    cfg = '0; cfg.div = 1; cfg.dsh = 8; cfg.post = PO_FKAPPA; cfg.clamp = CL_QP;
    set(2000, 0, 1, 0, 1000, 12); run("fk");
    checks++; if (r != 9) failures++;
    set(2000, 0, 1, 0, 1000, 2); run("fk clamp low");
    checks++; if (r != 1) failures++;
    // sqrt QP: Q^2 = 400 -> Q = 20 -> QP 10
    cfg = '0; cfg.post = PO_SQRTQP; cfg.clamp = CL_QP; set(400, 0, 1, 0, 1, 0); run("sqrt");
    checks++; if (r != 10) failures++;
    // clamp at zero
    cfg = '0; cfg.sub1 = 1; cfg.clamp = CL_ZERO; set(3, 10, 1, 0, 1, 0); run("clamp0");
    checks++; if (r != 0 || r_pos) failures++;
    // random
    for (int i = 0; i < 20000; i++) begin
      cfg.sub1  = 1'($urandom);
      cfg.sq    = 1'($urandom);
      cfg.msh   = 4'($urandom_range(0, 12));
      cfg.op2   = add2_e'($urandom_range(0, 2));
      cfg.div   = 1'($urandom);
      cfg.dsh   = 4'($urandom_range(0, 8));
      cfg.post  = post_e'($urandom_range(0, 2));
      cfg.sub3  = 1'($urandom);
      cfg.clamp = clamp_e'($urandom_range(0, 2));
      set(longint'($urandom_range(0, 200000)) - 100000, longint'($urandom_range(0, 200000)) - 100000,
          longint'($urandom_range(0, 20000)) - 10000, longint'($urandom_range(0, 2000000)) - 1000000,
          longint'($urandom_range(0, 5000)) - 100, longint'($urandom_range(0, 200)) - 100);
      run("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
