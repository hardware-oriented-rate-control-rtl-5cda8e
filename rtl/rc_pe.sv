// Processing element of the rate controller.
//
// One PE does all the arithmetic of the algorithm; the state machine configures it
// anew every cycle. As in the architecture it follows, it has three adders, one
// multiplier and one divider. Here they form one chain, evaluated in a single cycle:
//   s1 = a +/- b                               (adder 1)
//   p  = ((sq ? s1 : c) * s1) >>> msh          (multiplier, full 2*DW product)
//   s2 = p + d, p - d or d - p                 (adder 2)
//   q  = div ? (s2 <<< dsh) / e : s2 >>> dsh   (divider, truncating)
//   g  = q, F(q) or sqrt-QP(q)                 (small tables)
//   r  = clamp(g +/- f)                        (adder 3)
// Division by a divisor at or below zero saturates to 2^(DW-2)-1, a quarter of the
// largest word so that the third adder cannot wrap; this turns an exhausted bit
// budget into the largest QP. The clamp is either
// none, at zero from below, or to the QP range 1..31.
// The chained order, the saturation and the two tables at the divider output are
// this design's choices; the unit count is the architecture's.
// Purely combinational. Also reports whether s1 and r are above zero.
module rc_pe
  import rc_pkg::*;
(
  input  word_t   a, b, c, d, e, f,
  input  pe_cfg_t cfg,
  output word_t   r,
  output logic    s1_pos,
  output logic    r_pos
);
  localparam word_t QSAT = {2'b00, {(DW-2){1'b1}}};

  word_t s1, s2, q, g, s3;
  logic signed [2*DW-1:0] prod;
  word_t prod_sh;
  logic signed [3:0] fk;
  logic [4:0] sqp;

  rc_kappa_dqp u_fk (.kappa(q), .dqp(fk));
  rc_qp_from_qsq u_sq (.qsq(q), .qp(sqp));

  always_comb begin
    s1 = cfg.sub1 ? a - b : a + b;
    prod = (cfg.sq ? (2*DW)'(s1) : (2*DW)'(c)) * (2*DW)'(s1);
    prod_sh = word_t'(prod >>> cfg.msh);
    unique case (cfg.op2)
      A2_SUB:  s2 = prod_sh - d;
      A2_RSUB: s2 = d - prod_sh;
      default: s2 = prod_sh + d;
    endcase
    if (cfg.div) begin
      if (e <= 0) q = QSAT;
      else        q = (s2 <<< cfg.dsh) / e;
    end else begin
      q = s2 >>> cfg.dsh;
    end
    unique case (cfg.post)
      PO_FKAPPA: g = word_t'(fk);
      PO_SQRTQP: g = word_t'({1'b0, sqp});
      default:   g = q;
    endcase
    s3 = cfg.sub3 ? g - f : g + f;
    unique case (cfg.clamp)
      CL_ZERO: r = (s3 < 0) ? '0 : s3;
      CL_QP:   r = (s3 < word_t'(QP_MIN)) ? word_t'(QP_MIN) :
                   (s3 > word_t'(QP_MAX)) ? word_t'(QP_MAX) : s3;
      default: r = s3;
    endcase
    s1_pos = (s1 > 0);
    r_pos  = (r > 0);
  end
endmodule
