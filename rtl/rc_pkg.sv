// Shared types and constants of the MB-level rate controller.
//
// The controller is built around one time-shared processing element (PE) that is
// fed from a register bank (R bank) by a micro-programmed state machine. This
// package holds what those three parts agree on: the data width, the register
// map of the bank, the operand sources the PE can read, and the format of one
// micro-instruction. The four stage lengths (6, 9, 11 and 3 cycles) and the
// QP range 1..31 come from the algorithm's description; the data width, the
// fixed-point formats and the encodings are this design's own choices.
//
// Fixed-point formats used throughout:
//   rho_i, rho_p, alpha, SACC, kappa ....... Q8 (256 = 1.0)
//   MAE (per-pixel mean absolute error) .... Q4 (16 = 1.0)
//   theta (bits per MB overhead) ........... Q4
//   mu (rate model slope) .................. Q8
package rc_pkg;

  // Width of every register and of the PE datapath.
  parameter int unsigned DW = 48;

  // H.263 quantiser parameter range; the quantiser step is Q = 2*QP.
  parameter int unsigned QP_MIN = 1;
  parameter int unsigned QP_MAX = 31;

  // Stage lengths in clock cycles.
  parameter int unsigned LEN_FRAME = 6;
  parameter int unsigned LEN_MB    = 9;
  parameter int unsigned LEN_UPD   = 11;
  parameter int unsigned LEN_SKIP  = 3;

  typedef logic signed [DW-1:0] word_t;

  // The four stages of the algorithm, selected by the encoder with a start pulse.
  typedef enum logic [1:0] {
    ST_FRAME = 2'd0,   // frame layer bit allocation and I-frame QP
    ST_MB    = 2'd1,   // MB layer QP and coding mode
    ST_UPD   = 2'd2,   // model update and scene change detection
    ST_SKIP  = 2'd3    // buffer drain and frame skipping
  } stage_e;

  typedef enum logic { FT_I = 1'b0, FT_P = 1'b1 } ftype_e;

  // Register map of the R bank. The first four are the model registers (M Reg),
  // the rest are statistics and scratch registers (S Reg).
  typedef enum logic [4:0] {
    R_MU    = 5'd0,   // rate model slope, Q8
    R_THETA = 5'd1,   // rate model overhead per MB, Q4 bits
    R_QPI   = 5'd2,   // QP of the previously coded I frame
    R_TI    = 5'd3,   // bits of the previously coded I frame
    R_B     = 5'd4,   // buffer fullness, bits
    R_THAT  = 5'd5,   // target bits of the current frame
    R_TR    = 5'd6,   // target bits left in the current frame
    R_FBITS = 5'd7,   // bits spent so far in the current frame
    R_SACC  = 5'd8,   // sum of (alpha_v - 1) over the frames coded in the GOP, Q8
    R_ALPHA = 5'd9,   // alpha of the current frame type, Q8
    R_SMAEP = 5'd10,  // MAE sum of the previous P frame, Q4
    R_SMAEC = 5'd11,  // MAE sum of the current frame so far, Q4
    R_AVGP  = 5'd12,  // average MB MAE of the previous P frame, Q4
    R_MBCNT = 5'd13,  // MBs coded so far in the current frame
    R_IMBC  = 5'd14,  // intra MBs coded in row k (the detection row) of the frame
    R_QPF   = 5'd15,  // frame QP of the current I frame
    R_QP    = 5'd16,  // QP of the current MB
    R_MAE   = 5'd17,  // MAE of the current MB, Q4 (loaded at MB start)
    R_BITS  = 5'd18,  // bits of the MB just coded (loaded at update start)
    R_HBITS = 5'd19,  // header bits of the MB just coded (loaded at update start)
    R_NSKIP = 5'd20,  // frames to skip after the current frame
    R_T0    = 5'd21,  // scratch
    R_T1    = 5'd22,  // scratch
    R_T2    = 5'd23   // scratch
  } reg_e;

  parameter int unsigned NREG = 24;

  // Operand sources. Codes below 32 read the R bank register of the same number;
  // the others are constants and configuration values.
  typedef enum logic [5:0] {
    S_MU = 6'd0, S_THETA = 6'd1, S_QPI = 6'd2, S_TI = 6'd3, S_B = 6'd4, S_THAT = 6'd5,
    S_TR = 6'd6, S_FBITS = 6'd7, S_SACC = 6'd8, S_ALPHA = 6'd9, S_SMAEP = 6'd10,
    S_SMAEC = 6'd11, S_AVGP = 6'd12, S_MBCNT = 6'd13, S_IMBC = 6'd14, S_QPF = 6'd15,
    S_QP = 6'd16, S_MAE = 6'd17, S_BITS = 6'd18, S_HBITS = 6'd19, S_NSKIP = 6'd20,
    S_T0 = 6'd21, S_T1 = 6'd22, S_T2 = 6'd23,
    S_ZERO  = 6'd32,
    S_ONE   = 6'd33,
    S_IMM   = 6'd34,  // immediate field of the micro-instruction
    S_BR    = 6'd35,  // target bits per frame
    S_L     = 6'd36,  // GOP length
    S_RHOI  = 6'd37,  // rho_I, Q8
    S_RHOP  = 6'd38,  // rho_P, Q8
    S_RHOV  = 6'd39,  // rho of the current frame type, Q8
    S_BUFSZ = 6'd40,  // buffer size, bits
    S_BI4   = 6'd41,  // B^i / 4 = buffer size / 32
    S_NMB   = 6'd42,  // MBs per frame
    S_KMB   = 6'd43,  // MBs in the first k rows, k = SR/16 + 1
    S_TAU   = 6'd44,  // scene change threshold on the intra MB ratio, Q8
    S_MAETH = 6'd45,  // MAE above which an MB is coded intra, Q4
    S_QPS   = 6'd46,  // QP of forced intra MBs, QP_I + 2 clipped
    S_MBW   = 6'd47   // MBs per row
  } src_e;

  // Second adder of the PE: s2 = p + d, p - d or d - p.
  typedef enum logic [1:0] { A2_ADD = 2'd0, A2_SUB = 2'd1, A2_RSUB = 2'd2 } add2_e;

  // Function applied to the divider output before the third adder.
  typedef enum logic [1:0] { PO_NONE = 2'd0, PO_FKAPPA = 2'd1, PO_SQRTQP = 2'd2 } post_e;

  // Clamp applied to the PE result.
  typedef enum logic [1:0] { CL_NONE = 2'd0, CL_ZERO = 2'd1, CL_QP = 2'd2 } clamp_e;

  // Configuration of the PE for one cycle. The PE computes
  //   s1 = a +/- b
  //   p  = ((sq ? s1 : c) * s1) >>> msh
  //   s2 = p + d | p - d | d - p
  //   q  = div ? (s2 <<< dsh) / e : s2 >>> dsh
  //   s3 = post(q) +/- f, then clamped
  typedef struct packed {
    logic   sub1;
    logic   sq;
    logic [3:0] msh;
    add2_e  op2;
    logic   div;
    logic [3:0] dsh;
    post_e  post;
    logic   sub3;
    clamp_e clamp;
  } pe_cfg_t;

  // Conditions under which a write or a move takes effect.
  typedef enum logic [3:0] {
    C_NEVER   = 4'd0,
    C_ALWAYS  = 4'd1,
    C_I       = 4'd2,   // I frame
    C_P       = 4'd3,   // P frame
    C_PNF     = 4'd4,   // P frame, MB not forced intra
    C_FORCED  = 4'd5,   // P frame, MB forced intra (scene change region)
    C_UPD     = 4'd6,   // P frame, inter MB with MAE > 0: model update allowed
    C_S1POS   = 4'd7,   // first adder result above zero
    C_SC      = 4'd8,   // scene change detected in the current frame
    C_LASTMB  = 4'd9,   // last MB of the frame, GOP structure present
    C_GOP     = 4'd10,  // GOP structure present (GOP length above zero)
    C_NOGOP   = 4'd11   // no GOP structure (GOP length zero)
  } cond_e;

  // Side actions of the state machine, one bit each.
  typedef struct packed {
    logic inc_imbc;  // count the MB in the intra counter if it was intra
    logic inc_mb;    // count the MB as coded
    logic sc_det;    // evaluate scene change detection with the PE result
    logic mode;      // decide the MB mode with the PE result
  } act_t;

  // One micro-instruction: the PE operation, up to two destinations of its result,
  // two independent register moves and the side actions.
  typedef struct packed {
    src_e    a, b, c, d, e, f;
    pe_cfg_t pe;
    reg_e    dst0;
    logic    dst0_en;
    reg_e    dst1;
    logic    dst1_en;
    cond_e   cond;
    src_e    mva_src;
    reg_e    mva_dst;
    cond_e   mva_cond;
    src_e    mvb_src;
    reg_e    mvb_dst;
    cond_e   mvb_cond;
    logic [15:0] imm;
    act_t    act;
  } uinstr_t;

  // Configuration of the controller, set by the host before coding.
  typedef struct packed {
    logic [31:0] br;           // target bits per frame (bitrate / frame rate)
    logic [15:0] gop_len;      // L, distance between I frames; 0: no GOP structure
    logic [15:0] rho_i;        // Q8
    logic [15:0] rho_p;        // Q8
    logic [31:0] buf_size;     // bits
    logic [15:0] n_mb;         // MBs per frame
    logic [7:0]  mb_w;         // MBs per row
    logic [7:0]  search_range; // SR of the motion estimation, pixels
    logic [8:0]  tau;          // intra MB ratio threshold, Q8
    logic [15:0] mae_intra_th; // Q4
    logic [31:0] init_mu;      // reset value of mu, Q8
    logic [15:0] init_theta;   // reset value of theta, Q4
    logic [4:0]  init_qpi;     // reset value of QP_I
    logic [31:0] init_ti;      // reset value of T_I
    logic [31:0] init_smae;    // reset value of the previous-frame MAE sum, Q4
  } rc_cfg_t;

endpackage
