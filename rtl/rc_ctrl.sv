// State machine of the rate controller.
//
// The encoder starts one stage at a time: it raises start for one cycle with the stage
// code (frame layer, MB layer, parameter update, frame skip) and the stage's inputs
// (the frame type, the MB's MAE, or the MB's bits and header bits). The state machine
// then steps through that stage's micro-program, one instruction per cycle: it holds
// busy high for exactly 6, 9, 11 or 3 cycles, the lengths of the stages, and raises
// done for one cycle afterwards, when the results (QP, MB mode, target bits, frames
// to skip) are valid. Each cycle it evaluates the instruction's write conditions
// (frame type, forced intra, model-update allowed, last MB, scene change, PE sign
// flags) into write enables for the register bank, and performs the side actions:
// deciding the MB mode, counting coded MBs and the intra MBs of the detection row
// (det_row), and passing the scene change
// test to the detector.
//
// Timing: start is taken in a cycle where busy is low (the edge that takes it also
// latches the stage inputs); the first instruction executes in the next cycle.
// Raising start while busy is a protocol error and is asserted against.
// The handshake and the condition set are this design's; the stage lengths and the
// start-per-stage interface follow the architecture.
module rc_ctrl
  import rc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // encoder side
  input  logic       start,
  input  stage_e     stage_in,
  input  ftype_e     ftype_in,
  output logic       busy,
  output logic       done,
  output stage_e     stage,
  output ftype_e     ftype,
  output logic       mb_intra,
  // to the register bank and the PE
  output uinstr_t    ui,
  output logic       w0_en, w1_en, mva_en, mvb_en,
  output logic       ld_mae, ld_bits,
  output logic       clr_frame, clr_sacc,
  output logic       inc_mb, inc_imbc,
  // status
  input  logic       s1_pos, r_pos,
  input  word_t      mbcnt,
  input  word_t      n_mb,
  input  word_t      mae,
  input  logic       forced,
  input  logic       sc_cur,
  input  logic       det_row,
  input  logic       no_gop,       // GOP length zero: alpha = rho, SACC stays zero
  output logic       frame_start,
  output logic       det_en,
  output logic [3:0] step
);
  logic [3:0] last_step;
  logic       take;

  rc_ucode_rom u_rom (.stage(stage), .step(step), .ui(ui), .last_step(last_step));

  assign take        = start && !busy;
  assign frame_start = take && (stage_in == ST_FRAME);
  assign ld_mae      = take && (stage_in == ST_MB);
  assign ld_bits     = take && (stage_in == ST_UPD);
  assign clr_frame   = frame_start;
  assign clr_sacc    = frame_start && (ftype_in == FT_I);

  function automatic logic cond_ok(input cond_e c);
    unique case (c)
      C_ALWAYS: return 1'b1;
      C_I:      return ftype == FT_I;
      C_P:      return ftype == FT_P;
      C_PNF:    return (ftype == FT_P) && !forced;
      C_FORCED: return (ftype == FT_P) && forced;
      C_UPD:    return (ftype == FT_P) && !mb_intra && (mae > 0);
      C_S1POS:  return s1_pos;
      C_SC:     return sc_cur;
      C_LASTMB: return (mbcnt == n_mb - word_t'(1)) && !no_gop;
      C_GOP:    return !no_gop;
      C_NOGOP:  return no_gop;
      default:  return 1'b0;
    endcase
  endfunction

  always_comb begin
    w0_en    = busy && ui.dst0_en && cond_ok(ui.cond);
    w1_en    = busy && ui.dst1_en && cond_ok(ui.cond);
    mva_en   = busy && cond_ok(ui.mva_cond);
    mvb_en   = busy && cond_ok(ui.mvb_cond);
    inc_mb   = busy && ui.act.inc_mb;
    inc_imbc = busy && ui.act.inc_imbc && mb_intra && det_row;
    det_en   = busy && ui.act.sc_det;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      step     <= '0;
      stage    <= ST_FRAME;
      ftype    <= FT_I;
      mb_intra <= 1'b1;
    end else begin
      done <= 1'b0;
      if (take) begin
        busy  <= 1'b1;
        step  <= '0;
        stage <= stage_in;
        if (stage_in == ST_FRAME) ftype <= ftype_in;
      end else if (busy) begin
        if (ui.act.mode) mb_intra <= (ftype == FT_I) || forced || r_pos;
        if (step == last_step) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 4'd1;
        end
      end
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) !(start && busy))
    else $error("start raised while a stage is running");
endmodule
