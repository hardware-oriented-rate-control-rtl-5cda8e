// QP offset of the I-frame rate control.
//
// The QP of an I frame is the QP of the previous I frame plus an offset F(kappa),
// where kappa is the ratio of the bits the frame is allowed to the bits the previous
// I frame used. The offset is a step function of kappa with the breakpoints
// 4, 2, 1.5, 1.25, 0.875, 0.75 and 0.625 and the offsets -4, -3, -2, -1, 0, 1, 2
// and 4, exactly as the algorithm defines it. A larger budget lowers the QP.
//
// kappa is given in Q8 (256 = 1.0), so the breakpoints are the integers 1024, 512,
// 384, 320, 224, 192 and 160. Purely combinational: seven comparators and a priority
// selection, no clock.
module rc_kappa_dqp
  import rc_pkg::*;
(
  input  word_t            kappa,  // Q8, may be negative
  output logic signed [3:0] dqp    // F(kappa)
);
  always_comb begin
    if      (kappa >= word_t'(1024)) dqp = -4'sd4;
    else if (kappa >= word_t'(512))  dqp = -4'sd3;
    else if (kappa >= word_t'(384))  dqp = -4'sd2;
    else if (kappa >= word_t'(320))  dqp = -4'sd1;
    else if (kappa >= word_t'(224))  dqp = 4'sd0;
    else if (kappa >= word_t'(192))  dqp = 4'sd1;
    else if (kappa >= word_t'(160))  dqp = 4'sd2;
    else                             dqp = 4'sd4;
  end
endmodule
