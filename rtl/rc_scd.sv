// Scene change detection and handling state.
//
// A scene change is declared when, in a P frame, the share of intra MBs in row k
// exceeds the threshold tau, k = SR/16 + 1 (SR: search range of the motion
// estimation). Row k is the first row whose MBs find their reference inside the
// picture whatever the vertical motion, so downward global motion cannot fake a cut.
// This block marks row k (det_row, for the intra MB counter); the ratio itself is
// formed by the PE; this block decides whether a test counts and holds the result:
//   - the test is taken once per frame, when the last MB of row k has been coded
//     (MB counter = KMB - 1, KMB = k * MBs per row), and only in P frames;
//   - no test is taken in the frame following a scene change frame;
//   - after a scene change, the rest of that frame and the first k rows of the next
//     frame are forced intra (output forced, for the MB whose index is mbcnt).
// Flags move on at frame_start: the current frame's flag becomes the previous
// frame's. Synchronous active-high reset clears both. The detection rules follow the
// algorithm; the frame_start timing and the I-frame exclusion are this design's.
module rc_scd
  import rc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   frame_start,  // frame layer start, with the new frame type on ftype_in
  input  ftype_e ftype_in,
  input  ftype_e ftype,        // type of the frame being coded
  input  logic   det_en,       // the PE holds the ratio test of the MB just coded
  input  logic   det_hit,      // intra ratio above tau
  input  word_t  mbcnt,        // MBs of the frame coded before the current one
  input  word_t  kmb,
  input  word_t  mbw,          // MBs per row
  output logic   det_row,      // current MB lies in row k
  output logic   sc_cur,       // scene change detected in this frame
  output logic   sc_prev,      // previous frame was a scene change frame
  output logic   forced,       // current MB is forced intra
  output logic   sc_event      // one-cycle pulse on a detection
);
  logic test_now;

  always_comb begin
    test_now = det_en && (ftype == FT_P) && !sc_prev && !sc_cur && (mbcnt == kmb - word_t'(1));
    sc_event = test_now && det_hit;
    forced   = (ftype == FT_P) && (sc_cur || (sc_prev && (mbcnt < kmb)));
    det_row  = (mbcnt >= kmb - mbw) && (mbcnt < kmb);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sc_cur  <= 1'b0;
      sc_prev <= 1'b0;
    end else if (frame_start) begin
      sc_prev <= sc_cur && (ftype_in == FT_P);
      sc_cur  <= 1'b0;
    end else if (sc_event) begin
      sc_cur <= 1'b1;
    end
  end
endmodule
