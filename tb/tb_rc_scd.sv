// Test of the scene change state.
// Frame sequence I, P (cut detected at the test point), P (ratio high again, must not be
// detected; first k rows forced), P (normal), P (test taken at a wrong MB index is
// ignored, low ratio ignored), then a new cut, then an I frame after a cut. Also checks
// that only row k is marked as the detection row.
module tb_rc_scd;
  import rc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, frame_start, det_en, det_hit;
  ftype_e ftype_in, ftype;
  word_t mbcnt, kmb, mbw;
  logic sc_cur, sc_prev, forced, sc_event, det_row;
  int checks = 0, failures = 0;

  rc_scd dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic new_frame(input ftype_e t);
    @(negedge clk);
    frame_start = 1; ftype_in = t;
    @(negedge clk);
    frame_start = 0; ftype = t; mbcnt = 0;
  endtask

  task automatic test(input int at, input logic hit);
    @(negedge clk);
    mbcnt = word_t'(at); det_en = 1; det_hit = hit;
    @(negedge clk);
    det_en = 0; det_hit = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int events = 0;
    kmb = 44; mbw = 22; mbcnt = 0; det_en = 0; det_hit = 0; frame_start = 0; ftype_in = FT_I; ftype = FT_I;
    rst = 1; @(negedge clk); @(negedge clk); rst = 0;
    chk("reset cur", sc_cur, 0); chk("reset prev", sc_prev, 0);
    // I frame: no detection, never forced
    new_frame(FT_I);
    test(43, 1);
    chk("I no detect", sc_cur, 0);
    chk("I not forced", forced, 0);
    // P frame with a cut
    new_frame(FT_P);
    mbcnt = 10; #1 chk("P before cut not forced", forced, 0);
    chk("row 0 not detection row", det_row, 0);
    mbcnt = 21; #1 chk("row k-1 end not detection row", det_row, 0);
    mbcnt = 22; #1 chk("row k start", det_row, 1);
    mbcnt = 43; #1 chk("row k end", det_row, 1);
    mbcnt = 44; #1 chk("after row k", det_row, 0);
    @(negedge clk); mbcnt = 43; det_en = 1; det_hit = 1; #1;
    chk("event pulse", sc_event, 1);
    @(negedge clk); det_en = 0; det_hit = 0;
    chk("cut detected", sc_cur, 1);
    mbcnt = 44; #1 chk("rest of frame forced", forced, 1);
    mbcnt = 395; #1 chk("last MB forced", forced, 1);
    // next P frame: first k rows forced, no detection
    new_frame(FT_P);
    chk("prev set", sc_prev, 1); chk("cur cleared", sc_cur, 0);
    mbcnt = 0;  #1 chk("row 0 forced", forced, 1);
    mbcnt = 43; #1 chk("row k-1 forced", forced, 1);
    mbcnt = 44; #1 chk("row k not forced", forced, 0);
    test(43, 1);
    chk("consecutive suppressed", sc_cur, 0);
    // normal P frame
    new_frame(FT_P);
    chk("prev cleared", sc_prev, 0);
    mbcnt = 0; #1 chk("normal not forced", forced, 0);
    test(20, 1);
    chk("wrong index ignored", sc_cur, 0);
    test(43, 0);
    chk("low ratio ignored", sc_cur, 0);
    // another cut, then an I frame
    new_frame(FT_P);
    test(43, 1);
    chk("second cut", sc_cur, 1);
    new_frame(FT_I);
    chk("prev not set for I", sc_prev, 0);
    mbcnt = 0; #1 chk("I after cut not forced", forced, 0);
    new_frame(FT_P);
    test(43, 1);
    chk("detect after I", sc_cur, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
