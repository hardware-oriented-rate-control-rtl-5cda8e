// Square root of the MB quantiser equation, returned as a QP.
//
// The MB layer works out the square of the optimal quantiser step, Q*^2. The
// H.263 quantiser step is Q = 2*QP, so the QP whose step is nearest to Q* is
// found by comparing Q*^2 with the squared midpoints (2k+1)^2, k = 1..30:
//   QP = 1 + number of k with Q*^2 >= (2k+1)^2
// This gives QP in 1..31 directly; values of Q*^2 at or below 9 give 1 and values
// of 3969 (63^2) and above give 31. The midpoints are compile-time constants, so
// the block is 30 comparators and an adder tree; it is combinational. Choosing a
// comparator ladder instead of an iterative root is this design's choice, made so
// the whole MB-layer QP computation stays inside one PE cycle.
module rc_qp_from_qsq
  import rc_pkg::*;
(
  input  word_t       qsq,  // Q*^2 in integer quantiser-step units
  output logic [4:0]  qp
);
  always_comb begin
    logic [4:0] n;
    n = 5'd1;
    for (int k = 1; k <= 30; k++) begin
      if (qsq >= word_t'((2 * k + 1) * (2 * k + 1))) n = n + 5'd1;
    end
    qp = n;
  end
endmodule
