// 5-bit absolute value detector: raises a_gt_b when the magnitude of a
// signed sample exceeds a threshold.
//
// A 5-bit two's complement sample x enters the absolute value converter,
// which turns it into a 4-bit magnitude (raw bits for x >= 0, inverted and
// incremented bits for x < 0, chosen by the sign bit). The magnitude and a
// 4-bit threshold then enter a gate-level comparator that reports
// magnitude > threshold. The magnitude is brought out as well, so both the
// |x| word and the decision can be observed.
//
// Interface: x and thr in; mag (= |x|, 0 for x = -16) and a_gt_b out.
// Purely combinational: no clock, no reset, no state; outputs follow the
// inputs after the gate delays.
//
// The two-stage structure and the 4-bit threshold follow the design. The
// -16 corner (no 4-bit magnitude, read as 0) is inherited from it.
module avd_top
  import avd_pkg::*;
(
  input  sample_t x,       // signed sample
  input  mag_t    thr,     // unsigned threshold
  output mag_t    mag,     // |x|
  output logic    a_gt_b   // 1 when |x| > thr
);
  abs_converter u_abs (
    .x  (x),
    .mag(mag)
  );

  magnitude_comparator u_cmp (
    .a     (mag),
    .b     (thr),
    .a_gt_b(a_gt_b)
  );
endmodule
