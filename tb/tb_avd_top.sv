// End-to-end test of the 5-bit absolute value detector at its default
// configuration: every sample x (-16..15) against every threshold (0..15),
// 512 cases. The expected |x| and decision come from integer arithmetic.
//
// Besides checking values, it counts how often each mechanism of the design
// was exercised and fails if any never was:
//   - positive sample, raw bits selected (sign bit 0)
//   - negative sample, two's complement selected (sign bit 1)
//   - the -16 corner, magnitude reads 0
//   - a detection (|x| > thr) decided at magnitude bit 3, 2, 1 and 0
//   - no detection because |x| == thr, and because |x| < thr
// The design is combinational, so every result is checked in the same
// step, one sample per tick of a local 10 ns clock.
module tb_avd_top;
  import avd_pkg::*;
  sample_t x;
  mag_t    thr, mag;
  logic    a_gt_b;
  logic    clk = 1'b0;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_wrap = 0, n_eq = 0, n_lt = 0;
  int decided_at [MAG_W] = '{default: 0};

  avd_top dut (.x, .thr, .mag, .a_gt_b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++)
      for (int v = -16; v < 16; v++) begin
        int exp_m;
        logic exp_gt;
        @(posedge clk);
        x   = IN_W'(v);
        thr = MAG_W'(t);
        @(negedge clk);
        exp_m  = (v < 0) ? -v : v;
        if (exp_m == 16) exp_m = 0;          // no 4-bit magnitude
        exp_gt = (exp_m > t);
        checks++;
        if (mag !== MAG_W'(exp_m) || a_gt_b !== exp_gt) begin
          failures++;
          $display("FAIL x=%0d thr=%0d: mag=%0d a_gt_b=%0b, expected %0d %0b",
                   v, t, mag, a_gt_b, exp_m, exp_gt);
        end
        if (v == -16)   n_wrap++;
        else if (v < 0) n_neg++;
        else            n_pos++;
        if (exp_gt) begin
          for (int k = MAG_W - 1; k >= 0; k--)
            if (mag[k] != thr[k]) begin decided_at[k]++; break; end
        end
        else if (exp_m == t) n_eq++;
        else                 n_lt++;
      end

    $display("positive=%0d negative=%0d wrap=%0d equal=%0d below=%0d", n_pos, n_neg, n_wrap, n_eq, n_lt);
    $display("detections decided at bit3=%0d bit2=%0d bit1=%0d bit0=%0d",
             decided_at[3], decided_at[2], decided_at[1], decided_at[0]);
    checks++; if (n_pos  == 0) failures++;
    checks++; if (n_neg  == 0) failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_eq   == 0) failures++;
    checks++; if (n_lt   == 0) failures++;
    for (int k = 0; k < MAG_W; k++) begin
      checks++;
      if (decided_at[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
