// Threshold-8 sweep of the absolute value detector: the threshold is fixed
// at 4'b1000 and the sample steps through 5'h00 .. 5'h1F in order, one value
// every 5 ns, which is the experiment whose waveform the design was
// verified with. Each step checks |x| and the decision |x| > 8 against
// integer arithmetic, and the run must see exactly the expected number of
// detections: |x| in 9..15 for both signs, 14 samples out of 32.
module tb_avd_threshold8;
  import avd_pkg::*;
  sample_t x;
  mag_t    mag;
  logic    a_gt_b;
  int checks = 0, failures = 0, detections = 0;

  avd_top dut (.x, .thr(4'b1000), .mag, .a_gt_b);

  initial begin : watchdog
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 32; code++) begin
      int v, exp_m;
      x = IN_W'(code);
      #5;
      v = (code >= 16) ? code - 32 : code;
      exp_m = (v < 0) ? -v : v;
      if (exp_m == 16) exp_m = 0;
      checks++;
      if (mag !== MAG_W'(exp_m) || a_gt_b !== (exp_m > 8)) begin
        failures++;
        $display("FAIL A=%h Y=%h A_gt_B=%0b", x, mag, a_gt_b);
      end
      if (a_gt_b) detections++;
    end
    checks++;
    if (detections != 14) begin
      failures++;
      $display("FAIL detections=%0d, expected 14", detections);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
