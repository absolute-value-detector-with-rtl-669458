// Self-checking test of the absolute value converter: all 32 five-bit
// two's complement inputs. The expected magnitude is worked out with
// integer arithmetic: |v| for v in -15..15, and 0 for -16, whose magnitude
// 16 does not fit in four bits and whose carry is dropped.
module tb_abs_converter;
  import avd_pkg::*;
  sample_t x;
  mag_t    mag;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_wrap = 0;

  abs_converter dut (.x, .mag);

  initial begin : watchdog
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -16; v < 16; v++) begin
      int exp_m;
      x = IN_W'(v);
      #1;
      exp_m = (v < 0) ? -v : v;
      if (exp_m > 15) begin exp_m = 0; n_wrap++; end
      else if (v < 0) n_neg++;
      else            n_pos++;
      checks++;
      if (mag !== MAG_W'(exp_m)) begin
        failures++;
        $display("FAIL x=%0d mag=%0d exp=%0d", v, mag, exp_m);
      end
    end
    checks++;
    if (n_pos != 16 || n_neg != 15 || n_wrap != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
