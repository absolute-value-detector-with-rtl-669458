// Self-checking test of the 4-bit greater-than comparator: all 256 pairs
// (a, b), each compared with the integer relation a > b. It also counts
// which of the four deciding cases (first differing bit 3, 2, 1 or 0) made
// the output high, and fails if any case never occurred.
module tb_magnitude_comparator;
  logic [3:0] a, b;
  logic a_gt_b;
  int checks = 0, failures = 0;
  int decided_at [4] = '{default: 0};

  magnitude_comparator dut (.a, .b, .a_gt_b);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (a_gt_b !== (i > j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d a_gt_b=%0b", i, j, a_gt_b);
        end
        if (i > j) begin
          // highest differing bit decides
          for (int k = 3; k >= 0; k--)
            if (a[k] != b[k]) begin decided_at[k]++; break; end
        end
      end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (decided_at[k] == 0) begin
        failures++;
        $display("FAIL case bit %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
