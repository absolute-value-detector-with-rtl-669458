// Self-checking test of the 4-bit ripple-carry adder: every pair of
// operands with both carry-in values (512 cases), each compared with the
// integer sum. Also checks that a carry entering bit 0 can ripple all the
// way to cout (1111 + 0000 + 1).
module tb_ripple_adder;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  ripple_adder #(.WIDTH(W)) dut (.a, .b, .cin, .sum, .cout);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          int exp_v;
          a = W'(i); b = W'(j); cin = 1'(c);
          #1;
          exp_v = i + j + c;
          checks++;
          if ({cout, sum} != (W+1)'(exp_v)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d", i, j, c, {cout, sum});
          end
          if (i == (1 << W) - 1 && j == 0 && c == 1) full_ripples++;
        end
    checks++;
    if (full_ripples != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
