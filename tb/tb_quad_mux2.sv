// Self-checking test of the quad 2-to-1 selector: every select and strobe
// value over 200 random operand pairs plus the all-zero / all-one corners.
// Expected: y = 0 when strobe_n = 1, else b when sel = 1, else a.
module tb_quad_mux2;
  localparam int W = 4;
  logic [W-1:0] a, b, y, exp_y;
  logic sel, strobe_n;
  int checks = 0, failures = 0;

  quad_mux2 #(.WIDTH(W)) dut (.a, .b, .sel, .strobe_n, .y);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    exp_y = strobe_n ? '0 : (sel ? b : a);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL a=%h b=%h sel=%0b g_n=%0b y=%h exp=%h", a, b, sel, strobe_n, y, exp_y);
    end
  endtask

  initial begin
    for (int n = 0; n < 202; n++) begin
      if (n == 0)      begin a = '0; b = '1; end
      else if (n == 1) begin a = '1; b = '0; end
      else             begin a = W'($urandom); b = W'($urandom); end
      for (int s = 0; s < 4; s++) begin
        {strobe_n, sel} = 2'(s);
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
