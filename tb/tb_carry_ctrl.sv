// tb_carry_ctrl -- exhaustive self-check of the F control signal.
// F must be 1 only when the count of ones among I1..I4 is four, and f_n its
// complement, over all 16 input combinations.
module tb_carry_ctrl;
  logic i1, i2, i3, i4, f, f_n;
  int checks = 0, failures = 0;

  carry_ctrl dut (.i1, .i2, .i3, .i4, .f, .f_n);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int n;
      {i4, i3, i2, i1} = 4'(v);
      n = int'(i1) + int'(i2) + int'(i3) + int'(i4);
      #1;
      checks += 2;
      if (f !== (n == 4)) begin
        failures++;
        $display("FAIL in=%04b f=%b", v[3:0], f);
      end
      if (f_n !== (n != 4)) begin
        failures++;
        $display("FAIL in=%04b f_n=%b", v[3:0], f_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
