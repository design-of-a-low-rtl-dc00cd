// tb_sum_gen -- exhaustive self-check of the Sum circuit.
// All 32 combinations of I1..I4 and Cin; sum must be the low bit of the
// arithmetic count of ones among the five inputs, and e the low bit of the
// count among I1..I4.
module tb_sum_gen;
  logic i1, i2, i3, i4, cin, e, sum;
  int checks = 0, failures = 0;

  sum_gen dut (.i1, .i2, .i3, .i4, .cin, .e, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int n4, n5;
      {cin, i4, i3, i2, i1} = 5'(v);
      n4 = int'(i1) + int'(i2) + int'(i3) + int'(i4);
      n5 = n4 + int'(cin);
      #1;
      checks += 2;
      if (sum !== n5[0]) begin
        failures++;
        $display("FAIL in=%05b sum=%b expected %b", v[4:0], sum, n5[0]);
      end
      if (e !== n4[0]) begin
        failures++;
        $display("FAIL in=%05b e=%b expected %b", v[4:0], e, n4[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
