// tb_xor_xnor -- exhaustive self-check of the dual-rail XOR/XNOR gate.
// For each of the four input pairs it checks x against the count of ones
// being odd and xn against it being even.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a, .b, .x, .xn);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int ones;
      {a, b} = 2'(v);
      ones = int'(a) + int'(b);
      #1;
      checks += 2;
      if (x !== (ones == 1)) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b", a, b, x);
      end
      if (xn !== (ones != 1)) begin
        failures++;
        $display("FAIL a=%b b=%b xn=%b", a, b, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
