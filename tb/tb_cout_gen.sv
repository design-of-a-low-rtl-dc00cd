// tb_cout_gen -- exhaustive self-check of the Cout circuit.
// Over all 16 combinations of I1..I4, cout must be 1 exactly when at least
// two of the inputs are 1.
module tb_cout_gen;
  logic i1, i2, i3, i4, cout;
  int checks = 0, failures = 0;

  cout_gen dut (.i1, .i2, .i3, .i4, .cout);

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
      checks++;
      if (cout !== (n >= 2)) begin
        failures++;
        $display("FAIL in=%04b cout=%b expected %b", v[3:0], cout, n >= 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
