// tb_compressor_4_2 -- exhaustive self-check of the 4-2 compressor cell.
// For all 32 input combinations it checks:
//   * the weight balance I1+I2+I3+I4+Cin == Sum + 2*(Carry+Cout);
//   * Sum and Cout individually (low bit of the count; at least two of I1..I4);
//   * that Cout does not change when only Cin changes (no ripple).
module tb_compressor_4_2;
  logic i1, i2, i3, i4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.i1, .i2, .i3, .i4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_at_cin0;
      for (int c = 0; c < 2; c++) begin
        int n4, total, got;
        {i4, i3, i2, i1} = 4'(v);
        cin = c[0];
        n4 = int'(i1) + int'(i2) + int'(i3) + int'(i4);
        total = n4 + c;
        #1;
        got = int'(sum) + 2 * (int'(carry) + int'(cout));
        checks += 3;
        if (got != total) begin
          failures++;
          $display("FAIL in=%04b cin=%0d: sum=%b carry=%b cout=%b, weight %0d expected %0d",
                   v[3:0], c, sum, carry, cout, got, total);
        end
        if (sum !== total[0]) begin
          failures++;
          $display("FAIL in=%04b cin=%0d: sum=%b", v[3:0], c, sum);
        end
        if (cout !== (n4 >= 2)) begin
          failures++;
          $display("FAIL in=%04b cin=%0d: cout=%b", v[3:0], c, cout);
        end
        if (c == 0) cout_at_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_at_cin0) begin
            failures++;
            $display("FAIL in=%04b: cout depends on cin", v[3:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
