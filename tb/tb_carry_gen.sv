// tb_carry_gen -- self-check of the Carry circuit.
// Drives E, Cin and a complementary F/~F pair through all eight legal
// combinations. Expected: 1 whenever F is 1, otherwise 1 only when E and Cin
// are both 1 (written out as a case table, not as the block's equation).
module tb_carry_gen;
  logic e, cin, f, f_n, carry;
  int checks = 0, failures = 0;

  carry_gen dut (.e, .cin, .f, .f_n, .carry);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {f, cin, e} = 3'(v);
      f_n = ~f;
      case (v)
        3'b011:                         exp = 1'b1;  // E=1, Cin=1, F=0
        3'b100, 3'b101, 3'b110, 3'b111: exp = 1'b1;  // F forces 1
        default:                        exp = 1'b0;
      endcase
      #1;
      checks++;
      if (carry !== exp) begin
        failures++;
        $display("FAIL f=%b cin=%b e=%b carry=%b expected %b", f, cin, e, carry, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
