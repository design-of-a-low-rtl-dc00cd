// tb_tg_mux2 -- exhaustive self-check of the 2:1 pass-gate multiplexer.
// Drives all eight input combinations and compares with the selection rule
// (input 0 when the select is low, input 1 when it is high), then also
// checks the XOR use of the cell with complementary data (A, ~A).
module tb_tg_mux2;
  logic in0, in1, sel, out;
  int checks = 0, failures = 0;

  tg_mux2 dut (.in0, .in1, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      checks++;
      if (out !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%b in1=%b in0=%b out=%b", sel, in1, in0, out);
      end
    end
    // Complementary data turns the cell into an XOR of A and the select.
    for (int v = 0; v < 4; v++) begin
      in0 = v[0]; in1 = ~v[0]; sel = v[1];
      #1;
      checks++;
      if (out !== (v[0] ^ v[1])) begin
        failures++;
        $display("FAIL xor use a=%b b=%b out=%b", v[0], v[1], out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
