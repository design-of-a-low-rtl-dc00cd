// tb_compressor_chain -- end-to-end self-check of the compressor row at its
// default size (two cascaded stages, no parameter override).
//
// Every one of the 2^9 combinations of the four 2-bit operands and cin is
// applied. For each it checks
//   * the row identity A+B+C+D+cin == sum + 2*carry + 4*cout;
//   * each stage's Sum (low bit of its five-input count) and, for the last
//     stage, Cout (at least two of its four inputs set);
//   * no ripple: with the operands held, toggling cin may change only sum[0]
//     and carry[0].
// It also counts how often each mechanism of the cell was exercised, and
// fails if one never was: Carry forced by four ones (F), Carry from the
// parity-and-Cin path, a stage's Cout feeding the next stage's Cin, and a cin
// toggle with operands held.
module tb_compressor_chain;
  localparam int S = 2;   // default number of stages of the row

  logic [S-1:0] i1, i2, i3, i4, sum, carry;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_all_ones = 0, n_parity_cin = 0, n_cout_chain = 0, n_cin_toggle = 0;

  compressor_chain dut (.i1, .i2, .i3, .i4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: count ones per column, walk the column carries of the cell's
  // split (Cout = at least two of the four), and check the weighted total.
  task automatic check_vector(input logic [S-1:0] a, b, c, d, input logic ci);
    longint total, got;
    int     n4;
    logic   stage_cin;
    i1 = a; i2 = b; i3 = c; i4 = d; cin = ci;
    #1;
    total = longint'(a) + longint'(b) + longint'(c) + longint'(d) + longint'(ci);
    got   = longint'(sum) + (longint'(carry) << 1) + (longint'(cout) << S);
    checks++;
    if (got != total) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h d=%h cin=%b: sum=%h carry=%h cout=%b (%0d, expected %0d)",
               a, b, c, d, ci, sum, carry, cout, got, total);
    end
    stage_cin = ci;
    for (int j = 0; j < S; j++) begin
      n4 = int'(a[j]) + int'(b[j]) + int'(c[j]) + int'(d[j]);
      checks++;
      if (sum[j] !== ((n4 + int'(stage_cin)) % 2 == 1)) begin
        failures++;
        $display("FAIL stage %0d sum=%b", j, sum[j]);
      end
      if (n4 == 4) n_all_ones++;
      if (n4 % 2 == 1 && stage_cin) n_parity_cin++;
      if (j > 0 && stage_cin) n_cout_chain++;
      stage_cin = (n4 >= 2);
    end
    checks++;
    if (cout !== stage_cin) begin
      failures++;
      $display("FAIL cout=%b expected %b", cout, stage_cin);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (4 * S)); v++) begin
      logic [S-1:0]   a, b, c, d;
      logic [S-1:0]   sum0, carry0;
      logic           cout0;
      logic [4*S-1:0] ops;
      ops = (4*S)'(v);
      {d, c, b, a} = ops;
      check_vector(a, b, c, d, 1'b0);
      sum0 = sum; carry0 = carry; cout0 = cout;
      check_vector(a, b, c, d, 1'b1);
      n_cin_toggle++;
      checks++;
      if (cout !== cout0 || (S > 1 && ((sum ^ sum0) >> 1) != 0)
          || (S > 1 && ((carry ^ carry0) >> 1) != 0)) begin
        failures++;
        $display("FAIL ripple: cin changed outputs above stage 0 (ops=%h)", ops);
      end
    end

    $display("mechanisms: carry_by_F=%0d carry_by_parity_and_cin=%0d cout_into_cin=%0d cin_toggles=%0d",
             n_all_ones, n_parity_cin, n_cout_chain, n_cin_toggle);
    if (n_all_ones == 0)   begin failures++; $display("FAIL Carry forced by F never exercised"); end
    if (n_parity_cin == 0) begin failures++; $display("FAIL parity-and-Cin Carry never exercised"); end
    if (n_cout_chain == 0) begin failures++; $display("FAIL Cout into Cin never exercised"); end
    if (n_cin_toggle == 0) begin failures++; $display("FAIL cin toggle never exercised"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
