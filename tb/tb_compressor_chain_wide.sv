// tb_compressor_chain_wide -- randomized self-check of a 16-stage compressor
// row, the width of one reduction row for 16-bit operands.
//
// 20000 random sets of four 16-bit operands and cin, plus the corner cases
// all-zero and all-one, are reduced by the row. Each result must satisfy
// A+B+C+D+cin == sum + 2*carry + 2^16*cout, and toggling cin with the
// operands held may change only sum[0] and carry[0] (the row has no carry
// ripple however long it is).
module tb_compressor_chain_wide;
  localparam int S = 16;

  logic [S-1:0] i1, i2, i3, i4, sum, carry;
  logic         cin, cout;
  int checks = 0, failures = 0;

  compressor_chain #(.STAGES(S)) dut (.i1, .i2, .i3, .i4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [S-1:0] a, b, c, d);
    longint       total, got;
    logic [S-1:0] sum0, carry0;
    logic         cout0;
    for (int ci = 0; ci < 2; ci++) begin
      i1 = a; i2 = b; i3 = c; i4 = d; cin = ci[0];
      #1;
      total = longint'(a) + longint'(b) + longint'(c) + longint'(d) + longint'(ci);
      got   = longint'(sum) + (longint'(carry) << 1) + (longint'(cout) << S);
      checks++;
      if (got != total) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h cin=%0d: got %0d expected %0d", a, b, c, d, ci, got, total);
      end
      if (ci == 0) begin
        sum0 = sum; carry0 = carry; cout0 = cout;
      end else begin
        checks++;
        if (cout !== cout0 || (sum[S-1:1] !== sum0[S-1:1]) || (carry[S-1:1] !== carry0[S-1:1])) begin
          failures++;
          $display("FAIL ripple for a=%h b=%h c=%h d=%h", a, b, c, d);
        end
      end
    end
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    for (int k = 0; k < 20000; k++)
      apply(S'($urandom), S'($urandom), S'($urandom), S'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
