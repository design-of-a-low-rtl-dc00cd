// compressor_4_2 -- low-transistor-count 4-2 compressor cell.
//
// A 4-2 compressor adds four bits of one weight (I1..I4) and a carry-in Cin
// from its lower neighbour, and returns one bit of that weight (Sum) and two
// bits of the next weight (Carry, Cout):
//     I1 + I2 + I3 + I4 + Cin = Sum + 2 * (Carry + Cout)
// This cell splits the two upper-weight bits so that Cout needs only I1..I4:
//     Sum   = I1 ^ I2 ^ I3 ^ I4 ^ Cin
//     Cout  = 1 when at least two of I1..I4 are 1
//     Carry = (E & Cin & ~F) | F, with E = I1^I2^I3^I4 and F = I1&I2&I3&I4
// Cout going to the next cell therefore never depends on Cin, and a row of
// cells has no carry ripple: every Cin is valid after one Cout delay.
//
// Structure: sum_gen (Sum and E), carry_ctrl (F), carry_gen (Carry) and
// cout_gen (Cout). In the published pass-transistor realisation the Sum path
// is the critical one at four transistors; at the logic level the cell is
// purely combinational.
//
// Interface: i1..i4, cin inputs; sum, carry, cout outputs. No clock, no
// state, no latency in cycles.
//
// The equations and sub-circuits follow the published cell; the division
// into sub-modules mirrors its figures.
module compressor_4_2 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic e, f, f_n;

  sum_gen    u_sum   (.i1, .i2, .i3, .i4, .cin, .e, .sum);
  carry_ctrl u_ctrl  (.i1, .i2, .i3, .i4, .f, .f_n);
  carry_gen  u_carry (.e, .cin, .f, .f_n, .carry);
  cout_gen   u_cout  (.i1, .i2, .i3, .i4, .cout);
endmodule
