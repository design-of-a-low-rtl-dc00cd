// sum_gen -- Sum output of the 4-2 compressor.
//
// Sum is the parity of all five inputs, I1^I2^I3^I4^Cin. It is built in
// three pass-gate levels so that the critical path crosses only four
// transistors:
//   1. two multiplexers select ~I1 or I1 by I2, and ~I3 or I3 by I4, giving
//      I1 xnor I2 and I3 xnor I4;
//   2. an XOR/XNOR gate combines the two into E = I1^I2^I3^I4 and ~E
//      (the two xnor terms cancel each other's inversion);
//   3. a last multiplexer, selected by ~Cin, picks the output polarity.
//
// Interface: i1..i4, cin inputs; e (the 4-input parity, reused by the Carry
// circuit) and sum outputs. Combinational.
//
// The structure, the multiplexer data assignments and the ~Cin select follow
// the published Sum circuit. The published drawing labels the input-0 leg of
// the last multiplexer "E"; since Sum must equal E^Cin, the signal on that leg
// has to be the complement of the parity, so here input 0 carries ~E and
// input 1 carries E.
module sum_gen (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic e,
  output logic sum
);
  logic x12n, x34n;   // I1 xnor I2, I3 xnor I4
  logic e_n;          // complement of the 4-input parity

  tg_mux2 u_mux12 (.in0(~i1), .in1(i1), .sel(i2), .out(x12n));
  tg_mux2 u_mux34 (.in0(~i3), .in1(i3), .sel(i4), .out(x34n));

  xor_xnor u_xor (.a(x12n), .b(x34n), .x(e), .xn(e_n));

  tg_mux2 u_mux_out (.in0(e_n), .in1(e), .sel(~cin), .out(sum));
endmodule
