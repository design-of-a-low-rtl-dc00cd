// xor_xnor -- dual-rail XOR/XNOR gate.
//
// The middle stage of the Sum path needs both polarities of the 4-input
// parity: one feeds the last multiplexer's input 0, the other its input 1.
// This cell provides x = a ^ b and xn = ~(a ^ b) together, as the
// complementary pass-transistor XOR/XNOR gate used in the source design does
// (two stacked transistors of delay).
//
// Interface: a, b inputs; x, xn complementary outputs. Combinational.
//
// Only the function of this gate is specified by the source; its transistor
// structure comes from earlier work and is not reproduced here.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  assign x  = a ^ b;
  assign xn = ~x;
endmodule
