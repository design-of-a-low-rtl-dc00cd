// carry_ctrl -- control signal F for the Carry circuit.
//
// F is 1 exactly when all four inputs I1..I4 are 1; it forces Carry high in
// that case. It is formed from the complemented inputs: two NOR gates give
// I1&I2 and I3&I4, and a NAND of those gives ~F, from which F is taken by an
// inverter, so both polarities are available to the pass gates downstream.
//
// Interface: i1..i4 inputs; f and f_n (its complement) outputs.
// Combinational.
//
// Gate structure (NOR, NOR, NAND on complemented inputs) and the function
// F = ~(~I1 | ~I2 | ~I3 | ~I4) follow the published circuit; the output
// inverter producing F from the NAND is this design's reading of where the
// second polarity comes from.
module carry_ctrl (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  output logic f,
  output logic f_n
);
  logic and12, and34;

  assign and12 = ~(~i1 | ~i2);   // NOR of the complemented inputs
  assign and34 = ~(~i3 | ~i4);
  assign f_n   = ~(and12 & and34);
  assign f     = ~f_n;
endmodule
