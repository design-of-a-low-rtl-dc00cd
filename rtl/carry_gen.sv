// carry_gen -- Carry output of the 4-2 compressor.
//
// Carry = (E & Cin & ~F) | F, where E is the parity of I1..I4 and F is 1
// only when all four are 1. Two pass stages implement it:
//   1. a transmission gate passes E while Cin is 1, and a single pull-down
//      switch ties the node to 0 while Cin is 0, giving E & Cin;
//   2. a transmission gate forwards that node while F is 0, and a single
//      pull-up switch drives 1 while F is 1.
// Single switches replace transmission gates wherever only one logic level
// has to be passed.
//
// Interface: e, cin, f, f_n inputs; carry output. Combinational.
//
// The two-stage pass structure and Eq. (4) follow the published circuit.
// Both stages are modelled as multiplexers on the controlling signal; f_n
// drives the forwarding stage as in the drawing.
module carry_gen (
  input  logic e,
  input  logic cin,
  input  logic f,
  input  logic f_n,
  output logic carry
);
  logic e_and_cin;

  // Stage 1: E when Cin is 1, ground when Cin is 0.
  always_comb begin
    if (cin) e_and_cin = e;
    else     e_and_cin = 1'b0;
  end

  // Stage 2: forward stage 1 while ~F is 1, pull up to 1 while F is 1.
  always_comb begin
    if (f_n)    carry = e_and_cin;
    else if (f) carry = 1'b1;
    else        carry = e_and_cin;   // f and f_n are complements: not reached
  end
endmodule
