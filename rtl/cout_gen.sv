// cout_gen -- Cout output of the 4-2 compressor.
//
// Cout is 1 when at least two of I1..I4 are 1, and does not depend on Cin.
// That independence is what keeps a row of compressors from rippling: the
// Cout of one cell never waits for the Cin of the same cell.
//
// It is a multiplexer tree selected by I1 and I2:
//   I1=0, I2=0 : I3 & I4  (I4 passed while I3=1, ground while I3=0)
//   I1=0, I2=1 : I3 | I4  (I4 passed while I3=0, VDD while I3=1)
//   I1=1       : I2 | I3 | I4  (the I3|I4 node passed while I2=0, VDD while
//                I2=1)
// Each leaf is a transmission gate for the data term plus a single switch for
// the constant, as in the published circuit.
//
// Interface: i1..i4 inputs; cout output. Combinational.
//
// The tree, its select signals and its leaf terms follow the published
// circuit. The I3|I4 node is drawn twice there (once per branch); here it is
// one signal feeding both.
module cout_gen (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  output logic cout
);
  logic and34, or34, or234, lo_branch;

  // Leaf: I4 while I3=1, ground while I3=0.
  always_comb begin
    if (i3) and34 = i4;
    else    and34 = 1'b0;
  end

  // Leaf: I4 while I3=0, VDD while I3=1.
  always_comb begin
    if (i3) or34 = 1'b1;
    else    or34 = i4;
  end

  // Leaf: the I3|I4 node while I2=0, VDD while I2=1.
  always_comb begin
    if (i2) or234 = 1'b1;
    else    or234 = or34;
  end

  tg_mux2 u_mux_i2 (.in0(and34),     .in1(or34),  .sel(i2), .out(lo_branch));
  tg_mux2 u_mux_i1 (.in0(lo_branch), .in1(or234), .sel(i1), .out(cout));
endmodule
