// compressor_chain -- a row of cascaded 4-2 compressors.
//
// STAGES compressor cells sit side by side, stage j taking bit j of four
// operands. The Cout of stage j is the Cin of stage j+1; stage 0 takes the
// external cin and the last stage's Cout leaves as cout. The row reduces four
// STAGES-bit operands A..D and cin to two rows:
//     A + B + C + D + cin = sum + (carry << 1) + (cout << STAGES)
// which is the job a row of the partial-product reduction tree of a parallel
// multiplier gives it.
//
// Because each cell's Cout depends only on its own I1..I4, the chain does not
// ripple: the longest path is one Cout followed by the next stage's Carry or
// Sum, whatever STAGES is.
//
// Interface: i1..i4 [STAGES], cin inputs; sum, carry [STAGES] and cout
// outputs. Combinational.
//
// The default of two stages, and the Cout-to-Cin connection, follow the
// published two-stage critical-path setup. Its input and output buffers only
// balance electrical loading and are left out.
module compressor_chain #(
  parameter int unsigned STAGES = 2
) (
  input  logic [STAGES-1:0] i1,
  input  logic [STAGES-1:0] i2,
  input  logic [STAGES-1:0] i3,
  input  logic [STAGES-1:0] i4,
  input  logic              cin,
  output logic [STAGES-1:0] sum,
  output logic [STAGES-1:0] carry,
  output logic              cout
);
  logic [STAGES:0] c;   // c[j] is the Cin of stage j

  assign c[0] = cin;

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    compressor_4_2 u_cmp (
      .i1   (i1[j]),
      .i2   (i2[j]),
      .i3   (i3[j]),
      .i4   (i4[j]),
      .cin  (c[j]),
      .sum  (sum[j]),
      .carry(carry[j]),
      .cout (c[j+1])
    );
  end

  assign cout = c[STAGES];
endmodule
