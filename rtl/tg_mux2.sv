// tg_mux2 -- two-input transmission-gate multiplexer.
//
// The compressor builds its Sum and Cout paths from this one cell. In
// silicon it is two transmission gates sharing an output node, one opened by
// the select and the other by its complement, so the selected data input is
// passed through a single switch (one transistor of delay). At the logic
// level it is a plain 2:1 multiplexer: out = sel ? in1 : in0.
//
// Interface: in0, in1 data, sel select, out result. Purely combinational,
// no clock and no state.
//
// Follows the published cell: input 0 is passed when the select is low and
// input 1 when it is high. Whether the two data inputs are complements of
// each other (as in the XOR use) is left to the instantiating module.
module tg_mux2 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic out
);
  always_comb begin
    if (sel) out = in1;
    else     out = in0;
  end
endmodule
