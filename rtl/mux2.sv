// mux2: two-input multiplexer, the basic element of this design.
//
// y = i0 when s = 0, y = i1 when s = 1, exactly the truth table of the
// lecture's multiplexer gate. Purely combinational; W sets the data width
// (1 in every use inside the processor; the width parameter is this design's
// addition).
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic         s,
  input  logic [W-1:0] i0,
  input  logic [W-1:0] i1,
  output logic [W-1:0] y
);
  always_comb y = s ? i1 : i0;
endmodule
