// prog_gate: two-input programmable gate built from multiplexers.
//
// The four truth-table bits 'fn' are the data inputs of a tree of three 2:1
// multiplexers and the two operands are its select lines, so the gate can act
// as any two-input Boolean function. The lecture keeps the truth table in
// state (flip-flops); in the processor it comes from the instruction's
// function field instead, so here it is a plain input.
//
// Bit order (this design's reading of the lecture's codes AND=0001, OR=0111,
// XOR=0110, SEL0=0101): bit 3 is the output for (b,a)=(0,0), bit 2 for (0,1),
// bit 1 for (1,0), bit 0 for (1,1), where a is the first operand (In0) and b
// the second (In1). With this order SEL0 passes the first operand through.
// Combinational, no clock.
module prog_gate (
  input  logic [3:0] fn,  // truth table
  input  logic       a,   // first operand (In0)
  input  logic       b,   // second operand (In1)
  output logic       y
);
  logic lo, hi;

  // first level: choose by a, within the rows b=0 and b=1
  mux2 u_lo (.s(a), .i0(fn[3]), .i1(fn[2]), .y(lo));
  mux2 u_hi (.s(a), .i0(fn[1]), .i1(fn[0]), .y(hi));
  // second level: choose the row by b
  mux2 u_out (.s(b), .i0(lo), .i1(hi), .y(y));
endmodule
