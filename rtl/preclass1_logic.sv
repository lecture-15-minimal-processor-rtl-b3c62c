// preclass1_logic: the lecture's example netlist as ordinary gates.
//
//   o1 = a&b | b&c | a&c   (majority, the carry of a full adder)
//   o2 = a ^ b ^ c         (parity, the sum of a full adder)
//
// Built from seven two-input gates, the same seven operations the one-gate
// processor's example program performs one per cycle:
//   t1 = a&b, t2 = b&c, t3 = t1|t2, t4 = a&c, o1 = t3|t4, t5 = a^b, o2 = t5^c.
// Combinational; a reference against which the processor's results can be
// compared.
module preclass1_logic (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic o1,
  output logic o2
);
  logic t1, t2, t3, t4, t5;

  assign t1 = a & b;
  assign t2 = b & c;
  assign t3 = t1 | t2;
  assign t4 = a & c;
  assign o1 = t3 | t4;
  assign t5 = a ^ b;
  assign o2 = t5 ^ c;
endmodule
