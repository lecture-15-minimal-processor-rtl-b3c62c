// config_gate: a programmable gate whose truth table is held in flip-flops.
//
// Four configuration flip-flops store the truth table; a write (cfg_we at a
// rising clock edge) loads a new table from cfg_fn, which turns the same
// hardware into a different gate (AND, OR, XOR, NAND, ...). The gate itself is
// the multiplexer tree of prog_gate, so y follows a and b combinationally.
// The table uses the bit order of the processor's function codes (AND=0001,
// OR=0111, XOR=0110). Keeping the truth table in state follows the lecture;
// the load port and the reset to 0000 (constant 0) are this design's choices.
module config_gate (
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low: table = 0000
  input  logic       cfg_we,  // load a new truth table
  input  logic [3:0] cfg_fn,
  input  logic       a,
  input  logic       b,
  output logic [3:0] fn,      // the stored truth table
  output logic       y
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      fn <= '0;
    else if (cfg_we) fn <= cfg_fn;

  prog_gate u_gate (.fn, .a, .b, .y);
endmodule
