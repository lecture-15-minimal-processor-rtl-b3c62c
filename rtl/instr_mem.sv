// instr_mem: instruction memory of the one-gate processor.
//
// DEPTH words of W bits, read asynchronously at the program counter so an
// instruction is fetched and executed in the same cycle. A synchronous write
// port (we, wa, wd) loads the program; changing its contents changes the
// computation, which is what makes the processor universal. The depth (16) and
// the loading port are this design's choices; the lecture gives neither.
module instr_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 15,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rd,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[wa] <= wd;

  assign rd = mem[ra];
endmodule
