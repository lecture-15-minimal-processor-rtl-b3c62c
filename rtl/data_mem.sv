// data_mem: the processor's data memory, one slot per simulated gate value.
//
// NSLOTS slots of W bits (the lecture assumes 8 one-bit slots). Two
// asynchronous read ports (ra0, ra1) give the two gate operands in the same
// cycle; one synchronous write port stores a result at the rising clock edge,
// so a value written by one instruction is read by the next. Reading returns
// the last value written. The contents are not reset: the program writes a
// slot before it reads it. The two read ports and the write timing are this
// design's choices; the lecture gives the memory's function (write by WA,
// read by RA, return the last value written).
module data_mem #(
  parameter int unsigned NSLOTS = 8,
  parameter int unsigned W      = 1,
  localparam int unsigned AW    = (NSLOTS > 1) ? $clog2(NSLOTS) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] ra0,
  output logic [W-1:0]  rd0,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] mem [NSLOTS];

  always_ff @(posedge clk)
    if (we) mem[wa] <= wd;

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];
endmodule
