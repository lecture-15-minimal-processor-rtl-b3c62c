// pc_counter: program counter that sequences the instructions.
//
// Reset (active low, asynchronous) sets PC to 0; in every clock cycle with
// 'en' high the PC advances by one (next PC = PC + 1) and wraps from the last
// instruction-memory word back to 0, so the program repeats. Start at 0 and
// add 1 follow the lecture; the wrap-around and the enable are this design's.
module pc_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pc <= '0;
    else if (en) pc <= pc + AW'(1);
endmodule
