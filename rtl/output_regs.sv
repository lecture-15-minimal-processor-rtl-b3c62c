// output_regs: the processor's designated output registers.
//
// N_OUT one-bit registers. When 'we' is high at a rising clock edge, register
// 'wa' loads 'd'; the others hold. All clear on reset (active low,
// asynchronous). The lecture gives the function (load a designated output
// register); the count of 8, set by the 3-bit Out field, and the reset are
// this design's choices.
module output_regs #(
  parameter int unsigned N_OUT = 8,
  localparam int unsigned AW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic             d,
  output logic [N_OUT-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else if (we) q[wa] <= d;
endmodule
