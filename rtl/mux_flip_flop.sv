// mux_flip_flop: edge-triggered D flip-flop made of two multiplexer latches.
//
// Each stage is a 2:1 multiplexer whose output is fed back to its i1 input:
// with select 0 it passes i0 (transparent), with select 1 it holds its own
// output. The first (master) stage takes D on i0 and CLK as select; the second
// (slave) stage takes the master's output on i0 and the inverted CLK as
// select. The master follows D while CLK is low and freezes when CLK rises;
// the slave is transparent while CLK is high, so Q takes the value D had at
// the rising edge and holds it while CLK is low. The structure (two muxes,
// feedback to i1, one inverter on the clock) follows the lecture's state
// element drawing; which stage sees the inverted clock is read from that
// drawing.
//
// Each mux-with-feedback is written as a level-sensitive latch (always_latch):
// that is what the structure is, so the latch warnings a tool gives for this
// module are intended. Not used inside the processor, which uses ordinary
// always_ff registers.
module mux_flip_flop (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic m;       // master stage output
  logic clk_n;

  assign clk_n = ~clk;

  // master: select = clk; i0 = d, i1 = m (hold)
  always_latch
    if (!clk) m = d;

  // slave: select = ~clk; i0 = m, i1 = q (hold)
  always_latch
    if (!clk_n) q = m;
endmodule
