// minimal_processor_top: the lecture's hardware side by side.
//
// - u_cpu: the one-gate processor, with its program-loading port, 8 primary
//   inputs and 8 output registers brought out.
// - u_ref: the example netlist (majority and parity of a, b, c) built from
//   ordinary gates, driven by primary inputs 0..2 of the processor so its
//   results can be compared with what the processor computes for the same
//   inputs.
// - u_ff: the flip-flop made of two multiplexer latches, clocked by the
//   processor clock, with its own data input and output.
// - u_cg: a stand-alone programmable gate whose truth table sits in four
//   flip-flops, with its own load port, operands and output.
// Timing is that of the processor: one instruction per clock while 'run'.
module minimal_processor_top
  import mp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 16,
  localparam int unsigned IAW       = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              prog_we,
  input  logic [IAW-1:0]    prog_addr,
  input  instr_t            prog_data,
  input  logic [NSLOTS-1:0] in,
  output logic [NSLOTS-1:0] out,
  output logic [IAW-1:0]    pc,
  output instr_t            instr,
  output logic              ref_o1,   // gate-level majority of in[2:0]
  output logic              ref_o2,   // gate-level parity of in[2:0]
  input  logic              ff_d,
  output logic              ff_q,
  input  logic              cg_we,    // load the stand-alone gate's truth table
  input  logic [3:0]        cg_fn,
  input  logic              cg_a,
  input  logic              cg_b,
  output logic [3:0]        cg_table,
  output logic              cg_y
);
  one_gate_processor #(.IMEM_DEPTH(IMEM_DEPTH)) u_cpu (
    .clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data, .in, .out, .pc, .instr
  );

  preclass1_logic u_ref (.a(in[0]), .b(in[1]), .c(in[2]), .o1(ref_o1), .o2(ref_o2));

  mux_flip_flop u_ff (.clk, .d(ff_d), .q(ff_q));

  config_gate u_cg (
    .clk, .rst_n, .cfg_we(cg_we), .cfg_fn(cg_fn), .a(cg_a), .b(cg_b), .fn(cg_table), .y(cg_y)
  );
endmodule
