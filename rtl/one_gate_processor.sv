// one_gate_processor: a stored-program processor with a single physical gate.
//
// A logic netlist is evaluated one gate per instruction. The values of the
// simulated gates live in an 8-slot one-bit data memory; each instruction
// names up to two source slots, a gate function (a 4-bit truth table for the
// multiplexer-based programmable gate) and a destination. The program sits
// in an instruction memory addressed by a program counter that starts at 0
// and adds 1 per instruction.
//
// One instruction per clock cycle while 'run' is high: the word at PC is read,
// decoded, the two operand slots are read, the gate evaluates, and at the
// rising edge the result is written (to a data slot for READ and GATE, to an
// output register for WRITE) and PC advances. A result written by one
// instruction is therefore visible to the next one. PC wraps to 0 after the
// last word, so the program repeats and the outputs are refreshed every
// IMEM_DEPTH cycles.
//
// While 'run' is low nothing is written and PC holds; the program is loaded
// then through prog_we/prog_addr/prog_data. rst_n (active low, asynchronous)
// returns PC to 0 and clears the output registers.
//
// From the lecture: the single programmable gate, the data memory of 8 slots,
// the 15-bit instruction format and its codes, the input multiplexer, the
// output registers, the instruction memory with a +1 program counter. This
// design's choices: one instruction per cycle with asynchronous reads, the
// 'run' and loading ports, 16 instruction words, 8 inputs and 8 outputs, the
// wrap-around of PC and type code 10 as a no-op.
module one_gate_processor
  import mp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 16,
  localparam int unsigned IAW       = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,        // execute one instruction per cycle
  input  logic              prog_we,    // load an instruction word (run low)
  input  logic [IAW-1:0]    prog_addr,
  input  instr_t            prog_data,
  input  logic [NSLOTS-1:0] in,         // primary inputs, read by READ
  output logic [NSLOTS-1:0] out,        // output registers, loaded by WRITE
  output logic [IAW-1:0]    pc,         // current program counter
  output instr_t            instr       // instruction at pc
);
  logic [SLOT_AW-1:0] ra0, ra1, in_sel, wa;
  gatefn_t            fn;
  logic               dm_we, dm_src_in, out_we;
  logic               op0, op1, gate_y, in_y, wd;

  pc_counter #(.AW(IAW)) u_pc (
    .clk, .rst_n, .en(run), .pc
  );

  instr_mem #(.DEPTH(IMEM_DEPTH), .W(INSTR_W)) u_imem (
    .clk, .ra(pc), .rd(instr),
    .we(prog_we), .wa(prog_addr), .wd(prog_data)
  );

  instr_decoder u_dec (
    .instr, .ra0, .ra1, .in_sel, .fn, .dm_we, .dm_src_in, .wa, .out_we
  );

  data_mem #(.NSLOTS(NSLOTS), .W(1)) u_dmem (
    .clk, .ra0, .rd0(op0), .ra1, .rd1(op1),
    .we(dm_we && run), .wa, .wd
  );

  prog_gate u_gate (.fn, .a(op0), .b(op1), .y(gate_y));

  input_mux #(.N_IN(NSLOTS)) u_inmux (.in, .sel(in_sel), .y(in_y));

  // data memory write value: the selected input (READ) or the gate (GATE)
  mux2 u_wsel (.s(dm_src_in), .i0(gate_y), .i1(in_y), .y(wd));

  output_regs #(.N_OUT(NSLOTS)) u_out (
    .clk, .rst_n, .we(out_we && run), .wa, .d(gate_y), .q(out)
  );

  // The program may only be changed while the processor is stopped.
  a_prog_stopped: assert property (@(posedge clk)
    prog_we |-> !run);
endmodule
