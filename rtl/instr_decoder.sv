// instr_decoder: turns an instruction word into the datapath controls.
//
// The 15-bit word is split into type, gate function and three 3-bit fields
// (see mp_pkg). Per type:
//   READ  : the input selected by In0 is written into data slot Out
//   GATE  : slots In0 and In1 go through the programmable gate, the result
//           is written into slot Out
//   WRITE : slot In0 goes through the gate (function SEL0 passes it) and the
//           result loads output register Out
//   10    : nothing is written (this design's no-op)
// Purely combinational.
module instr_decoder
  import mp_pkg::*;
(
  input  instr_t             instr,
  output logic [SLOT_AW-1:0] ra0,      // data memory read address, first operand
  output logic [SLOT_AW-1:0] ra1,      // data memory read address, second operand
  output logic [SLOT_AW-1:0] in_sel,   // primary input to read
  output gatefn_t            fn,       // truth table for the programmable gate
  output logic               dm_we,    // write data memory
  output logic               dm_src_in,// 1: write the selected input, 0: the gate output
  output logic [SLOT_AW-1:0] wa,       // data slot or output register to write
  output logic               out_we    // load output register wa
);
  always_comb begin
    ra0       = instr.in0;
    ra1       = instr.in1;
    in_sel    = instr.in0;
    fn        = instr.fn;
    wa        = instr.out;
    dm_we     = 1'b0;
    dm_src_in = 1'b0;
    out_we    = 1'b0;
    unique case (instr.itype)
      T_READ:  begin dm_we = 1'b1; dm_src_in = 1'b1; end
      T_GATE:  dm_we  = 1'b1;
      T_WRITE: out_we = 1'b1;
      T_NOP:   ;
    endcase
  end
endmodule
