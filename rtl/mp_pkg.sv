// mp_pkg: types and constants shared by the one-gate processor.
//
// An instruction is 15 bits, most significant field first:
//   [14:13] type   READ=00, GATE=01, WRITE=11 (10 is unused and acts as a no-op here)
//   [12:9]  gate function, the truth table of the programmable gate
//           (AND=0001, OR=0111, XOR=0110, NONE=0000, SEL0=0101)
//   [8:6]   first operand field (In0): data slot, or input index for READ
//   [5:3]   second operand field (In1): data slot
//   [2:0]   destination field (Out): data slot, or output register for WRITE
// The field widths, type codes and function codes follow the lecture; the
// meaning of the unused type code 10 is this design's choice.
package mp_pkg;

  localparam int unsigned SLOT_AW  = 3;             // 8 data slots
  localparam int unsigned NSLOTS   = 1 << SLOT_AW;
  localparam int unsigned INSTR_W  = 2 + 4 + 3 * SLOT_AW;  // 15

  typedef enum logic [1:0] {
    T_READ  = 2'b00,
    T_GATE  = 2'b01,
    T_NOP   = 2'b10,
    T_WRITE = 2'b11
  } itype_e;

  // Gate functions: bit 3 is the output for operands (In1,In0) = (0,0),
  // bit 2 for (0,1), bit 1 for (1,0), bit 0 for (1,1).
  typedef logic [3:0] gatefn_t;
  localparam gatefn_t F_NONE = 4'b0000;
  localparam gatefn_t F_AND  = 4'b0001;
  localparam gatefn_t F_XOR  = 4'b0110;
  localparam gatefn_t F_OR   = 4'b0111;
  localparam gatefn_t F_SEL0 = 4'b0101;

  typedef struct packed {
    itype_e               itype;
    gatefn_t              fn;
    logic [SLOT_AW-1:0]   in0;
    logic [SLOT_AW-1:0]   in1;
    logic [SLOT_AW-1:0]   out;
  } instr_t;

  // Assemble an instruction word.
  function automatic instr_t mk_instr(itype_e t, gatefn_t f, logic [SLOT_AW-1:0] a,
                                      logic [SLOT_AW-1:0] b, logic [SLOT_AW-1:0] o);
    return '{itype: t, fn: f, in0: a, in1: b, out: o};
  endfunction

endpackage
