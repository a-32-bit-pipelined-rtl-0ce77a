// Shared definitions of the three-stage pipelined 32-bit RISC processor.
//
// Every instruction is one 32-bit word made of four one-byte fields:
//   [31:24] opcode   [23:16] rega   [15:8] regb   [7:0] regc
// The opcode values and the field positions are the specification's.
// ex_state_t is the record that the execute stage registers and the
// writeback stage consumes (result, taken flag, writeback kind, memory
// writeback location, register writeback location).
package riscp_pkg;

  localparam int unsigned XLEN    = 32;  // machine word
  localparam int unsigned FLDW    = 8;   // opcode and register address field

  typedef logic [XLEN-1:0] word_t;
  typedef logic [FLDW-1:0] field_t;

  typedef enum logic [FLDW-1:0] {
    OP_NOP  = 8'h00,
    OP_ADD  = 8'h01,
    OP_MULT = 8'h02,
    OP_AND  = 8'h03,
    OP_OR   = 8'h04,
    OP_NOT  = 8'h05,
    OP_SLL  = 8'h06,
    OP_LD   = 8'h07,
    OP_ST   = 8'h08,
    OP_EQ   = 8'h09,
    OP_GT   = 8'h0A,
    OP_JMP  = 8'h0B
  } opcode_e;

  // Writeback kind: 0 = none, 1 = data memory, 2 = register.
  typedef enum logic [1:0] {
    WB_NONE = 2'd0,
    WB_MEM  = 2'd1,
    WB_REG  = 2'd2
  } wbflag_e;

  typedef struct packed {
    word_t   result;     // value to write back
    logic    taken;      // the executed instruction was a taken JMP
    wbflag_e wbflag;     // where the result goes
    word_t   memwbloc;   // data memory address for WB_MEM
    field_t  regwbloc;   // register number for WB_REG
  } ex_state_t;

  localparam word_t ZERO32   = '0;

  function automatic field_t f_opcode(word_t w); return w[31:24]; endfunction
  function automatic field_t f_rega  (word_t w); return w[23:16]; endfunction
  function automatic field_t f_regb  (word_t w); return w[15:8];  endfunction
  function automatic field_t f_regc  (word_t w); return w[7:0];   endfunction

  function automatic word_t mk_instr(field_t op, field_t a, field_t b, field_t c);
    return {op, a, b, c};
  endfunction

endpackage
