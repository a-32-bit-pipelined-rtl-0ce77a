// Execute stage: decodes CIR, reads its operands and registers the ExState
// record that tells the writeback stage what to write where.
//
// Operands come straight from the register file of the writeback stage in
// the same cycle (read ports: rega, regb, regc, register 0), and a load reads
// the data memory in the same cycle, both combinationally. There is no
// forwarding: the result of the instruction just before is written at the
// same clock edge at which this one's ExState is registered, so it is seen
// only by the instruction after next, as in the specification.
//   NOP, unknown : no writeback
//   ADD MULT AND OR NOT SLL EQ GT : REG[regc] <- alu(REG[rega], REG[regb])
//   LD           : REG[regc] <- DM[REG[rega] + REG[regb]]
//   ST           : DM[REG[regc]] <- REG[rega] + REG[regb]
//   JMP          : if REG[rega] == REG[0]: fetch jumps to REG[regc] and
//                  REG[regb] <- PC + PC_STEP (PC is the fetch PC of this
//                  cycle, the JMP's address + PC_STEP); otherwise nothing.
// jmp_taken and jmp_target are combinational outputs to the fetch stage.
// Taking register numbers (not register contents) as the writeback
// destination and executing unknown opcodes as NOP are this design's
// reading of the specification. Reset (asynchronous, active low) clears the
// ExState record.
module execute_unit
  import riscp_pkg::*;
#(
  parameter int unsigned PC_STEP = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            cir,
  input  word_t            pc,
  // register file reads: [0] rega, [1] regb, [2] regc, [3] register 0
  output field_t [3:0]     rf_raddr,
  input  word_t  [3:0]     rf_rdata,
  // data memory read (LD)
  output word_t            dm_raddr,
  input  word_t            dm_rdata,
  // to the fetch stage
  output logic             jmp_taken,
  output word_t            jmp_target,
  // registered ExState
  output ex_state_t        ex
);

  opcode_e   op;
  word_t     ra_val, rb_val, rc_val, r0_val;
  word_t     alu_y;
  ex_state_t ex_next;

  assign op = opcode_e'(f_opcode(cir));

  assign rf_raddr[0] = f_rega(cir);
  assign rf_raddr[1] = f_regb(cir);
  assign rf_raddr[2] = f_regc(cir);
  assign rf_raddr[3] = '0;
  assign ra_val = rf_rdata[0];
  assign rb_val = rf_rdata[1];
  assign rc_val = rf_rdata[2];
  assign r0_val = rf_rdata[3];

  word_alu #(.W(XLEN)) u_alu (.op(op), .a(ra_val), .b(rb_val), .y(alu_y));

  // alu_y is REG[rega] + REG[regb] for LD
  assign dm_raddr   = alu_y;
  assign jmp_taken  = (op == OP_JMP) && (ra_val == r0_val);
  assign jmp_target = rc_val;

  always_comb begin
    ex_next = '{result: ZERO32, taken: 1'b0, wbflag: WB_NONE,
                memwbloc: ZERO32, regwbloc: '0};
    case (op)
      OP_ADD, OP_MULT, OP_AND, OP_OR, OP_NOT, OP_SLL, OP_EQ, OP_GT: begin
        ex_next.result   = alu_y;
        ex_next.wbflag   = WB_REG;
        ex_next.regwbloc = f_regc(cir);
      end
      OP_LD: begin
        ex_next.result   = dm_rdata;
        ex_next.wbflag   = WB_REG;
        ex_next.regwbloc = f_regc(cir);
      end
      OP_ST: begin
        ex_next.result   = alu_y;
        ex_next.wbflag   = WB_MEM;
        ex_next.memwbloc = rc_val;
      end
      OP_JMP: begin
        if (jmp_taken) begin
          ex_next.result   = pc + word_t'(PC_STEP);
          ex_next.taken    = 1'b1;
          ex_next.wbflag   = WB_REG;
          ex_next.regwbloc = f_regb(cir);
        end
      end
      default: ;  // NOP and unassigned opcodes
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ex <= '{result: ZERO32, taken: 1'b0, wbflag: WB_NONE,
                        memwbloc: ZERO32, regwbloc: '0};
    else        ex <= ex_next;
  end

endmodule
