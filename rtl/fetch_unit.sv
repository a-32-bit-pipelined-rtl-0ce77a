// Fetch stage: program memory PM, program counter PC, current instruction
// register CIR and previous instruction register PIR.
//
// Every clock the stage loads CIR with PM[PC], advances PC by PC_STEP and
// moves the old CIR into PIR, as in the specification. When the execute
// stage reports that the JMP now in CIR is taken, CIR is loaded with the
// instruction at the jump target (REG[regc] of the JMP) instead, and PC
// becomes target + PC_STEP. The instruction that sequential fetch would have
// loaded is thus never executed: a taken jump costs no bubble and has no
// delay slot. Using the same-cycle jump decision and continuing at
// target + PC_STEP are this design's reading of the specification's jump
// equations; the step of 4 follows the specification's constant "Four".
// Reset (asynchronous, active low) clears PC, CIR and PIR, and an all-zero
// CIR is a NOP. The pm_* port lets a host load the program.
module fetch_unit
  import riscp_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16,
  parameter int unsigned PC_STEP   = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // program load
  input  logic  pm_we,
  input  word_t pm_waddr,
  input  word_t pm_wdata,
  // redirect from the execute stage
  input  logic  jmp_taken,
  input  word_t jmp_target,
  // fetch state
  output word_t pc,
  output word_t cir,
  output word_t pir
);

  word_t fetch_addr;
  word_t pm_rdata;

  assign fetch_addr = jmp_taken ? jmp_target : pc;

  word_mem #(.ADDR_BITS(ADDR_BITS), .W(XLEN), .N_RD(1)) u_pm (
    .clk   (clk),
    .we    (pm_we),
    .waddr (pm_waddr),
    .wdata (pm_wdata),
    .raddr (fetch_addr),
    .rdata (pm_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= ZERO32;
      cir <= ZERO32;
      pir <= ZERO32;
    end else begin
      pc  <= fetch_addr + word_t'(PC_STEP);
      cir <= pm_rdata;
      pir <= cir;
    end
  end

endmodule
