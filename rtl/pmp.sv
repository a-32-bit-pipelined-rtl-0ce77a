// Three-stage pipelined 32-bit RISC processor (top level).
//
// The fetch, execute and writeback stages all step together on every clock
// edge, each computing its next state from the current state of all three:
//   fetch     : CIR <- PM[PC], PC <- PC + 4, PIR <- CIR (or jump redirect)
//   execute   : ExState <- f(CIR, REG, DM, PC)
//   writeback : commit ExState into DM or REG
// An instruction is thus fetched in cycle t, executed in t+1 and committed
// at the end of t+2; one instruction completes per cycle. A taken JMP in CIR
// redirects fetch in the same cycle, so no instruction after it is
// executed. There is no forwarding or interlock: an instruction sees the
// register or memory result of the instruction immediately before it only
// if one other instruction separates them.
// Interface: while rst_n is low the host loads the program (pm_*), data
// (dm_*) and registers (rf_*); when rst_n goes high execution starts at
// address 0 and continues forever (there is no halt instruction). The
// dbg_* ports read data memory and registers at any time; pc, cir, pir, ex
// and jmp_taken expose the pipeline state.
module pmp
  import riscp_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16,
  parameter int unsigned PC_STEP   = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pm_we,
  input  word_t     pm_waddr,
  input  word_t     pm_wdata,
  input  logic      dm_we,
  input  word_t     dm_waddr,
  input  word_t     dm_wdata,
  input  logic      rf_we,
  input  field_t    rf_waddr,
  input  word_t     rf_wdata,
  input  word_t     dbg_dm_addr,
  output word_t     dbg_dm_rdata,
  input  field_t    dbg_rf_addr,
  output word_t     dbg_rf_rdata,
  output word_t     pc,
  output word_t     cir,
  output word_t     pir,
  output ex_state_t ex,
  output logic      jmp_taken
);

  word_t        jmp_target;
  field_t [3:0] rf_raddr;
  word_t  [3:0] rf_rdata;
  word_t        dm_raddr, dm_rdata;

  fetch_unit #(.ADDR_BITS(ADDR_BITS), .PC_STEP(PC_STEP)) u_fetch (
    .clk        (clk),
    .rst_n      (rst_n),
    .pm_we      (pm_we),
    .pm_waddr   (pm_waddr),
    .pm_wdata   (pm_wdata),
    .jmp_taken  (jmp_taken),
    .jmp_target (jmp_target),
    .pc         (pc),
    .cir        (cir),
    .pir        (pir)
  );

  execute_unit #(.PC_STEP(PC_STEP)) u_exec (
    .clk        (clk),
    .rst_n      (rst_n),
    .cir        (cir),
    .pc         (pc),
    .rf_raddr   (rf_raddr),
    .rf_rdata   (rf_rdata),
    .dm_raddr   (dm_raddr),
    .dm_rdata   (dm_rdata),
    .jmp_taken  (jmp_taken),
    .jmp_target (jmp_target),
    .ex         (ex)
  );

  writeback_unit #(.ADDR_BITS(ADDR_BITS)) u_wb (
    .clk           (clk),
    .rst_n         (rst_n),
    .ex            (ex),
    .rf_raddr      (rf_raddr),
    .rf_rdata      (rf_rdata),
    .dm_raddr      (dm_raddr),
    .dm_rdata      (dm_rdata),
    .host_dm_we    (dm_we),
    .host_dm_waddr (dm_waddr),
    .host_dm_wdata (dm_wdata),
    .host_rf_we    (rf_we),
    .host_rf_waddr (rf_waddr),
    .host_rf_wdata (rf_wdata),
    .dbg_dm_addr   (dbg_dm_addr),
    .dbg_dm_rdata  (dbg_dm_rdata),
    .dbg_rf_addr   (dbg_rf_addr),
    .dbg_rf_rdata  (dbg_rf_rdata)
  );

endmodule
