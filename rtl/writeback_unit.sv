// Writeback stage: owns the data memory DM and the register file REG, and
// commits the ExState record registered by the execute stage.
//
// WBFlag 1 writes Result into DM[MemWBLoc]; WBFlag 2 writes Result into
// REG[RegWBLoc]; WBFlag 0 writes nothing. The write happens at the rising
// clock edge that ends the cycle in which the record is presented, so each
// instruction is committed one cycle after it was executed, as in the
// specification. The stage also serves the execute stage's reads (four
// register ports and one data memory port, combinational).
// The host_* ports (this design's own) load registers and data before a
// run; a host write wins over a writeback in the same cycle and is meant
// for the time the processor is held in reset. The dbg_* read ports let a
// host inspect registers and data memory.
module writeback_unit
  import riscp_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ex_state_t     ex,
  // execute-stage reads
  input  field_t [3:0]  rf_raddr,
  output word_t  [3:0]  rf_rdata,
  input  word_t         dm_raddr,
  output word_t         dm_rdata,
  // host loading
  input  logic          host_dm_we,
  input  word_t         host_dm_waddr,
  input  word_t         host_dm_wdata,
  input  logic          host_rf_we,
  input  field_t        host_rf_waddr,
  input  word_t         host_rf_wdata,
  // host observation
  input  word_t         dbg_dm_addr,
  output word_t         dbg_dm_rdata,
  input  field_t        dbg_rf_addr,
  output word_t         dbg_rf_rdata
);

  logic   dm_we, rf_we;
  word_t  dm_waddr, dm_wdata, rf_wdata;
  field_t rf_waddr;

  always_comb begin
    dm_we    = (ex.wbflag == WB_MEM);
    dm_waddr = ex.memwbloc;
    dm_wdata = ex.result;
    rf_we    = (ex.wbflag == WB_REG);
    rf_waddr = ex.regwbloc;
    rf_wdata = ex.result;
    if (host_dm_we) begin
      dm_we    = 1'b1;
      dm_waddr = host_dm_waddr;
      dm_wdata = host_dm_wdata;
    end
    if (host_rf_we) begin
      rf_we    = 1'b1;
      rf_waddr = host_rf_waddr;
      rf_wdata = host_rf_wdata;
    end
  end

  word_t [1:0] dm_rd;

  word_mem #(.ADDR_BITS(ADDR_BITS), .W(XLEN), .N_RD(2)) u_dm (
    .clk   (clk),
    .we    (dm_we),
    .waddr (dm_waddr),
    .wdata (dm_wdata),
    .raddr ({dbg_dm_addr, dm_raddr}),
    .rdata (dm_rd)
  );
  assign dm_rdata     = dm_rd[0];
  assign dbg_dm_rdata = dm_rd[1];

  word_t [4:0] rf_rd;

  regfile #(.RA_BITS(FLDW), .W(XLEN), .N_RD(5)) u_rf (
    .clk   (clk),
    .we    (rf_we),
    .waddr (rf_waddr),
    .wdata (rf_wdata),
    .raddr ({dbg_rf_addr, rf_raddr[3], rf_raddr[2], rf_raddr[1], rf_raddr[0]}),
    .rdata (rf_rd)
  );
  assign rf_rdata     = rf_rd[3:0];
  assign dbg_rf_rdata = rf_rd[4];

  // The host may only load while the pipeline has nothing to commit.
  a_host_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !((host_dm_we || host_rf_we) && ex.wbflag != WB_NONE));

endmodule
