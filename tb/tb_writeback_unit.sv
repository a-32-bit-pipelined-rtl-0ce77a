// Self-checking testbench for writeback_unit.
// Loads registers and data memory through the host ports, then presents
// random ExState records (none / memory / register writeback) and checks,
// through the execute-side and observation read ports, that exactly the
// addressed word or register took the result at the clock edge, against
// shadow copies kept here.
module tb_writeback_unit;
  import riscp_pkg::*;
  localparam int unsigned AB = 8;

  logic         clk = 0, rst_n;
  ex_state_t    ex;
  field_t [3:0] rf_raddr;
  word_t  [3:0] rf_rdata;
  word_t        dm_raddr, dm_rdata;
  logic         host_dm_we, host_rf_we;
  word_t        host_dm_waddr, host_dm_wdata, host_rf_wdata;
  field_t       host_rf_waddr;
  word_t        dbg_dm_addr, dbg_dm_rdata, dbg_rf_rdata;
  field_t       dbg_rf_addr;
  int checks = 0, failures = 0;

  word_t sh_rf [256];
  word_t sh_dm [2**AB];

  writeback_unit #(.ADDR_BITS(AB)) dut (
    .clk(clk), .rst_n(rst_n), .ex(ex), .rf_raddr(rf_raddr), .rf_rdata(rf_rdata),
    .dm_raddr(dm_raddr), .dm_rdata(dm_rdata),
    .host_dm_we(host_dm_we), .host_dm_waddr(host_dm_waddr), .host_dm_wdata(host_dm_wdata),
    .host_rf_we(host_rf_we), .host_rf_waddr(host_rf_waddr), .host_rf_wdata(host_rf_wdata),
    .dbg_dm_addr(dbg_dm_addr), .dbg_dm_rdata(dbg_dm_rdata),
    .dbg_rf_addr(dbg_rf_addr), .dbg_rf_rdata(dbg_rf_rdata));

  always #5 clk = ~clk;

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    ex = '{result: 0, taken: 0, wbflag: WB_NONE, memwbloc: 0, regwbloc: 0};
    rf_raddr = '0; dm_raddr = 0; dbg_dm_addr = 0; dbg_rf_addr = 0;
    host_dm_we = 0; host_rf_we = 0; host_dm_waddr = 0; host_dm_wdata = 0;
    host_rf_waddr = 0; host_rf_wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_rf_we = 1; host_rf_waddr = 8'(i); host_rf_wdata = $urandom; sh_rf[i] = host_rf_wdata;
      host_dm_we = 1; host_dm_waddr = i; host_dm_wdata = $urandom; sh_dm[i] = host_dm_wdata;
    end
    @(negedge clk); host_rf_we = 0; host_dm_we = 0;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ex.result   = $urandom;
      ex.taken    = 1'($urandom);
      ex.wbflag   = wbflag_e'($urandom_range(0, 2));
      ex.memwbloc = $urandom;
      ex.regwbloc = 8'($urandom);
      @(posedge clk); #1;
      if (ex.wbflag == WB_MEM) sh_dm[ex.memwbloc[AB-1:0]] = ex.result;
      if (ex.wbflag == WB_REG) sh_rf[ex.regwbloc] = ex.result;
      // the written location and a random one, through every port
      for (int p = 0; p < 4; p++) rf_raddr[p] = (p == 0) ? ex.regwbloc : 8'($urandom);
      dbg_rf_addr = ex.regwbloc ^ 8'(i % 2);
      dm_raddr    = ex.memwbloc;
      dbg_dm_addr = $urandom;
      #1;
      for (int p = 0; p < 4; p++) chk(rf_rdata[p], sh_rf[rf_raddr[p]], "rf read");
      chk(dbg_rf_rdata, sh_rf[dbg_rf_addr], "dbg rf read");
      chk(dm_rdata, sh_dm[dm_raddr[AB-1:0]], "dm read");
      chk(dbg_dm_rdata, sh_dm[dbg_dm_addr[AB-1:0]], "dbg dm read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
