// End-to-end testbench for the pipelined processor pmp, at its default
// parameters.
//
// Phase 1 runs a small program that sums 10 + 9 + ... + 1 in a loop closed
// by a taken JMP, exits through a conditional JMP, stores the sum (55) to
// data word 100 and parks in a one-instruction loop. It checks the sum and
// the cycle on which it is stored: one instruction completes per clock and
// each result is committed two clocks after its instruction is fetched.
//
// Phase 2 fills the whole program and data memories with random contents
// and random instructions of every opcode, runs the processor for many
// cycles and compares PC, CIR, PIR and the ExState record after every clock
// with a cycle-level model of the instruction set kept here, then compares
// every register and every data word. It counts how often each mechanism
// occurred (every opcode, taken and not-taken jumps, memory and register
// writebacks, an operand read one instruction after its producer, which
// sees the old value); one that never occurs counts as a failure.
module tb_pmp;
  import riscp_pkg::*;
  localparam int unsigned AB    = 16;       // pmp's default ADDR_BITS
  localparam int unsigned DEPTH = 1 << AB;

  logic      clk = 0, rst_n;
  logic      pm_we, dm_we, rf_we;
  word_t     pm_waddr, pm_wdata, dm_waddr, dm_wdata, rf_wdata;
  field_t    rf_waddr;
  word_t     dbg_dm_addr, dbg_dm_rdata, dbg_rf_rdata;
  field_t    dbg_rf_addr;
  word_t     pc, cir, pir;
  ex_state_t ex;
  logic      jmp_taken;
  int checks = 0, failures = 0;

  pmp dut (
    .clk(clk), .rst_n(rst_n),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .dm_we(dm_we), .dm_waddr(dm_waddr), .dm_wdata(dm_wdata),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dbg_dm_addr(dbg_dm_addr), .dbg_dm_rdata(dbg_dm_rdata),
    .dbg_rf_addr(dbg_rf_addr), .dbg_rf_rdata(dbg_rf_rdata),
    .pc(pc), .cir(cir), .pir(pir), .ex(ex), .jmp_taken(jmp_taken));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  word_t m_pm [DEPTH];
  word_t m_dm [DEPTH];
  word_t m_rf [256];
  word_t m_pc, m_cir, m_pir;
  word_t m_res, m_mloc;
  logic  m_tk;
  logic [1:0] m_wb;
  logic [7:0] m_rloc;

  int n_op [16];
  int n_taken, n_not_taken, n_memwb, n_regwb, n_stale;
  logic [7:0] prev_dest;
  logic       prev_dest_v;

  // one clock of the whole pipeline, all stages from the same old state
  task automatic model_step();
    logic [7:0] op, ra, rb, rc;
    word_t a, b, c, r0, n_res, n_mloc, faddr;
    logic n_tk, tk;
    logic [1:0] n_wb;
    logic [7:0] n_rloc;
    op = m_cir[31:24]; ra = m_cir[23:16]; rb = m_cir[15:8]; rc = m_cir[7:0];
    a = m_rf[ra]; b = m_rf[rb]; c = m_rf[rc]; r0 = m_rf[0];
    n_res = 0; n_tk = 0; n_wb = 0; n_mloc = 0; n_rloc = 0;
    tk = (op == 8'd11) && (a == r0);
    case (op)
      8'd1:  begin n_res = a + b; n_wb = 2; n_rloc = rc; end
      8'd2:  begin n_res = a * b; n_wb = 2; n_rloc = rc; end
      8'd3:  begin n_res = a & b; n_wb = 2; n_rloc = rc; end
      8'd4:  begin n_res = a | b; n_wb = 2; n_rloc = rc; end
      8'd5:  begin n_res = ~a;    n_wb = 2; n_rloc = rc; end
      8'd6:  begin n_res = (b > 31) ? 0 : (a << b[4:0]); n_wb = 2; n_rloc = rc; end
      8'd7:  begin n_res = m_dm[AB'(a + b)]; n_wb = 2; n_rloc = rc; end
      8'd8:  begin n_res = a + b; n_wb = 1; n_mloc = c; end
      8'd9:  begin n_res = (a == b) ? 0 : 32'hFFFF_FFFF; n_wb = 2; n_rloc = rc; end
      8'd10: begin n_res = (a > b)  ? 0 : 32'hFFFF_FFFF; n_wb = 2; n_rloc = rc; end
      8'd11: if (tk) begin n_res = m_pc + 4; n_tk = 1; n_wb = 2; n_rloc = rb; end
      default: ;
    endcase
    // statistics
    n_op[(op > 8'd11) ? 12 : int'(op)]++;
    if (op == 8'd11) begin if (tk) n_taken++; else n_not_taken++; end
    if (prev_dest_v && op inside {[8'd1:8'd11]} &&
        (prev_dest == ra || (op != 8'd5 && prev_dest == rb))) n_stale++;
    if (m_wb == 2'd1) n_memwb++;
    if (m_wb == 2'd2) n_regwb++;
    prev_dest_v = (n_wb == 2'd2);
    prev_dest   = n_rloc;
    // writeback of the old record
    if (m_wb == 2'd1) m_dm[AB'(m_mloc)] = m_res;
    if (m_wb == 2'd2) m_rf[m_rloc] = m_res;
    // fetch
    faddr = tk ? c : m_pc;
    m_pir = m_cir;
    m_cir = m_pm[AB'(faddr)];
    m_pc  = faddr + 4;
    // execute
    m_res = n_res; m_tk = n_tk; m_wb = n_wb; m_mloc = n_mloc; m_rloc = n_rloc;
  endtask

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic reset_model();
    m_pc = 0; m_cir = 0; m_pir = 0;
    m_res = 0; m_tk = 0; m_wb = 0; m_mloc = 0; m_rloc = 0;
    prev_dest_v = 0; prev_dest = 0;
  endtask

  task automatic host_load_all();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = i; pm_wdata = m_pm[i];
      dm_we = 1; dm_waddr = i; dm_wdata = m_dm[i];
      rf_we = (i < 256); rf_waddr = 8'(i); rf_wdata = m_rf[i % 256];
    end
    @(negedge clk); pm_we = 0; dm_we = 0; rf_we = 0;
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 0;
    pm_we = 0; dm_we = 0; rf_we = 0;
    pm_waddr = 0; pm_wdata = 0; dm_waddr = 0; dm_wdata = 0; rf_waddr = 0; rf_wdata = 0;
    dbg_dm_addr = 0; dbg_rf_addr = 0;

    // ---------------- phase 1: summing loop ----------------
    for (int i = 0; i < DEPTH; i++) begin m_pm[i] = 0; m_dm[i] = 0; end
    for (int i = 0; i < 256; i++) m_rf[i] = 0;
    m_rf[1] = 1; m_rf[2] = 0;                  // initial registers of the example
    m_rf[3] = 10;                              // loop counter
    m_rf[5] = 4;                               // loop head
    m_rf[6] = 28;                              // exit
    m_rf[7] = 100;                             // result address
    m_rf[9] = 32'hFFFF_FFFF;                   // -1
    m_rf[10] = 36;                             // parking loop
    m_pm[0]  = mk_instr(OP_NOP, 0, 0, 0);
    m_pm[4]  = mk_instr(OP_ADD, 4, 3, 4);      // r4 = r4 + r3
    m_pm[8]  = mk_instr(OP_ADD, 3, 9, 3);      // r3 = r3 - 1
    m_pm[12] = mk_instr(OP_NOP, 0, 0, 0);      // r3 not visible to the next
    m_pm[16] = mk_instr(OP_JMP, 3, 8, 6);      // if r3 == r0 goto r6
    m_pm[20] = mk_instr(OP_JMP, 0, 8, 5);      // goto r5
    m_pm[24] = mk_instr(OP_ADD, 1, 1, 4);      // skipped by the jump
    m_pm[28] = mk_instr(OP_ST, 4, 0, 7);       // DM[r7] = r4 + r0
    m_pm[32] = mk_instr(OP_NOP, 0, 0, 0);
    m_pm[36] = mk_instr(OP_JMP, 0, 8, 10);     // park
    host_load_all();
    dbg_dm_addr = 100;
    @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (cyc < 200 && dbg_dm_rdata != 55) begin
      @(posedge clk); cyc++; #1;
    end
    chk(dbg_dm_rdata, 55, "sum stored");
    // 51 instructions up to the store: fetched on clock 51, stored on 53
    chk(cyc, 53, "cycle of the store");
    repeat (10) @(posedge clk);
    #1;
    chk(pc, 40, "parked pc");
    dbg_rf_addr = 4; #1; chk(dbg_rf_rdata, 55, "r4");
    dbg_rf_addr = 3; #1; chk(dbg_rf_rdata, 0, "r3");
    $display("phase 1: sum stored after %0d cycles", cyc);

    // ---------------- phase 2: random programs ----------------
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      rst_n = 0;
      for (int i = 0; i < DEPTH; i++) begin
        int sel;
        logic [7:0] op;
        sel = $urandom_range(0, 99);
        if (sel < 8)       op = 8'd0;
        else if (sel < 88) op = 8'($urandom_range(1, 10));
        else if (sel < 96) op = 8'd11;
        else               op = 8'($urandom_range(12, 255));
        m_pm[i] = mk_instr(op, 8'($urandom_range(0, 7)), 8'($urandom_range(0, 7)),
                           8'($urandom_range(0, 7)));
        m_dm[i] = (i % 3 == 0) ? $urandom : 32'($urandom_range(0, 8));
      end
      for (int i = 0; i < 256; i++) m_rf[i] = $urandom_range(0, 8);
      host_load_all();
      reset_model();
      @(negedge clk);
      rst_n = 1;
      for (int c = 0; c < 20000; c++) begin
        @(posedge clk);
        model_step();
        #1;
        chk(pc, m_pc, "pc");
        chk(cir, m_cir, "cir");
        chk(pir, m_pir, "pir");
        chk({ex.result, ex.memwbloc}, {m_res, m_mloc}, "ex words");
        chk({ex.taken, ex.wbflag, ex.regwbloc}, {m_tk, m_wb, m_rloc}, "ex flags");
      end
      // final architectural state
      for (int r = 0; r < 256; r++) begin
        dbg_rf_addr = 8'(r); #1; chk(dbg_rf_rdata, m_rf[r], "register");
      end
      for (int i = 0; i < DEPTH; i++) begin
        dbg_dm_addr = i; #1; chk(dbg_dm_rdata, m_dm[i], "data word");
      end
    end

    // every mechanism must have occurred
    for (int o = 0; o <= 12; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode class %0d never executed", o); end
    end
    checks++; if (n_taken == 0)     begin failures++; $display("FAIL no taken jump"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("FAIL no untaken jump"); end
    checks++; if (n_memwb == 0)     begin failures++; $display("FAIL no memory writeback"); end
    checks++; if (n_regwb == 0)     begin failures++; $display("FAIL no register writeback"); end
    checks++; if (n_stale == 0)     begin failures++; $display("FAIL no back-to-back dependence"); end
    $display("mechanisms: taken=%0d not_taken=%0d memwb=%0d regwb=%0d back_to_back=%0d",
             n_taken, n_not_taken, n_memwb, n_regwb, n_stale);
    for (int o = 0; o <= 12; o++) $display("  opcode class %0d executed %0d times", o, n_op[o]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
