// Self-checking testbench for execute_unit.
// Serves the stage's register and data memory reads from arrays kept here,
// presents random instructions of every opcode (plus unassigned ones), and
// checks the combinational jump outputs before the edge and the registered
// ExState record after it against the instruction semantics worked out
// here: ALU ops and LD write REG[regc], ST writes REG[rega]+REG[regb] to
// DM[REG[regc]], a JMP is taken when REG[rega] == REG[0], goes to REG[regc]
// and links PC + 4 into REG[regb].
module tb_execute_unit;
  import riscp_pkg::*;

  logic         clk = 0, rst_n;
  word_t        cir, pc;
  field_t [3:0] rf_raddr;
  word_t  [3:0] rf_rdata;
  word_t        dm_raddr, dm_rdata;
  logic         jmp_taken;
  word_t        jmp_target;
  ex_state_t    ex;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0;

  word_t regs [256];
  word_t dmem [256];

  execute_unit #(.PC_STEP(4)) dut (
    .clk(clk), .rst_n(rst_n), .cir(cir), .pc(pc), .rf_raddr(rf_raddr), .rf_rdata(rf_rdata),
    .dm_raddr(dm_raddr), .dm_rdata(dm_rdata), .jmp_taken(jmp_taken), .jmp_target(jmp_target),
    .ex(ex));

  for (genvar i = 0; i < 4; i++) begin : g_rf
    assign rf_rdata[i] = regs[rf_raddr[i]];
  end
  assign dm_rdata = dmem[dm_raddr[7:0]];

  always #5 clk = ~clk;

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h (cir=%h)", what, got, exp, cir);
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
    rst_n = 0; cir = 0; pc = 0;
    for (int i = 0; i < 256; i++) begin regs[i] = $urandom_range(0, 20); dmem[i] = $urandom; end
    #12;
    chk({ex.result, ex.memwbloc}, 64'd0, "reset ExState words");
    chk({ex.taken, ex.wbflag, ex.regwbloc}, 64'd0, "reset ExState flags");
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] op, ra, rb, rc;
      word_t a, b, c, r0, e_res, e_mloc;
      logic e_tk;
      logic [1:0] e_wb;
      logic [7:0] e_rloc;
      @(negedge clk);
      op = 8'($urandom_range(0, 13));
      ra = 8'($urandom_range(0, 15)); rb = 8'($urandom_range(0, 15)); rc = 8'($urandom_range(0, 15));
      for (int r = 0; r < 16; r++) regs[r] = (i % 5 == 0) ? $urandom : $urandom_range(0, 6);
      cir = {op, ra, rb, rc};
      pc = $urandom;
      a = regs[ra]; b = regs[rb]; c = regs[rc]; r0 = regs[0];
      e_res = 0; e_tk = 0; e_wb = 0; e_mloc = 0; e_rloc = 0;
      case (op)
        8'd1:  begin e_res = a + b; e_wb = 2; e_rloc = rc; end
        8'd2:  begin e_res = a * b; e_wb = 2; e_rloc = rc; end
        8'd3:  begin e_res = a & b; e_wb = 2; e_rloc = rc; end
        8'd4:  begin e_res = a | b; e_wb = 2; e_rloc = rc; end
        8'd5:  begin e_res = ~a;    e_wb = 2; e_rloc = rc; end
        8'd6:  begin e_res = (b > 31) ? 0 : (a << b[4:0]); e_wb = 2; e_rloc = rc; end
        8'd7:  begin e_res = dmem[8'(a + b)]; e_wb = 2; e_rloc = rc; end
        8'd8:  begin e_res = a + b; e_wb = 1; e_mloc = c; end
        8'd9:  begin e_res = (a == b) ? 0 : 32'hFFFF_FFFF; e_wb = 2; e_rloc = rc; end
        8'd10: begin e_res = (a > b) ? 0 : 32'hFFFF_FFFF; e_wb = 2; e_rloc = rc; end
        8'd11: if (a == r0) begin e_res = pc + 4; e_tk = 1; e_wb = 2; e_rloc = rb; end
        default: ;
      endcase
      #1;
      chk(jmp_taken, (op == 8'd11) && (a == r0), "jmp_taken");
      if (op == 8'd11) begin
        chk(jmp_target, c, "jmp_target");
        if (a == r0) n_taken++; else n_not_taken++;
      end
      @(posedge clk); #1;
      chk(ex.result, e_res, "result");
      chk(ex.taken, e_tk, "taken");
      chk(ex.wbflag, e_wb, "wbflag");
      chk(ex.memwbloc, e_mloc, "memwbloc");
      chk(ex.regwbloc, e_rloc, "regwbloc");
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0) begin
      failures++; $display("FAIL jump cases not covered: taken=%0d not=%0d", n_taken, n_not_taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
