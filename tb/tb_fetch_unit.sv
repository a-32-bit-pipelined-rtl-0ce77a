// Self-checking testbench for fetch_unit.
// Loads the program memory with a known pattern while in reset, then runs
// the stage with random jump requests and checks PC, CIR and PIR after every
// clock against a model kept here: sequential fetch loads PM[PC] and adds 4;
// a taken jump loads PM[target] and continues at target + 4; PIR is the
// previous CIR. Reset values are checked as well.
module tb_fetch_unit;
  import riscp_pkg::*;
  localparam int unsigned AB = 8;

  logic  clk = 0, rst_n;
  logic  pm_we;
  word_t pm_waddr, pm_wdata;
  logic  jmp_taken;
  word_t jmp_target;
  word_t pc, cir, pir;
  int checks = 0, failures = 0;
  int jumps = 0;

  word_t m_pc, m_cir, m_pir;
  word_t pm [2**AB];

  fetch_unit #(.ADDR_BITS(AB), .PC_STEP(4)) dut (
    .clk(clk), .rst_n(rst_n), .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .jmp_taken(jmp_taken), .jmp_target(jmp_target), .pc(pc), .cir(cir), .pir(pir));

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
    rst_n = 0; pm_we = 0; pm_waddr = 0; pm_wdata = 0; jmp_taken = 0; jmp_target = 0;
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = i; pm_wdata = $urandom; pm[i] = pm_wdata;
    end
    @(negedge clk); pm_we = 0;
    chk(pc, 0, "reset pc"); chk(cir, 0, "reset cir"); chk(pir, 0, "reset pir");
    rst_n = 1;
    m_pc = 0; m_cir = 0; m_pir = 0;
    for (int i = 0; i < 3000; i++) begin
      word_t addr;
      jmp_taken  = ($urandom_range(0, 3) == 0);
      jmp_target = $urandom;
      addr = jmp_taken ? jmp_target : m_pc;
      if (jmp_taken) jumps++;
      @(posedge clk); #1;
      m_pir = m_cir;
      m_cir = pm[addr[AB-1:0]];
      m_pc  = addr + 4;
      chk(pc, m_pc, "pc"); chk(cir, m_cir, "cir"); chk(pir, m_pir, "pir");
      @(negedge clk);
    end
    checks++;
    if (jumps == 0) begin failures++; $display("FAIL no jump exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
