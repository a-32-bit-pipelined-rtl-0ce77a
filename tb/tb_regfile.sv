// Self-checking testbench for regfile (256 x 32, five read ports).
// Loads all registers, then mixes random writes with random reads on all
// five ports against a shadow copy; a read in the cycle of a write to the
// same register must return the old value, and the new value afterwards.
module tb_regfile;
  logic clk = 0;
  logic we;
  logic [7:0] waddr;
  logic [31:0] wdata;
  logic [4:0][7:0] raddr;
  logic [4:0][31:0] rdata;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
               .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 8'($urandom); wdata = $urandom;
      for (int p = 0; p < 5; p++) raddr[p] = 8'($urandom);
      if (i % 3 == 0) raddr[i % 5] = waddr;
      #1;
      for (int p = 0; p < 5; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d reg %0d got=%h exp=%h", p, raddr[p], rdata[p], shadow[raddr[p]]);
        end
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
