// Self-checking testbench for word_mem.
// Writes random words at random addresses through the write port, keeps a
// shadow copy here, and reads both combinational read ports back. Also
// checks that a write is not visible before the clock edge, that it is
// visible after it, and that addresses wrap modulo the depth.
module tb_word_mem;
  localparam int unsigned AB = 10;

  logic clk = 0;
  logic we;
  logic [31:0] waddr, wdata;
  logic [1:0][31:0] raddr, rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [2**AB];
  bit          valid  [2**AB];

  word_mem #(.ADDR_BITS(AB), .W(32), .N_RD(2)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
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
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    // fill every word once
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      we = 1; waddr = i; wdata = $urandom;
      shadow[i] = wdata; valid[i] = 1;
    end
    @(negedge clk); we = 0;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a0, a1;
      @(negedge clk);
      a0 = $urandom; a1 = $urandom;
      raddr[0] = a0; raddr[1] = a1;
      we = $urandom_range(0, 1);
      waddr = $urandom; wdata = $urandom;
      #1;
      chk(rdata[0], shadow[a0[AB-1:0]], "port0");
      chk(rdata[1], shadow[a1[AB-1:0]], "port1");
      if (we) begin
        // not yet written before the edge
        raddr[0] = waddr;
        #1;
        chk(rdata[0], shadow[waddr[AB-1:0]], "before edge");
        @(posedge clk); #1;
        shadow[waddr[AB-1:0]] = wdata;
        chk(rdata[0], wdata, "after edge");
        // an alias of the same word
        raddr[1] = waddr ^ (32'h1 << AB);
        #1;
        chk(rdata[1], wdata, "alias");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
