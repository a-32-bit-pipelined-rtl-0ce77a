// Self-checking testbench for word_alu.
// Applies directed corner cases and random operands for every opcode and
// compares the result with a reference worked out here from the operator
// definitions (truncated sum and product, bitwise logic, shift by the full
// count, inverted-sense EQ/GT returning all zeros or all ones).
module tb_word_alu;
  import riscp_pkg::*;

  opcode_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  word_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_model(opcode_e o, logic [31:0] x, logic [31:0] z);
    longint unsigned p;
    logic [31:0] s;
    case (o)
      OP_MULT: begin p = longint'(x) * longint'(z); return p[31:0]; end
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_NOT:  return ~x;
      OP_SLL: begin
        s = x;
        for (longint unsigned i = 0; i < z && i < 40; i++) s = {s[30:0], 1'b0};
        return s;
      end
      OP_EQ:   return (x == z) ? 32'h0 : 32'hFFFF_FFFF;
      OP_GT:   return (x > z)  ? 32'h0 : 32'hFFFF_FFFF;
      default: begin p = longint'(x) + longint'(z); return p[31:0]; end
    endcase
  endfunction

  task automatic apply(opcode_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = ref_model(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops[12] = '{OP_NOP, OP_ADD, OP_MULT, OP_AND, OP_OR, OP_NOT,
                         OP_SLL, OP_LD, OP_ST, OP_EQ, OP_GT, OP_JMP};
    // directed corners
    apply(OP_ADD, 32'hFFFF_FFFF, 32'h1);          // wraps to 0
    apply(OP_MULT, 32'h1_0000, 32'h1_0000);        // low word 0
    apply(OP_MULT, 32'd12345, 32'd678);
    apply(OP_SLL, 32'h1, 32'd31);
    apply(OP_SLL, 32'h1, 32'd32);                 // shifted out
    apply(OP_SLL, 32'hF, 32'h8000_0000);
    apply(OP_EQ, 32'd7, 32'd7);
    apply(OP_EQ, 32'd7, 32'd8);
    apply(OP_GT, 32'd9, 32'd8);
    apply(OP_GT, 32'd8, 32'd8);
    apply(OP_GT, 32'h8000_0000, 32'd1);           // unsigned compare
    apply(OP_NOT, 32'h0F0F_00FF, 32'h0);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = $urandom;
      z = $urandom;
      if (i % 4 == 0) z = z % 40;   // small shift counts
      if (i % 7 == 0) z = x;        // equality
      apply(ops[i % 12], x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
