// Word operator unit of the processor.
//
// Computes, for one opcode, the 32-bit result the specification defines:
// ADD and MULT keep the low 32 bits of the sum or product, AND/OR/NOT are
// bitwise, SLL shifts REG[rega] left by the whole value of REG[regb] (32 or
// more gives zero), EQ gives all zeros when the operands are equal and all
// ones otherwise, GT gives all zeros when a > b (unsigned) and all ones
// otherwise. The inverted sense of EQ and GT is the specification's.
// Every other opcode yields a + b, which the execute stage uses as the
// LD/ST address (this sharing is this design's choice).
// Purely combinational; no clock.
module word_alu
  import riscp_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  opcode_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  logic [W-1:0] prod;
  assign prod = a * b;   // low word of the product

  always_comb begin
    unique case (op)
      OP_MULT: y = prod;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_NOT:  y = ~a;
      OP_SLL:  y = (b >= W) ? '0 : (a << b);
      OP_EQ:   y = (a == b) ? '0 : '1;
      OP_GT:   y = (a > b)  ? '0 : '1;
      default: y = a + b;   // ADD, and the LD/ST address
    endcase
  end

endmodule
