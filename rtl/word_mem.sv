// Word-addressed memory used for both program memory and data memory.
//
// Each address holds one whole 32-bit word, as in the specification's
// memory model (read M[A], write M[W / A]). Reads are combinational, so an
// instruction fetch or a load sees the memory within the same cycle; the
// single write port writes at the rising clock edge and the new value is
// visible from the next cycle on. The capacity is 2**ADDR_BITS words: the
// specification uses full 32-bit addresses but gives no memory size, so the
// upper address bits are ignored and addresses wrap modulo the depth.
// N_RD read ports are provided. Contents are not reset.
module word_mem #(
  parameter int unsigned ADDR_BITS = 16,
  parameter int unsigned W         = 32,
  parameter int unsigned N_RD      = 2
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [31:0]           waddr,
  input  logic [W-1:0]          wdata,
  input  logic [N_RD-1:0][31:0] raddr,
  output logic [N_RD-1:0][W-1:0] rdata
);

  logic [W-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[ADDR_BITS-1:0]] <= wdata;
  end

  for (genvar i = 0; i < N_RD; i++) begin : g_rd
    assign rdata[i] = mem[raddr[i][ADDR_BITS-1:0]];
  end

endmodule
