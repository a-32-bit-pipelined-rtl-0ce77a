// Register file: 2**RA_BITS registers of W bits (256 x 32 by default).
//
// Registers are addressed by the one-byte register fields of the
// instruction word. There are N_RD combinational read ports (the execute
// stage reads rega, regb, regc and register 0 in one cycle) and one write
// port that writes at the rising clock edge; a register written in a cycle
// reads back its new value from the next cycle on, so a read in the same
// cycle as a write to the same register returns the old value. Register 0 is
// an ordinary register. Contents are not reset; they are loaded by the host.
module regfile #(
  parameter int unsigned RA_BITS = 8,
  parameter int unsigned W       = 32,
  parameter int unsigned N_RD    = 5
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [RA_BITS-1:0]           waddr,
  input  logic [W-1:0]                 wdata,
  input  logic [N_RD-1:0][RA_BITS-1:0] raddr,
  output logic [N_RD-1:0][W-1:0]       rdata
);

  logic [W-1:0] regs [2**RA_BITS];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  for (genvar i = 0; i < N_RD; i++) begin : g_rd
    assign rdata[i] = regs[raddr[i]];
  end

endmodule
