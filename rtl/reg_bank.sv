// reg_bank: one register bank of the cryptoprocessor.
//
// Four M-bit registers, enough to hold one element of F_{q^4} in the basis
// {1, u, v, uv}. Each register has its own write enable and write data, so a
// bank can take one field result into several registers at once or take a
// register-by-register copy of another bank (MoveBank). All four registers are
// visible at the outputs. Registers clear to zero on reset (a choice of this
// design). Writes take effect on the rising clock edge.
module reg_bank #(
  parameter int unsigned M    = gf2m_pkg::M_DEF,
  parameter int unsigned NREG = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [NREG-1:0] we,
  input  logic [M-1:0] wdata [NREG],
  output logic [M-1:0] q     [NREG]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NREG; i++) q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NREG; i++)
        if (we[i]) q[i] <= wdata[i];
    end
  end

endmodule
