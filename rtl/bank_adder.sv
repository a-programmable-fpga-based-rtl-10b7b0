// bank_adder: the 4-input adder at the output of banks F and G.
//
// Addition in F_{2^m} is a bitwise XOR. Each register of the bank has a read
// enable; the adder output is the XOR of the enabled registers (zero when none
// is enabled), so one instruction can add up to four registers of a bank, or,
// with a single enable, just pass one register on. Combinational.
module bank_adder #(
  parameter int unsigned M    = gf2m_pkg::M_DEF,
  parameter int unsigned NREG = 4
) (
  input  logic [NREG-1:0] re,
  input  logic [M-1:0]    d [NREG],
  output logic [M-1:0]    sum
);

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < NREG; i++)
      if (re[i]) sum = sum ^ d[i];
  end

endmodule
