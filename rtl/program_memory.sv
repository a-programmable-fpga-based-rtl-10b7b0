// program_memory: instruction store of the cryptoprocessor.
//
// 4K words of 16 bits (the reach of the 12-bit instruction pointer), written as
// an array so that FPGA tools map it onto block RAM. The read port is
// synchronous: rdata shows mem[raddr] one clock after raddr is presented. The
// program control drives raddr with the next instruction pointer, so the word
// arrives exactly when that instruction is to execute. A separate write port
// loads the program while the processor is idle. Contents are not reset.
module program_memory #(
  parameter int unsigned AW = gf2m_pkg::IP_W,
  parameter int unsigned DW = gf2m_pkg::INSTR_W
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
