// pairing_cryptoprocessor: programmable cryptoprocessor for bilinear pairings over F_{2^m}.
//
// A small microcoded machine whose only arithmetic is in F_{2^m} (m = 1223,
// f = x^1223 + x^255 + 1): addition, squaring, square root and a 9-cycle
// Karatsuba multiplier, fed from register banks. Pairing algorithms (Miller
// loop, final exponentiation, extension-field arithmetic, Itoh-Tsujii
// inversion) are programs of 16-bit instructions, so curve, tower field and
// distortion map are software choices.
//
// Structure: program_memory (4K x 16, synchronous read) -> instr_decoder ->
// pairing_datapath; program_control sequences the instruction pointer and
// handles Jmp / For / Wait / Jz / End. One instruction executes per clock.
//
// Use: while idle, load the program with prog_we/prog_addr/prog_wdata and the
// operands with host_we/host_bank/host_reg/host_wdata; pulse start (r_in is
// captured into R at the same edge); wait for done; read results through
// host_bank/host_reg/host_rdata. Host writes are ignored while a program runs.
module pairing_cryptoprocessor #(
  parameter int unsigned M      = gf2m_pkg::M_DEF,
  parameter int unsigned K      = gf2m_pkg::K_DEF,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned R_W    = gf2m_pkg::M_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [R_W-1:0]             r_in,
  output logic                       busy,
  output logic                       done,
  input  logic                       prog_we,
  input  logic [gf2m_pkg::IP_W-1:0]  prog_addr,
  input  logic [15:0]                prog_wdata,
  input  logic                       host_we,
  input  logic [2:0]                 host_bank,
  input  logic [1:0]                 host_reg,
  input  logic [M-1:0]               host_wdata,
  output logic [M-1:0]               host_rdata
);
  import gf2m_pkg::*;

  logic [IP_W-1:0] ip, ip_next;
  logic [15:0]     mem_q;
  instr_t          instr;
  dp_ctrl_t        ctrl;
  logic            running, ev_taken, ev_stall, mult_busy, mult_done;

  program_memory #(.AW(IP_W), .DW(16)) u_pmem (
    .clk(clk), .raddr(ip_next), .rdata(mem_q),
    .we(prog_we && !running), .waddr(prog_addr), .wdata(prog_wdata)
  );

  assign instr = instr_t'(mem_q);

  program_control #(.AW(IP_W), .R_W(R_W)) u_ctl (
    .clk(clk), .rst_n(rst_n), .start(start), .r_in(r_in), .instr(instr),
    .ip(ip), .ip_next(ip_next), .running(running), .done(done),
    .ev_taken(ev_taken), .ev_stall(ev_stall)
  );

  instr_decoder u_dec (.instr(instr), .valid(running && !start), .ctrl(ctrl));

  pairing_datapath #(.M(M), .K(K), .DEPTH(DEPTH)) u_dp (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl),
    .host_we(host_we && !running), .host_bank(host_bank), .host_reg(host_reg),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .mult_busy(mult_busy), .mult_done(mult_done)
  );

  assign busy = running;

`ifndef SYNTHESIS
  // A program must only use the bank combinations the datapath supports.
  a_legal_instr: assert property (@(posedge clk) disable iff (!rst_n) !ctrl.illegal)
    else $error("unsupported bank combination in instruction at IP %0d", ip);
`endif

endmodule
