// program_control: instruction sequencing of the cryptoprocessor.
//
// Holds the 12-bit instruction pointer IP (address of the instruction now in
// execution), the loop counter of For, the delay counter of Wait and the R
// register. Every cycle it computes ip_next, which addresses the synchronous
// program memory, so the next instruction arrives one clock later with no
// bubble, jumps included:
//   ordinary instruction : IP + 1
//   Jmp(n)               : n
//   For(n)               : on first arrival the counter loads n; then if the
//                          counter is 0 -> IP + 1 (loop left, counter released),
//                          else counter - 1 and IP + 2. The word after For is
//                          normally a Jmp out of the loop, the body follows it
//                          and ends with a Jmp back to the For, so the body runs
//                          n times.
//   Wait(n)              : IP is frozen for n further cycles (n+1 in all)
//   Jz()                 : R[0] == 0 -> IP + 1, else IP + 2; R then shifts
//                          right by one so that successive Jz walk through r
//   End                  : stop, raise done
// start (while idle or running) sets IP to 0, loads R with r_in and begins
// execution; the first instruction executes in the cycle after start.
// The For/Wait/Jz rules and START behaviour follow the architecture; the single
// loop counter, the R shift and End are this design's own choices.
module program_control #(
  parameter int unsigned AW  = gf2m_pkg::IP_W,
  parameter int unsigned R_W = gf2m_pkg::M_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [R_W-1:0] r_in,
  input  gf2m_pkg::instr_t instr,   // word at IP (valid while running)
  output logic [AW-1:0]  ip,
  output logic [AW-1:0]  ip_next,   // program memory read address
  output logic           running,   // instr is being executed this cycle
  output logic           done,      // End reached (cleared by start)
  // events, one cycle wide, for observation
  output logic           ev_taken,  // Jmp, For entering the body, Jz skipping
  output logic           ev_stall   // Wait holding the IP
);
  import gf2m_pkg::*;

  logic [AW-1:0]  for_cnt, wait_cnt;
  logic           for_active, wait_active;
  logic [R_W-1:0] r_q;
  logic [AW-1:0]  n, for_eff, wait_eff;

  assign n        = {instr.op2, instr.op1};
  assign for_eff  = for_active  ? for_cnt  : n;
  assign wait_eff = wait_active ? wait_cnt : n;

  always_comb begin
    ip_next  = ip;
    ev_taken = 1'b0;
    ev_stall = 1'b0;
    if (start) begin
      ip_next = '0;
    end else if (running) begin
      unique case (instr.cmd)
        CMD_JMP: begin ip_next = n; ev_taken = 1'b1; end
        CMD_FOR: begin
          if (for_eff == '0) ip_next = ip + AW'(1);
          else begin ip_next = ip + AW'(2); ev_taken = 1'b1; end
        end
        CMD_WAIT: begin
          if (wait_eff == '0) ip_next = ip + AW'(1);
          else ev_stall = 1'b1;
        end
        CMD_JZ: begin
          if (r_q[0]) begin ip_next = ip + AW'(2); ev_taken = 1'b1; end
          else ip_next = ip + AW'(1);
        end
        CMD_END: ip_next = ip;
        default: ip_next = ip + AW'(1);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip          <= '0;
      running     <= 1'b0;
      done        <= 1'b0;
      for_cnt     <= '0;
      for_active  <= 1'b0;
      wait_cnt    <= '0;
      wait_active <= 1'b0;
      r_q         <= '0;
    end else begin
      ip <= ip_next;
      if (start) begin
        running     <= 1'b1;
        done        <= 1'b0;
        for_active  <= 1'b0;
        wait_active <= 1'b0;
        r_q         <= r_in;
      end else if (running) begin
        unique case (instr.cmd)
          CMD_FOR: begin
            if (for_eff == '0) for_active <= 1'b0;
            else begin for_cnt <= for_eff - AW'(1); for_active <= 1'b1; end
          end
          CMD_WAIT: begin
            if (wait_eff == '0) wait_active <= 1'b0;
            else begin wait_cnt <= wait_eff - AW'(1); wait_active <= 1'b1; end
          end
          CMD_JZ:  r_q <= r_q >> 1;
          CMD_END: begin running <= 1'b0; done <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

endmodule
