// tb_program_control: runs a small program from a testbench memory and checks
// the exact instruction-pointer trace: Jmp, a For(3) loop (body runs 3 times,
// then the loop exits through the word after For), Wait(5) (6 cycles at one
// IP), Jz taken and not taken as R shifts, and End raising done. A second run
// with a different r checks that Jz follows R and that start reloads R.
module tb_program_control;
  import gf2m_pkg::*;
  localparam int unsigned RW = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [RW-1:0] r_in = '0;
  instr_t instr;
  logic [11:0] ip, ip_next;
  logic running, done, ev_taken, ev_stall;
  logic [15:0] mem [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  program_control #(.R_W(RW)) dut (
    .clk, .rst_n, .start, .r_in, .instr, .ip, .ip_next, .running, .done, .ev_taken, .ev_stall
  );

  always_ff @(posedge clk) instr <= instr_t'(mem[ip_next[3:0]]);

  task automatic run(logic [RW-1:0] r, int exp_trace[$], int exp_stalls);
    int trace[$];
    int stalls = 0;
    @(negedge clk);
    r_in = r; start = 1;
    @(negedge clk);
    start = 0;
    while (running && trace.size() < 100) begin
      trace.push_back(int'(ip));
      if (ev_stall) stalls++;
      @(negedge clk);
    end
    checks++;
    if (trace != exp_trace) begin
      failures++;
      $display("FAIL trace %p expected %p", trace, exp_trace);
    end
    checks++;
    if (!done) begin failures++; $display("FAIL done not set"); end
    checks++;
    if (stalls != exp_stalls) begin failures++; $display("FAIL stalls %0d", stalls); end
  endtask

  initial begin
    instr = '0;
    mem[0]  = mk_ctrl(CMD_JMP, 12'd2);
    mem[1]  = mk_ctrl(CMD_END, 12'd0);
    mem[2]  = mk_ctrl(CMD_FOR, 12'd3);
    mem[3]  = mk_ctrl(CMD_JMP, 12'd7);
    mem[4]  = mk_ctrl(CMD_WAIT, 12'd0);
    mem[5]  = mk_ctrl(CMD_WAIT, 12'd0);
    mem[6]  = mk_ctrl(CMD_JMP, 12'd2);
    mem[7]  = mk_ctrl(CMD_WAIT, 12'd5);
    mem[8]  = mk_ctrl(CMD_JZ, 12'd0);
    mem[9]  = mk_ctrl(CMD_END, 12'd0);
    mem[10] = mk_ctrl(CMD_JZ, 12'd0);
    mem[11] = mk_ctrl(CMD_END, 12'd0);
    for (int i = 12; i < 16; i++) mem[i] = mk_ctrl(CMD_END, 12'd0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(8'b01, '{0,2,4,5,6,2,4,5,6,2,4,5,6,2,3,7,7,7,7,7,7,8,10,11}, 5);
    run(8'b10, '{0,2,4,5,6,2,4,5,6,2,4,5,6,2,3,7,7,7,7,7,7,8,9}, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
