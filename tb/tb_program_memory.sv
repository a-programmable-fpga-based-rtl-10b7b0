// tb_program_memory: fills all 4K words through the write port, then reads them
// back in random order, checking the one-cycle read latency.
module tb_program_memory;
  logic clk = 0, we = 0;
  logic [11:0] raddr = '0, waddr = '0;
  logic [15:0] rdata, wdata = '0;
  logic [15:0] model [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  program_memory dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 600; t++) begin
      raddr = 12'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
