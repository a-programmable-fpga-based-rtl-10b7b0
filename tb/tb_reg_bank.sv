// tb_reg_bank: reset to zero, single and multiple register writes, hold without
// write enable, checked against a model of the four registers.
module tb_reg_bank;
  localparam int unsigned M = 40;
  logic clk = 0, rst_n = 0;
  logic [3:0]   we;
  logic [M-1:0] wdata [4];
  logic [M-1:0] q [4];
  logic [M-1:0] model [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_bank #(.M(M)) dut (.clk, .rst_n, .we, .wdata, .q);

  initial begin
    we = '0;
    for (int i = 0; i < 4; i++) begin wdata[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (q[i] !== '0) begin failures++; $display("FAIL reset reg %0d", i); end
    end
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      we = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        wdata[i] = {8'($urandom), $urandom};
        if (we[i]) model[i] = wdata[i];
      end
      @(negedge clk);
      we = '0;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (q[i] !== model[i]) begin failures++; $display("FAIL t=%0d reg %0d", t, i); end
      end
    end
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
