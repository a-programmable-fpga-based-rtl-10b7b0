// tb_gf2m_multiplier: full-size (m = 1223) field products against the reference,
// with the latency checked: done must rise exactly 10 cycles after the start
// cycle (9 accumulation cycles), busy must be high in between, and a restart
// while busy must give the product of the new operands.
module tb_gf2m_multiplier;
  import gf_ref_pkg::*;
  localparam int unsigned M = 1223, K = 255;
  typedef gf_ref #(M, K) R;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a, b, c, e;
  int checks = 0, failures = 0, cyc;

  always #5 clk = ~clk;

  gf2m_multiplier dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      a = R::rnd(); b = R::rnd();
      if (t == 0) begin a = '1; b = '1; end
      e = R::mul(a, b);
      start = 1;
      @(negedge clk);
      start = 0;
      a = R::rnd(); b = R::rnd();      // operands must have been captured
      cyc = 1;
      while (!done) begin
        chk(busy, "busy while computing");
        @(negedge clk);
        cyc++;
      end
      chk(cyc == 10, $sformatf("latency %0d, expected 10", cyc));
      chk(c === e, $sformatf("product t=%0d", t));
    end
    // restart while busy
    @(negedge clk);
    a = R::rnd(); b = R::rnd(); start = 1;
    @(negedge clk);
    a = R::rnd(); b = R::rnd(); e = R::mul(a, b);
    repeat (3) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (9) @(negedge clk);
    chk(done && c === e, "restart while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
