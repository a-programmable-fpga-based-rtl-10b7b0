// tb_koa_core: the m/4 = 306-bit Karatsuba core against a schoolbook product,
// plus a 23-bit instance with three Karatsuba levels and padding to 24 bits.
module tb_koa_core;
  localparam int unsigned N = 306, NS = 23;

  logic [N-1:0]    a, b;
  logic [2*N-2:0]  p;
  logic [NS-1:0]   as, bs;
  logic [2*NS-2:0] ps;
  int checks = 0, failures = 0;

  koa_core dut (.a(a), .b(b), .p(p));
  koa_core #(.N(NS), .DEPTH(3)) dut_s (.a(as), .b(bs), .p(ps));

  function automatic logic [2*N-2:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N-2:0] r = '0;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++)
        r[i+j] = r[i+j] ^ (x[i] & y[j]);
    return r;
  endfunction

  function automatic logic [2*NS-2:0] ref_mul_s(logic [NS-1:0] x, logic [NS-1:0] y);
    logic [2*NS-2:0] r = '0;
    for (int i = 0; i < int'(NS); i++)
      for (int j = 0; j < int'(NS); j++)
        r[i+j] = r[i+j] ^ (x[i] & y[j]);
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < int'(N); w += 32) begin
        a = (a << 32) | N'($urandom);
        b = (b << 32) | N'($urandom);
      end
      if (t == 0) begin a = '1; b = '1; end
      as = NS'($urandom);
      bs = NS'($urandom);
      #1;
      checks += 2;
      if (p !== ref_mul(a, b))     begin failures++; $display("FAIL N=%0d t=%0d", N, t); end
      if (ps !== ref_mul_s(as, bs)) begin failures++; $display("FAIL N=%0d t=%0d", NS, t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
