// tb_gf2m_plfsr: checks x^D * a mod f for D = 1, 7 and M at the full field size
// against the bit-serial reference multiplication by x^D.
module tb_gf2m_plfsr;
  import gf_ref_pkg::*;
  localparam int unsigned M = 1223, K = 255;
  typedef gf_ref #(M, K) R;

  logic [M-1:0] a, y1, y7, ym, xm;
  int checks = 0, failures = 0;

  gf2m_plfsr #(.M(M), .K(K), .D(1)) u1 (.a(a), .y(y1));
  gf2m_plfsr #(.M(M), .K(K), .D(7)) u7 (.a(a), .y(y7));
  gf2m_plfsr #(.M(M), .K(K), .D(M)) um (.a(a), .y(ym));

  task automatic check(logic [M-1:0] got, logic [M-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    xm = '0; xm[K] = 1'b1; xm[0] = 1'b1;   // x^M = x^K + 1 mod f
    for (int t = 0; t < 12; t++) begin
      a = R::rnd();
      if (t == 0) a = '0 | (M'(1) << (M-1));  // only the top bit set
      #1;
      check(y1, R::mul(a, M'(1) << 1), "D=1");
      check(y7, R::mul(a, M'(1) << 7), "D=7");
      check(ym, R::mul(a, xm), "D=M");
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
