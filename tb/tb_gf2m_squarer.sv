// tb_gf2m_squarer: a^2 mod f at the full field size against the reference a*a.
module tb_gf2m_squarer;
  import gf_ref_pkg::*;
  localparam int unsigned M = 1223, K = 255;
  typedef gf_ref #(M, K) R;

  logic [M-1:0] a, y, e;
  int checks = 0, failures = 0;

  gf2m_squarer #(.M(M), .K(K)) dut (.a(a), .y(y));

  initial begin
    for (int t = 0; t < 16; t++) begin
      a = R::rnd();
      if (t == 0) a = '0 | (M'(1) << (M-1));
      if (t == 1) a = '1;
      #1;
      e = R::mul(a, a);
      checks++;
      if (y !== e) begin failures++; $display("FAIL square t=%0d", t); end
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
