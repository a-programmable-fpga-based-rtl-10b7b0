// tb_gf2m_sqrt: checks that the square root squares back to its input, at the
// full field size, and that sqrt(x^2) = x.
module tb_gf2m_sqrt;
  import gf_ref_pkg::*;
  localparam int unsigned M = 1223, K = 255;
  typedef gf_ref #(M, K) R;

  logic [M-1:0] a, y;
  int checks = 0, failures = 0;

  gf2m_sqrt #(.M(M), .K(K)) dut (.a(a), .y(y));

  initial begin
    a = M'(4); #1;
    checks++;
    if (y !== M'(2)) begin failures++; $display("FAIL sqrt(x^2)"); end
    for (int t = 0; t < 16; t++) begin
      a = R::rnd();
      #1;
      checks++;
      if (R::mul(y, y) !== a) begin failures++; $display("FAIL sqrt t=%0d", t); end
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
