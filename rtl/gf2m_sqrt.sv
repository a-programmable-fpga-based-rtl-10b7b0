// gf2m_sqrt: square root in F_{2^m} for a trinomial f(x) = x^M + x^K + 1, M and K odd.
//
// Split a(x) into its even and odd coefficients, a = e(x^2) + x*o(x^2). Then
// sqrt(a) = e(x) + sqrt(x)*o(x), and for such a trinomial
// sqrt(x) = x^((M+1)/2) + x^((K+1)/2), because its square is x^(M+1) + x^(K+1)
// = x*(x^M + x^K) = x mod f. Both products with o(x) stay below degree M, so no
// reduction is needed: the square root is two shifted XORs of the odd half onto
// the even half. This is the sparse M^-1 * a matrix product the architecture
// relies on, worked out in closed form for odd M and K (m = 1223, K = 255).
//
// Interface: a (M bits) in, y (M bits) out, combinational.
module gf2m_sqrt #(
  parameter int unsigned M = gf2m_pkg::M_DEF,
  parameter int unsigned K = gf2m_pkg::K_DEF
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  localparam int unsigned NE = (M + 1) / 2;  // even coefficients a_0, a_2, ..., a_{M-1}
  localparam int unsigned NO = (M - 1) / 2;  // odd coefficients a_1, ..., a_{M-2}

  logic [M-1:0] ev, od;

  always_comb begin
    ev = '0;
    od = '0;
    for (int unsigned i = 0; i < NE; i++) ev[i] = a[2*i];
    for (int unsigned i = 0; i < NO; i++) od[i] = a[2*i+1];
  end

  assign y = ev ^ (od << ((M + 1) / 2)) ^ (od << ((K + 1) / 2));

  initial begin
    assert ((M % 2 == 1) && (K % 2 == 1))
      else $error("gf2m_sqrt: closed form needs odd M and odd K");
  end

endmodule
