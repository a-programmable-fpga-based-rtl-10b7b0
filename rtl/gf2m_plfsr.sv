// gf2m_plfsr: parallel linear feedback shift register over F_{2^m}.
//
// Computes y = x^D * a(x) mod f(x) in one combinational pass. One step of the
// LFSR ("CL-LFSR") multiplies by x: the vector shifts one place left and, when
// the bit shifted out (a_{m-1}) is 1, the low coefficients of f(x) are XORed in,
// i.e. y_i = a_{i-1} xor (f_i and a_{m-1}), y_0 = a_{m-1} since f_0 = 1.
// D such steps in cascade form the PLFSR. With D = M it reduces the upper half of
// a double-length product: (h*x^M + l) mod f = PLFSR_M(h) xor l, which is how the
// squarer and the multiplier use it.
//
// f(x) = x^M + x^K + 1 (a trinomial) is fixed by the parameters, as the field
// polynomial is fixed at synthesis time. With f_i = 0 except at i = 0 and
// i = K, each step is a rotation by one place plus a single XOR into bit K,
// so the D-step cascade costs D two-input XOR gates and wiring.
//
// Interface: a (M bits) in, y (M bits) out, purely combinational, no clock.
module gf2m_plfsr #(
  parameter int unsigned M = gf2m_pkg::M_DEF,
  parameter int unsigned K = gf2m_pkg::K_DEF,
  parameter int unsigned D = M
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  always_comb begin
    logic [M-1:0] s;
    s = a;
    for (int unsigned d = 0; d < D; d++) begin
      // one CL-LFSR step: shift up, a_{m-1} re-enters at bit 0 (f_0 = 1)
      // and is added at bit K (f_K = 1)
      s = {s[M-2:0], s[M-1]};
      s[K] = s[K] ^ s[0];
    end
    y = s;
  end

  initial begin
    assert (K > 0 && K < M) else $error("gf2m_plfsr: need 0 < K < M");
  end

endmodule
