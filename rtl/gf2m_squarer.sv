// gf2m_squarer: squaring in F_{2^m}.
//
// a(x)^2 = sum a_i x^{2i}: the input is spread out with a 0 between every two
// bits, giving a polynomial of degree up to 2m-2, whose upper m-1 coefficients
// are folded back by a PLFSR of depth M (see gf2m_plfsr), following the
// "expand then reduce with PLFSRs" structure of the architecture.
//
// Interface: a (M bits) in, y = a^2 mod f (M bits) out, combinational.
module gf2m_squarer #(
  parameter int unsigned M = gf2m_pkg::M_DEF,
  parameter int unsigned K = gf2m_pkg::K_DEF
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  logic [2*M-1:0] e;      // expanded square, bit 2M-1 is always 0
  logic [M-1:0]   hi_red;

  always_comb begin
    e = '0;
    for (int unsigned i = 0; i < M; i++) e[2*i] = a[i];
  end

  gf2m_plfsr #(.M(M), .K(K), .D(M)) u_red (
    .a (e[2*M-1:M]),
    .y (hi_red)
  );

  assign y = hi_red ^ e[M-1:0];

endmodule
