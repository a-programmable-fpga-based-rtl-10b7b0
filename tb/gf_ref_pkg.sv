// gf_ref_pkg: bit-serial reference arithmetic in F_{2^M}, f = x^M + x^K + 1,
// for the testbenches. Written from the definitions (shift-and-add
// multiplication with reduction by f at every step), independently of the
// Karatsuba and PLFSR structure of the design.
package gf_ref_pkg;

  class gf_ref #(int unsigned M = 1223, int unsigned K = 255);

    // c = c*x mod f
    static function logic [M-1:0] mulx(logic [M-1:0] c);
      logic top;
      top = c[M-1];
      c = c << 1;
      if (top) begin
        c[0] = c[0] ^ 1'b1;
        c[K] = c[K] ^ 1'b1;
      end
      return c;
    endfunction

    // a*b mod f, most significant bit of b first
    static function logic [M-1:0] mul(logic [M-1:0] a, logic [M-1:0] b);
      logic [M-1:0] c;
      c = '0;
      for (int i = int'(M) - 1; i >= 0; i--) begin
        c = mulx(c);
        if (b[i]) c = c ^ a;
      end
      return c;
    endfunction

    static function logic [M-1:0] rnd();
      logic [M-1:0] v;
      for (int i = 0; i < int'(M); i += 32) v = (v << 32) | M'($urandom);
      return v;
    endfunction

  endclass

endpackage
