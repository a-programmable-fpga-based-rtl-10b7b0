// koa_core: fully parallel Karatsuba-Ofman polynomial multiplier over F_2.
//
// p(x) = a(x) * b(x) for N-bit operands, no reduction (2N-1 result bits).
// Karatsuba-Ofman is applied DEPTH times: at each level an operand splits into
// a low and a high half and three half-size products are formed,
//   p0 = lo*lo', p1 = hi*hi', pm = (lo+hi)(lo'+hi'),
//   p  = p1*x^(2U) + (pm + p0 + p1)*x^U + p0      (U = half size).
// The recursion is written out flat: the operands are zero-padded to NP bits,
// a multiple of 2^DEPTH, and cut into 2^DEPTH chunks of S bits. Each of the
// 3^DEPTH leaf products is named by one digit per level (0: low, 1: high,
// 2: low+high); its operands are XORs of the chunks its digits select, it is
// computed by an S x S schoolbook AND/XOR array, and it is added into the
// result at every offset the merge rule above gives it (p0 at {0,U}, p1 at
// {U,2U}, pm at {U}, summed over the levels). The serial field multiplier
// uses this core on m/4-bit operands; the depth (4, giving 81 products of
// 20 bits for N = 306) is this design's own choice.
//
// Interface: a, b (N bits) in, p (2N-1 bits) out, combinational.
module koa_core #(
  parameter int unsigned N     = (gf2m_pkg::M_DEF + 3) / 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);

  localparam int unsigned NC = 2 ** DEPTH;               // chunks
  localparam int unsigned S  = (N + NC - 1) / NC;        // chunk size
  localparam int unsigned NP = S * NC;                   // padded size
  localparam int unsigned NL = 3 ** DEPTH;               // leaf products
  localparam int unsigned PW = 2 * NP;                   // padded product width

  // digit of leaf at level l (level 0 = outermost split)
  function automatic int unsigned digit(int unsigned leaf, int unsigned l);
    return (leaf / (3 ** (DEPTH - 1 - l))) % 3;
  endfunction

  // chunks XORed into the operands of a leaf
  function automatic logic [NC-1:0] chunk_mask(int unsigned leaf);
    logic [NC-1:0] m;
    for (int unsigned c = 0; c < NC; c++) begin
      m[c] = 1'b1;
      for (int unsigned l = 0; l < DEPTH; l++) begin
        // bit DEPTH-1-l of the chunk index is the half taken at level l
        if (digit(leaf, l) == 0 && c[DEPTH-1-l] != 1'b0) m[c] = 1'b0;
        if (digit(leaf, l) == 1 && c[DEPTH-1-l] != 1'b1) m[c] = 1'b0;
      end
    end
    return m;
  endfunction

  logic [NP-1:0] ap, bp;
  assign ap = NP'(a);
  assign bp = NP'(b);

  logic [PW-1:0] contrib [NL];   // each leaf product placed at all its offsets

  for (genvar lf = 0; lf < NL; lf++) begin : g_leaf
    localparam logic [NC-1:0] CM = chunk_mask(lf);
    logic [S-1:0]   x, y;
    logic [2*S-2:0] pl;
    always_comb begin
      x = '0;
      y = '0;
      for (int unsigned c = 0; c < NC; c++)
        if (CM[c]) begin
          x = x ^ ap[c*S +: S];
          y = y ^ bp[c*S +: S];
        end
      pl = '0;
      for (int unsigned i = 0; i < S; i++)
        if (y[i]) pl = pl ^ ((2*S-1)'(x) << i);
    end

    // merge: the leaf at every offset its digits give it
    always_comb begin
      contrib[lf] = '0;
      for (int unsigned ch = 0; ch < NC; ch++) begin
        int unsigned off;
        logic        ok;
        off = 0;
        ok  = 1'b1;
        for (int unsigned l = 0; l < DEPTH; l++) begin
          int unsigned u;
          u = NP >> (l + 1);
          unique case (digit(lf, l))
            0: off += ch[l] ? u : 0;          // p0: at 0 and U
            1: off += ch[l] ? 2 * u : u;      // p1: at U and 2U
            default: begin                    // pm: at U only
              off += u;
              if (ch[l]) ok = 1'b0;
            end
          endcase
        end
        if (ok) contrib[lf] = contrib[lf] ^ (PW'(pl) << off);
      end
    end
  end

  logic [PW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int unsigned lf = 0; lf < NL; lf++) acc = acc ^ contrib[lf];
    p = acc[2*N-2:0];
  end

endmodule
