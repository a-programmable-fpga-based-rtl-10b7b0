// gf2m_multiplier: serial-parallel Karatsuba-Ofman multiplier for F_{2^m}.
//
// The operands are zero-padded to 4n bits, n = ceil(M/4), and split twice by
// Karatsuba-Ofman into quarters a0..a3, b0..b3. That yields nine n-bit partial
// products, computed one per clock cycle by a single fully parallel koa_core:
//   step 0: a0*b0            step 3: a2*b2            step 6: (a0+a2)(b0+b2)
//   step 1: a1*b1            step 4: a3*b3            step 7: (a1+a3)(b1+b3)
//   step 2: (a0+a1)(b0+b1)   step 5: (a2+a3)(b2+b3)   step 8: (a0+a1+a2+a3)(b0+b1+b2+b3)
// Each partial product is XORed into a 8n-bit accumulator at the offsets (in
// multiples of n) that the two Karatsuba merge levels give it (table STEP_OFFS),
// so that after nine steps the accumulator holds the full 2m-1 bit product.
// Its upper part is then folded back by a PLFSR of depth M (gf2m_plfsr).
//
// Timing: start is sampled with a and b on a rising edge (cycle t); the nine
// partial products are accumulated on the edges that end cycles t+1 .. t+9; from
// cycle t+10 on done = 1 and c holds a*b mod f until the next start. The
// reduction is combinational on the accumulator output. A start while busy
// restarts the multiplier with the new operands.
module gf2m_multiplier #(
  parameter int unsigned M      = gf2m_pkg::M_DEF,
  parameter int unsigned K      = gf2m_pkg::K_DEF,
  parameter int unsigned DEPTH  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);

  localparam int unsigned N  = (M + 3) / 4;
  localparam int unsigned AW = 8 * N;

  // Bit j set: the step's product is added at offset j*n.
  localparam logic [6:0] STEP_OFFS [9] = '{
    7'b0001111, 7'b0011110, 7'b0001010,
    7'b0111100, 7'b1111000, 7'b0101000,
    7'b0001100, 7'b0011000, 7'b0001000
  };

  logic [4*N-1:0] a_q, b_q;
  logic [3:0]     step;
  logic [AW-1:0]  acc;
  logic [N-1:0]   x, y;
  logic [2*N-2:0] pp;

  logic [N-1:0] a0, a1, a2, a3, b0, b1, b2, b3;
  assign {a3, a2, a1, a0} = a_q;
  assign {b3, b2, b1, b0} = b_q;

  always_comb begin
    unique case (step)
      4'd0:    begin x = a0;                y = b0;                end
      4'd1:    begin x = a1;                y = b1;                end
      4'd2:    begin x = a0 ^ a1;           y = b0 ^ b1;           end
      4'd3:    begin x = a2;                y = b2;                end
      4'd4:    begin x = a3;                y = b3;                end
      4'd5:    begin x = a2 ^ a3;           y = b2 ^ b3;           end
      4'd6:    begin x = a0 ^ a2;           y = b0 ^ b2;           end
      4'd7:    begin x = a1 ^ a3;           y = b1 ^ b3;           end
      default: begin x = a0 ^ a1 ^ a2 ^ a3; y = b0 ^ b1 ^ b2 ^ b3; end
    endcase
  end

  koa_core #(.N(N), .DEPTH(DEPTH)) u_core (.a(x), .b(y), .p(pp));

  logic [AW-1:0] acc_add;
  always_comb begin
    acc_add = '0;
    for (int unsigned j = 0; j < 7; j++)
      if (STEP_OFFS[step][j]) acc_add = acc_add ^ (AW'(pp) << (j * N));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      acc  <= '0;
    end else if (start) begin
      a_q  <= (4*N)'(a);
      b_q  <= (4*N)'(b);
      step <= '0;
      busy <= 1'b1;
      done <= 1'b0;
      acc  <= '0;
    end else if (busy) begin
      acc <= acc ^ acc_add;
      if (step == 4'd8) begin
        busy <= 1'b0;
        done <= 1'b1;
        step <= '0;
      end else begin
        step <= step + 4'd1;
      end
    end
  end

  // Modular reduction of the 2M-1 bit product.
  logic [M-1:0] hi_red;
  gf2m_plfsr #(.M(M), .K(K), .D(M)) u_red (.a(acc[2*M-1:M]), .y(hi_red));
  assign c = hi_red ^ acc[M-1:0];

endmodule
