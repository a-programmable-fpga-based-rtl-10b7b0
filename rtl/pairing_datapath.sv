// pairing_datapath: register banks and F_{2^m} arithmetic of the cryptoprocessor.
//
// Six banks of four M-bit registers, F, G, H, I, V, W, and two single registers
// Fs and Gs. Only F and G are sources of arithmetic: each has a 4-input masked
// XOR (bank_adder) on its outputs, so every operation starts with the sum of up
// to four registers. The selected sum feeds the squarer and the square root,
// and the F-side and G-side sums (or Fs / Gs) feed the 9-cycle multiplier.
// Results go to G, V, W, Fs or Gs. H and I are spill banks of V and W; MoveBank
// copies V->F, V->H, H->F, W->G, W->I and I->G register by register. G0 has an
// extra path computing G0 xor 1 (IncG0). Every register write happens on the
// rising edge that ends the instruction's cycle; the multiplier result is read
// with StoreMult once mult_done is high (10 cycles after LoadMult).
//
// A host port (host_*) writes and reads any register while the processor is
// idle, which is how operands enter and results leave; the banks, paths and
// units follow the architecture, the host port is this design's own addition.
// host_bank: 0 F, 1 G, 2 H, 3 I, 4 V, 5 W, 6 Fs (reg 0) / Gs (reg 1).
module pairing_datapath #(
  parameter int unsigned M      = gf2m_pkg::M_DEF,
  parameter int unsigned K      = gf2m_pkg::K_DEF,
  parameter int unsigned DEPTH  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  gf2m_pkg::dp_ctrl_t ctrl,
  input  logic               host_we,
  input  logic [2:0]         host_bank,
  input  logic [1:0]         host_reg,
  input  logic [M-1:0]       host_wdata,
  output logic [M-1:0]       host_rdata,
  output logic               mult_busy,
  output logic               mult_done
);
  import gf2m_pkg::*;

  localparam int unsigned NB = 6;
  localparam int unsigned BF = 0, BG = 1, BH = 2, BI = 3, BV = 4, BW = 5;

  logic [M-1:0] q  [NB][4];
  logic [M-1:0] wd [NB][4];
  logic [3:0]   we [NB];
  logic [M-1:0] fs_q, gs_q;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    reg_bank #(.M(M), .NREG(4)) u_bank (
      .clk(clk), .rst_n(rst_n), .we(we[b]), .wdata(wd[b]), .q(q[b])
    );
  end

  // ---- sources ----
  logic [M-1:0] f_sum, g_sum, unary_in, sq_out, sqrt_out, mul_a, mul_b, mul_c, result;

  bank_adder #(.M(M)) u_fadd (.re(ctrl.f_re), .d(q[BF]), .sum(f_sum));
  bank_adder #(.M(M)) u_gadd (.re(ctrl.g_re), .d(q[BG]), .sum(g_sum));

  assign unary_in = ctrl.src_is_g ? g_sum : f_sum;

  gf2m_squarer #(.M(M), .K(K)) u_sqr  (.a(unary_in), .y(sq_out));
  gf2m_sqrt    #(.M(M), .K(K)) u_sqrt (.a(unary_in), .y(sqrt_out));

  assign mul_a = ctrl.mult_use_fs ? fs_q : f_sum;
  assign mul_b = ctrl.mult_use_gs ? gs_q : g_sum;

  gf2m_multiplier #(.M(M), .K(K), .DEPTH(DEPTH)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(ctrl.mult_start), .a(mul_a), .b(mul_b),
    .busy(mult_busy), .done(mult_done), .c(mul_c)
  );

  always_comb begin
    unique case (ctrl.res_sel)
      RES_SQR:  result = sq_out;
      RES_SQRT: result = sqrt_out;
      RES_MUL:  result = mul_c;
      default:  result = unary_in;
    endcase
  end

  // ---- MoveBank source ----
  logic [M-1:0] mv_src [4];
  always_comb begin
    unique case (ctrl.move_src)
      MVS_V:   mv_src = q[BV];
      MVS_W:   mv_src = q[BW];
      MVS_H:   mv_src = q[BH];
      default: mv_src = q[BI];
    endcase
  end

  // ---- write enables and data per bank ----
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      we[b] = '0;
      for (int r = 0; r < 4; r++) wd[b][r] = result;
    end
    // arithmetic destinations
    we[BG] = ctrl.g_we;
    we[BV] = ctrl.v_we;
    we[BW] = ctrl.w_we;
    // MoveBank
    if (ctrl.move_en) begin
      unique case (ctrl.move_dst)
        MVD_F: begin we[BF] = ctrl.move_mask; wd[BF] = mv_src; end
        MVD_G: begin we[BG] = ctrl.move_mask; wd[BG] = mv_src; end
        MVD_H: begin we[BH] = ctrl.move_mask; wd[BH] = mv_src; end
        default: begin we[BI] = ctrl.move_mask; wd[BI] = mv_src; end
      endcase
    end
    // IncG0
    if (ctrl.inc_g0) begin
      we[BG][0] = 1'b1;
      wd[BG][0] = {q[BG][0][M-1:1], ~q[BG][0][0]};
    end
    // host access (only used while no program runs)
    if (host_we && host_bank < 3'd6) begin
      we[host_bank][host_reg] = 1'b1;
      wd[host_bank][host_reg] = host_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_q <= '0;
      gs_q <= '0;
    end else begin
      if (ctrl.fs_we)                                             fs_q <= result;
      else if (host_we && host_bank == 3'd6 && host_reg == 2'd0)  fs_q <= host_wdata;
      if (ctrl.gs_we)                                             gs_q <= result;
      else if (host_we && host_bank == 3'd6 && host_reg == 2'd1)  gs_q <= host_wdata;
    end
  end

  always_comb begin
    if (host_bank < 3'd6)        host_rdata = q[host_bank][host_reg];
    else if (host_reg == 2'd0)   host_rdata = fs_q;
    else                         host_rdata = gs_q;
  end

`ifndef SYNTHESIS
  // A StoreMult must not come before the multiplication has finished.
  a_store_after_done: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.res_sel == RES_MUL && (ctrl.g_we != 0 || ctrl.v_we != 0 || ctrl.w_we != 0 ||
                                 ctrl.fs_we || ctrl.gs_we)) |-> mult_done)
    else $error("StoreMult issued before the multiplication finished");
`endif

endmodule
