// instr_decoder: turns one 16-bit instruction into datapath controls.
//
// Instruction word: CMD[15:12] | OP2[11:6] | OP1[5:0], operand = {S1,S0,R3..R0}.
// The R bits are read enables (sources) or write enables (destinations) of the
// registers of the bank chosen by S. Which banks an S code names depends on the
// instruction, because each instruction can only reach some banks:
//   Addition / Squaring / SquareRoot : source F or G (OP1), destination
//                                      G, V, W, or Fs/Gs (OP2, S = 11, R0/R1)
//   StoreMult                        : destination as above (OP2)
//   LoadMult                         : OP2 = F adder or Fs (S = 11),
//                                      OP1 = G adder or Gs (S = 11)
//   MoveBank                         : V->F, V->H, H->F, W->G, W->I, I->G;
//                                      OP1.R chooses the registers copied
//   IncG0                            : G0 = G0 xor 1
// Control instructions (Jmp, For, Wait, Jz, End) produce no datapath action.
// An unsupported bank combination produces no action and sets illegal.
// The bank sets reachable per instruction follow the architecture; the numeric
// S codes are this design's choice (see gf2m_pkg). Combinational.
module instr_decoder (
  input  gf2m_pkg::instr_t   instr,
  input  logic               valid,
  output gf2m_pkg::dp_ctrl_t ctrl
);
  import gf2m_pkg::*;

  always_comb begin
    ctrl = '0;
    ctrl.res_sel = RES_ADD;
    if (valid) begin
      unique case (instr.cmd)
        CMD_ADD, CMD_SQR, CMD_SQRT, CMD_STOREMULT: begin
          unique case (instr.cmd)
            CMD_SQR:       ctrl.res_sel = RES_SQR;
            CMD_SQRT:      ctrl.res_sel = RES_SQRT;
            CMD_STOREMULT: ctrl.res_sel = RES_MUL;
            default:       ctrl.res_sel = RES_ADD;
          endcase
          if (instr.cmd != CMD_STOREMULT) begin
            if (instr.op1.bank == SRC_F)      ctrl.f_re = instr.op1.regs;
            else if (instr.op1.bank == SRC_G) begin
              ctrl.g_re     = instr.op1.regs;
              ctrl.src_is_g = 1'b1;
            end else ctrl.illegal = 1'b1;
          end
          if (!ctrl.illegal) begin
            unique case (instr.op2.bank)
              DST_G: ctrl.g_we = instr.op2.regs;
              DST_V: ctrl.v_we = instr.op2.regs;
              DST_W: ctrl.w_we = instr.op2.regs;
              default: begin
                ctrl.fs_we = instr.op2.regs[0];
                ctrl.gs_we = instr.op2.regs[1];
              end
            endcase
          end
        end
        CMD_LOADMULT: begin
          if (instr.op2.bank == MUL_SREG) ctrl.mult_use_fs = 1'b1;
          else if (instr.op2.bank == SRC_F) ctrl.f_re = instr.op2.regs;
          else ctrl.illegal = 1'b1;
          if (instr.op1.bank == MUL_SREG) ctrl.mult_use_gs = 1'b1;
          else if (instr.op1.bank == SRC_G) ctrl.g_re = instr.op1.regs;
          else ctrl.illegal = 1'b1;
          ctrl.mult_start = !ctrl.illegal;
        end
        CMD_INCG0: ctrl.inc_g0 = 1'b1;
        CMD_MOVEBANK: begin
          ctrl.move_dst  = instr.op2.bank;
          ctrl.move_src  = instr.op1.bank;
          ctrl.move_mask = instr.op1.regs;
          unique case ({instr.op2.bank, instr.op1.bank})
            {MVD_F, MVS_V}, {MVD_H, MVS_V}, {MVD_F, MVS_H},
            {MVD_G, MVS_W}, {MVD_I, MVS_W}, {MVD_G, MVS_I}: ctrl.move_en = 1'b1;
            default: ctrl.illegal = 1'b1;
          endcase
        end
        default: ;
      endcase
    end
  end

endmodule
