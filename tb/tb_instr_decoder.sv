// tb_instr_decoder: decodes one instruction of each kind, including the
// examples Addition(G[0],F[0,2]), LoadMult(Fs,G[0,1]) and the MoveBank paths,
// and checks the control word field by field against hand-written values.
module tb_instr_decoder;
  import gf2m_pkg::*;
  instr_t   instr;
  logic     valid;
  dp_ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr, .valid, .ctrl);

  task automatic expect_ctrl(logic [15:0] w, dp_ctrl_t exp, string what);
    instr = instr_t'(w);
    valid = 1'b1;
    #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, ctrl, exp);
    end
  endtask

  function automatic dp_ctrl_t z();
    dp_ctrl_t c = '0;
    c.res_sel = RES_ADD;
    return c;
  endfunction

  initial begin
    // Addition(G[0], F[0,2])
    e = z(); e.f_re = 4'b0101; e.g_we = 4'b0001;
    expect_ctrl(mk_instr(CMD_ADD, DST_G, 4'b0001, SRC_F, 4'b0101), e, "add G0=F0+F2");
    // Addition(W[0], G[0..3])
    e = z(); e.g_re = 4'b1111; e.src_is_g = 1; e.w_we = 4'b0001;
    expect_ctrl(mk_instr(CMD_ADD, DST_W, 4'b0001, SRC_G, 4'b1111), e, "add W0=sum G");
    // Addition(Fs, G[0])
    e = z(); e.g_re = 4'b0001; e.src_is_g = 1; e.fs_we = 1;
    expect_ctrl(mk_instr(CMD_ADD, DST_S, 4'b0001, SRC_G, 4'b0001), e, "add Fs=G0");
    // Squaring(V[1,2], F[3])
    e = z(); e.f_re = 4'b1000; e.res_sel = RES_SQR; e.v_we = 4'b0110;
    expect_ctrl(mk_instr(CMD_SQR, DST_V, 4'b0110, SRC_F, 4'b1000), e, "square");
    // SquareRoot(G[0], F[0])
    e = z(); e.f_re = 4'b0001; e.res_sel = RES_SQRT; e.g_we = 4'b0001;
    expect_ctrl(mk_instr(CMD_SQRT, DST_G, 4'b0001, SRC_F, 4'b0001), e, "sqrt");
    // StoreMult(Gs)
    e = z(); e.res_sel = RES_MUL; e.gs_we = 1;
    expect_ctrl(mk_instr(CMD_STOREMULT, DST_S, 4'b0010, 2'b00, 4'b0000), e, "storemult Gs");
    // LoadMult(Fs, G[0,1])
    e = z(); e.mult_use_fs = 1; e.g_re = 4'b0011; e.mult_start = 1;
    expect_ctrl(mk_instr(CMD_LOADMULT, MUL_SREG, 4'b0000, SRC_G, 4'b0011), e, "loadmult Fs");
    // LoadMult(F[0], Gs)
    e = z(); e.f_re = 4'b0001; e.mult_use_gs = 1; e.mult_start = 1;
    expect_ctrl(mk_instr(CMD_LOADMULT, SRC_F, 4'b0001, MUL_SREG, 4'b0000), e, "loadmult Gs");
    // IncG0
    e = z(); e.inc_g0 = 1;
    expect_ctrl(mk_instr(CMD_INCG0, 2'b00, 4'b0000, 2'b00, 4'b0000), e, "incg0");
    // MoveBank legal paths
    e = z(); e.move_en = 1; e.move_dst = MVD_H; e.move_src = MVS_V; e.move_mask = 4'b1111;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_H, 4'b0000, MVS_V, 4'b1111), e, "move V->H");
    e = z(); e.move_en = 1; e.move_dst = MVD_G; e.move_src = MVS_I; e.move_mask = 4'b0101;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_G, 4'b0000, MVS_I, 4'b0101), e, "move I->G");
    e = z(); e.move_en = 1; e.move_dst = MVD_F; e.move_src = MVS_H; e.move_mask = 4'b0010;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_F, 4'b0000, MVS_H, 4'b0010), e, "move H->F");
    e = z(); e.move_en = 1; e.move_dst = MVD_F; e.move_src = MVS_V; e.move_mask = 4'b0001;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_F, 4'b0000, MVS_V, 4'b0001), e, "move V->F");
    e = z(); e.move_en = 1; e.move_dst = MVD_I; e.move_src = MVS_W; e.move_mask = 4'b1111;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_I, 4'b0000, MVS_W, 4'b1111), e, "move W->I");
    e = z(); e.move_en = 1; e.move_dst = MVD_G; e.move_src = MVS_W; e.move_mask = 4'b1000;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_G, 4'b0000, MVS_W, 4'b1000), e, "move W->G");
    // MoveBank illegal path V->G
    e = z(); e.move_dst = MVD_G; e.move_src = MVS_V; e.move_mask = 4'b1111; e.illegal = 1;
    expect_ctrl(mk_instr(CMD_MOVEBANK, MVD_G, 4'b0000, MVS_V, 4'b1111), e, "move V->G illegal");
    // control instructions: no datapath action
    e = z();
    expect_ctrl(mk_ctrl(CMD_JMP, 12'h123), e, "jmp");
    expect_ctrl(mk_ctrl(CMD_WAIT, 12'h008), e, "wait");
    // invalid: nothing
    instr = instr_t'(mk_instr(CMD_ADD, DST_G, 4'b1111, SRC_F, 4'b1111));
    valid = 0; #1;
    checks++;
    if (ctrl !== z()) begin failures++; $display("FAIL valid=0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
