// tb_pairing_cryptoprocessor: end-to-end run of the cryptoprocessor at its
// default size (m = 1223, f = x^1223 + x^255 + 1).
//
// The testbench assembles a program, loads it and the operands through the
// host ports, starts the processor and checks the results against bit-serial
// reference arithmetic. The program has two parts:
//  1. a short sequence touching every mechanism: square root, squaring,
//     IncG0, writes to Fs/Gs, LoadMult from Fs and from Gs, Wait, StoreMult,
//     all six MoveBank paths, Jz taken and not taken;
//  2. an Itoh-Tsujii inversion a^-1 = (a^(2^(m-1)-1))^2, built from the binary
//     expansion of m-1 with For loops of in-place squarings and Karatsuba
//     multiplications, followed by a*a^-1 which must be 1.
// The number of clock cycles from start to done is predicted while the
// program is assembled (one per instruction, n+1 per Wait(n), loop overhead)
// and checked. Each mechanism is counted and must have happened.
module tb_pairing_cryptoprocessor;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;
  localparam int unsigned M = gf2m_pkg::M_DEF, K = gf2m_pkg::K_DEF;
  typedef gf_ref #(M, K) R;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] r_in = '0;
  logic prog_we = 0;
  logic [11:0] prog_addr = '0;
  logic [15:0] prog_wdata = '0;
  logic host_we = 0;
  logic [2:0] host_bank = '0;
  logic [1:0] host_reg = '0;
  logic [M-1:0] host_wdata = '0, host_rdata;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pairing_cryptoprocessor dut (
    .clk, .rst_n, .start, .r_in, .busy, .done, .prog_we, .prog_addr, .prog_wdata,
    .host_we, .host_bank, .host_reg, .host_wdata, .host_rdata
  );

  // ---------------- program assembly ----------------
  logic [15:0] prog [$];
  longint exp_cycles = 0;

  function automatic void emit(logic [15:0] w, int cyc = 1);
    prog.push_back(w);
    exp_cycles += cyc;
  endfunction

  // Square G0 k times in place: For(k); Jmp(out); Squaring(G0,G0); Jmp(For)
  function automatic void square_loop(int k);
    int at = prog.size();
    emit(mk_ctrl(CMD_FOR, 12'(k)), k + 1);
    emit(mk_ctrl(CMD_JMP, 12'(at + 4)));
    emit(mk_instr(CMD_SQR, DST_G, 4'b0001, SRC_G, 4'b0001), k);
    emit(mk_ctrl(CMD_JMP, 12'(at)), k);
  endfunction

  // G0 = src_side * G0 through the multiplier (src F0 or Fs)
  function automatic void mult_g0(bit use_fs);
    if (use_fs) emit(mk_instr(CMD_LOADMULT, MUL_SREG, 4'b0000, SRC_G, 4'b0001));
    else        emit(mk_instr(CMD_LOADMULT, SRC_F, 4'b0001, SRC_G, 4'b0001));
    emit(mk_ctrl(CMD_WAIT, 12'd8), 9);
    emit(mk_instr(CMD_STOREMULT, DST_G, 4'b0001, 2'b00, 4'b0000));
  endfunction

  function automatic void build_program();
    int kk, nb;
    logic [31:0] e;
    // part 1
    emit(mk_instr(CMD_SQRT, DST_G, 4'b0010, SRC_F, 4'b0010));      // G1 = sqrt(F1)
    emit(mk_instr(CMD_SQR,  DST_V, 4'b0001, SRC_G, 4'b0010));      // V0 = G1^2
    emit(mk_instr(CMD_ADD,  DST_G, 4'b0001, SRC_F, 4'b0001));      // G0 = F0
    emit(mk_instr(CMD_INCG0, 2'b00, 4'b0000, 2'b00, 4'b0000));     // G0 = F0 + 1
    emit(mk_instr(CMD_ADD,  DST_S, 4'b0010, SRC_G, 4'b0001));      // Gs = G0
    emit(mk_instr(CMD_LOADMULT, SRC_F, 4'b0110, MUL_SREG, 4'b0000)); // (F1+F2)*Gs
    emit(mk_ctrl(CMD_WAIT, 12'd8), 9);
    emit(mk_instr(CMD_STOREMULT, DST_W, 4'b1000, 2'b00, 4'b0000)); // W3
    emit(mk_instr(CMD_MOVEBANK, MVD_H, 4'b0000, MVS_V, 4'b1111));  // H = V
    emit(mk_instr(CMD_MOVEBANK, MVD_I, 4'b0000, MVS_W, 4'b1111));  // I = W
    emit(mk_ctrl(CMD_JZ, 12'd0));                                   // R0 = 1: skip
    emit(mk_instr(CMD_INCG0, 2'b00, 4'b0000, 2'b00, 4'b0000), 0);  // skipped
    emit(mk_ctrl(CMD_JZ, 12'd0));                                   // R0 = 0: fall through
    emit(mk_instr(CMD_ADD,  DST_V, 4'b0010, SRC_G, 4'b0001));      // V1 = G0
    emit(mk_instr(CMD_MOVEBANK, MVD_F, 4'b0000, MVS_V, 4'b0010));  // F1 = V1
    emit(mk_instr(CMD_MOVEBANK, MVD_F, 4'b0000, MVS_H, 4'b0100));  // F2 = H2
    emit(mk_instr(CMD_MOVEBANK, MVD_G, 4'b0000, MVS_W, 4'b0100));  // G2 = W2
    emit(mk_instr(CMD_MOVEBANK, MVD_G, 4'b0000, MVS_I, 4'b1000));  // G3 = I3
    // part 2: Itoh-Tsujii, beta_k = a^(2^k - 1), a in F0
    emit(mk_instr(CMD_ADD,  DST_G, 4'b0001, SRC_F, 4'b0001));      // G0 = beta_1
    e = 32'(M - 1);
    nb = $clog2(M);                 // bits of m-1 (m-1 is not a power of two here)
    while (!e[nb-1]) nb--;
    kk = 1;
    for (int i = nb - 2; i >= 0; i--) begin
      emit(mk_instr(CMD_ADD, DST_S, 4'b0001, SRC_G, 4'b0001));     // Fs = beta_k
      square_loop(kk);                                              // G0 = beta_k^(2^k)
      mult_g0(1'b1);                                                // beta_2k
      kk = 2 * kk;
      if (e[i]) begin
        emit(mk_instr(CMD_SQR, DST_G, 4'b0001, SRC_G, 4'b0001));   // beta_2k^2
        mult_g0(1'b0);                                              // * a = beta_2k+1
        kk++;
      end
    end
    emit(mk_instr(CMD_SQR, DST_G, 4'b0001, SRC_G, 4'b0001));       // G0 = a^-1
    emit(mk_instr(CMD_LOADMULT, SRC_F, 4'b0001, SRC_G, 4'b0001));
    emit(mk_ctrl(CMD_WAIT, 12'd8), 9);
    emit(mk_instr(CMD_STOREMULT, DST_W, 4'b0001, 2'b00, 4'b0000)); // W0 = a * a^-1
    emit(mk_ctrl(CMD_END, 12'd0));
    if (kk != int'(M) - 1) $display("program generator error: k=%0d", kk);
  endfunction

  // ---------------- host access ----------------
  task automatic host_write(int b, int r, logic [M-1:0] v);
    @(negedge clk);
    host_we = 1; host_bank = 3'(b); host_reg = 2'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  logic [M-1:0] fin [7][4];   // register contents read back after the run

  task automatic read_all();
    for (int b = 0; b < 7; b++)
      for (int r = 0; r < 4; r++) begin
        host_bank = 3'(b); host_reg = 2'(r);
        #1;
        fin[b][r] = host_rdata;
      end
  endtask

  function automatic logic [M-1:0] host_read(int b, int r);
    return fin[b][r];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_sqrt, n_sqr, n_inc, n_fs, n_gs, n_mul_fs, n_mul_gs, n_store, n_wait_stall,
      n_for_enter, n_for_exit, n_jmp, n_jz_taken, n_jz_fall, n_move [4][4];
  always @(posedge clk) if (busy && !start) begin
    dp_ctrl_t c;
    c = dut.ctrl;
    if (c.res_sel == RES_SQRT && c.g_we != 0) n_sqrt++;
    if (c.res_sel == RES_SQR && (c.g_we != 0 || c.v_we != 0)) n_sqr++;
    if (c.inc_g0) n_inc++;
    if (c.fs_we) n_fs++;
    if (c.gs_we) n_gs++;
    if (c.mult_start && c.mult_use_fs) n_mul_fs++;
    if (c.mult_start && c.mult_use_gs) n_mul_gs++;
    if (c.res_sel == RES_MUL && (c.g_we != 0 || c.w_we != 0)) n_store++;
    if (c.move_en) n_move[c.move_dst][c.move_src]++;
    if (dut.u_ctl.ev_stall) n_wait_stall++;
    if (dut.instr.cmd == CMD_FOR) begin
      if (dut.u_ctl.ev_taken) n_for_enter++; else n_for_exit++;
    end
    if (dut.instr.cmd == CMD_JMP) n_jmp++;
    if (dut.instr.cmd == CMD_JZ) begin
      if (dut.u_ctl.ev_taken) n_jz_taken++; else n_jz_fall++;
    end
  end

  // ---------------- test ----------------
  logic [M-1:0] init [7][4];
  logic [M-1:0] a, v0, g0, w3, inv;
  longint cycles;

  initial begin
    build_program();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    for (int b = 0; b < 6; b++)
      for (int r = 0; r < 4; r++) begin
        init[b][r] = R::rnd();
        host_write(b, r, init[b][r]);
      end
    a = init[0][0];
    r_in = M'(1);            // R = ...01: first Jz skips, second falls through

    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (busy && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    chk(done, "done raised");
    chk(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
    $display("program: %0d words, %0d cycles", prog.size(), cycles);

    read_all();
    // part 1 results
    g0 = a ^ M'(1);
    v0 = init[0][1];                          // sqrt then square
    w3 = R::mul(init[0][1] ^ init[0][2], g0);
    chk(host_read(4, 0) === v0, "V0 = sqrt(F1)^2 = F1");
    chk(host_read(2, 0) === v0, "H0 = V0 (MoveBank V->H)");
    chk(host_read(4, 1) === g0, "V1 = F0 + 1 (IncG0, Jz)");
    chk(host_read(0, 1) === g0, "F1 = V1 (MoveBank V->F)");
    chk(host_read(0, 2) === init[4][2], "F2 = H2 (MoveBank H->F)");
    chk(host_read(1, 2) === init[5][2], "G2 = W2 (MoveBank W->G)");
    chk(host_read(1, 3) === w3, "G3 = I3 = (F1+F2)*(F0+1) (Gs, I->G)");
    chk(host_read(3, 3) === w3, "I3 = W3 (MoveBank W->I)");
    chk(host_read(6, 1) === g0, "Gs = F0 + 1");
    chk(R::mul(host_read(1, 1), host_read(1, 1)) === init[0][1], "G1 = sqrt(F1)");
    // part 2 results
    inv = host_read(1, 0);
    chk(R::mul(inv, a) === M'(1), "G0 * a = 1 (Itoh-Tsujii inverse)");
    chk(host_read(5, 0) === M'(1), "W0 = a * a^-1 computed on the processor");
    chk(host_read(0, 0) === a, "F0 unchanged");

    // every mechanism must have occurred
    chk(n_sqrt > 0, "square root used");
    chk(n_sqr > 0, "squaring used");
    chk(n_inc == 1, "IncG0 executed once (second one skipped by Jz)");
    chk(n_fs > 0 && n_gs > 0, "Fs and Gs written");
    chk(n_mul_fs > 0 && n_mul_gs > 0, "LoadMult from Fs and from Gs");
    chk(n_store > 0, "StoreMult");
    chk(n_wait_stall > 0, "Wait stalls");
    chk(n_for_enter > 0, "For entered the body");
    chk(n_for_exit > 0, "For loop exits");
    chk(n_jmp > 0, "Jmp");
    chk(n_jz_taken == 1 && n_jz_fall == 1, "Jz taken once and not taken once");
    chk(n_move[MVD_H][MVS_V] > 0 && n_move[MVD_I][MVS_W] > 0 && n_move[MVD_F][MVS_V] > 0 &&
        n_move[MVD_F][MVS_H] > 0 && n_move[MVD_G][MVS_W] > 0 && n_move[MVD_G][MVS_I] > 0,
        "all six MoveBank paths");
    $display("events: sqrt=%0d sqr=%0d inc=%0d mulFs=%0d mulGs=%0d store=%0d stall=%0d forIn=%0d forOut=%0d jmp=%0d jz=%0d/%0d",
             n_sqrt, n_sqr, n_inc, n_mul_fs, n_mul_gs, n_store, n_wait_stall, n_for_enter,
             n_for_exit, n_jmp, n_jz_taken, n_jz_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
