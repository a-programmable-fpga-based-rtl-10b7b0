// gf2m_pkg: constants and types shared by the pairing cryptoprocessor.
//
// The field is F_{2^m} with m = 1223 and the trinomial f(x) = x^1223 + x^255 + 1,
// the configuration used for the 128-bit-security eta_T pairing. Changing M/K here
// (and re-synthesising) is the only step needed to move to another trinomial field.
//
// The 16-bit instruction word is CMD[15:12] | OP2[11:6] | OP1[5:0], each operand
// being {S1,S0,R3,R2,R1,R0}: S selects a bank, R is a mask of the registers of
// that bank. The numeric opcode values and the meaning of each S code are this
// design's own choice; the field layout and the instruction list follow the
// architecture. Control instructions read {OP2,OP1} as a 12-bit constant.
package gf2m_pkg;

  // Field size and trinomial middle term: f(x) = x^M + x^K + 1.
  parameter int unsigned M_DEF = 1223;
  parameter int unsigned K_DEF = 255;

  // Program store: 12-bit instruction pointer, 4K words of 16 bits.
  parameter int unsigned IP_W   = 12;
  parameter int unsigned INSTR_W = 16;

  typedef enum logic [3:0] {
    CMD_WAIT      = 4'h0,  // Wait(n): hold the IP for n further cycles (Wait(0) is a no-op)
    CMD_STOREMULT = 4'h1,  // StoreMult(D[])
    CMD_ADD       = 4'h2,  // Addition(D[], S[])
    CMD_SQR       = 4'h3,  // Squaring(D[], S[])
    CMD_SQRT      = 4'h4,  // SquareRoot(D[], S[])
    CMD_LOADMULT  = 4'h5,  // LoadMult(S2[], S1[])
    CMD_INCG0     = 4'h6,  // IncG0(): G0 = G0 xor 1
    CMD_MOVEBANK  = 4'h7,  // MoveBank(D[], S[])
    CMD_JMP       = 4'h8,  // Jmp(n)
    CMD_FOR       = 4'h9,  // For(n)
    CMD_JZ        = 4'hA,  // Jz()
    CMD_END       = 4'hF   // End: stop and raise done (this design's addition)
  } cmd_e;

  typedef struct packed {
    logic [1:0] bank;  // S1,S0
    logic [3:0] regs;  // R3..R0
  } operand_t;

  typedef struct packed {
    cmd_e     cmd;
    operand_t op2;  // destination (or first multiplier operand)
    operand_t op1;  // source (or second multiplier operand)
  } instr_t;

  // Operand bank codes, per role.
  // Source of Addition/Squaring/SquareRoot (OP1):
  localparam logic [1:0] SRC_F = 2'b00, SRC_G = 2'b01;
  // Destination of Addition/Squaring/SquareRoot/StoreMult (OP2):
  localparam logic [1:0] DST_G = 2'b00, DST_V = 2'b01, DST_W = 2'b10, DST_S = 2'b11; // DST_S: R0->Fs, R1->Gs
  // LoadMult: OP2 bank 2'b11 selects Fs instead of the F adder, OP1 bank 2'b11 selects Gs.
  localparam logic [1:0] MUL_SREG = 2'b11;
  // MoveBank destination (OP2) and source (OP1) codes.
  localparam logic [1:0] MVD_F = 2'b00, MVD_G = 2'b01, MVD_H = 2'b10, MVD_I = 2'b11;
  localparam logic [1:0] MVS_V = 2'b00, MVS_W = 2'b01, MVS_H = 2'b10, MVS_I = 2'b11;

  // Result selected for an arithmetic write-back.
  typedef enum logic [1:0] {RES_ADD = 2'd0, RES_SQR = 2'd1, RES_SQRT = 2'd2, RES_MUL = 2'd3} res_sel_e;

  // Datapath control word produced by the decoder for one instruction.
  typedef struct packed {
    logic [3:0] f_re;       // read enables of the F adder
    logic [3:0] g_re;       // read enables of the G adder
    logic       src_is_g;   // unary units take the G adder output (else F)
    res_sel_e   res_sel;
    logic [3:0] g_we;       // arithmetic write enables
    logic [3:0] v_we;
    logic [3:0] w_we;
    logic       fs_we;
    logic       gs_we;
    logic       mult_start;
    logic       mult_use_fs;
    logic       mult_use_gs;
    logic       inc_g0;
    logic       move_en;
    logic [1:0] move_dst;
    logic [1:0] move_src;
    logic [3:0] move_mask;
    logic       illegal;    // unsupported bank combination (no effect)
  } dp_ctrl_t;

  // Instruction constructors (used by testbenches and program generators).
  function automatic logic [15:0] mk_instr(cmd_e c, logic [1:0] b2, logic [3:0] r2,
                                           logic [1:0] b1, logic [3:0] r1);
    return {c, b2, r2, b1, r1};
  endfunction

  function automatic logic [15:0] mk_ctrl(cmd_e c, logic [11:0] n);
    return {c, n};
  endfunction

endpackage
