// tb_etat_fragments: runs on the full-size cryptoprocessor (m = 1223) the
// instruction sequences that eta_T pairing programs are made of, and checks
// them against reference arithmetic:
//  - q-th power in F_{q^4} for the tower {1,u,v,uv}:
//      G^q = (g0+g1+g2) + (g1+g2+g3)u + (g2+g3)v + g3 uv      (4 Additions)
//  - squaring in F_{q^4} for the same tower:
//      G^2 = (g0+g1+g3)^2 + (g1+g2)^2 u + (g2+g3)^2 v + g3^2 uv (4 Squarings)
//  - q-th power for the alternative basis {1,x,x^2,x^4}:
//      G^q = (g0+g2) + g2 x + (g1+g3) x^2 + g3 x^4             (4 Additions)
//  - Miller-loop fragments with P = (x1,y1), Q = (x2,y2) in F0..F3:
//      y1 + y2 + 1 (beta = -1: Addition then IncG0),
//      s*(sqrt(x1) + x2 + 1) with s = x1 + 1 (gamma = 1 sequence, via Fs),
//      x1*(sqrt(x1) + x2)   (gamma = 0 sequence, the case of m = 1223),
//      y1 + y2 + x1 + 1 (delta = 1) computed while the multiplier runs.
// Results are spilled with MoveBank (V->H, W->I) and read back by the host.
module tb_etat_fragments;
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

  logic [15:0] prog [$];
  logic [M-1:0] fin [7][4];
  logic [M-1:0] g [4], f [4];

  localparam logic [1:0] B00 = 2'b00;
  localparam logic [3:0] R0 = 4'b0001, R1 = 4'b0010, R2 = 4'b0100, R3 = 4'b1000;

  task automatic host_write(int b, int r, logic [M-1:0] v);
    @(negedge clk);
    host_we = 1; host_bank = 3'(b); host_reg = 2'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_program();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    for (int b = 0; b < 7; b++)
      for (int r = 0; r < 4; r++) begin
        host_bank = 3'(b); host_reg = 2'(r);
        #1;
        fin[b][r] = host_rdata;
      end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [M-1:0] x1, y1, x2, y2, s;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- run 1: F_{q^4} operations on G = g0 + g1 u + g2 v + g3 uv in bank G
    for (int r = 0; r < 4; r++) begin
      g[r] = R::rnd(); host_write(1, r, g[r]);
      f[r] = R::rnd(); host_write(0, r, f[r]);
    end
    prog.delete();
    prog.push_back(mk_instr(CMD_ADD, DST_V, R0, SRC_G, 4'b0111));
    prog.push_back(mk_instr(CMD_ADD, DST_V, R1, SRC_G, 4'b1110));
    prog.push_back(mk_instr(CMD_ADD, DST_V, R2, SRC_G, 4'b1100));
    prog.push_back(mk_instr(CMD_ADD, DST_V, R3, SRC_G, 4'b1000));
    prog.push_back(mk_instr(CMD_SQR, DST_W, R0, SRC_G, 4'b1011));
    prog.push_back(mk_instr(CMD_SQR, DST_W, R1, SRC_G, 4'b0110));
    prog.push_back(mk_instr(CMD_SQR, DST_W, R2, SRC_G, 4'b1100));
    prog.push_back(mk_instr(CMD_SQR, DST_W, R3, SRC_G, 4'b1000));
    prog.push_back(mk_instr(CMD_MOVEBANK, MVD_H, 4'b0000, MVS_V, 4'b1111));
    prog.push_back(mk_instr(CMD_MOVEBANK, MVD_I, 4'b0000, MVS_W, 4'b1111));
    // alternative basis, F bank as the element
    prog.push_back(mk_instr(CMD_ADD, DST_G, R0, SRC_F, 4'b0101));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R1, SRC_F, 4'b0100));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R2, SRC_F, 4'b1010));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R3, SRC_F, 4'b1000));
    prog.push_back(mk_ctrl(CMD_END, 12'd0));
    run_program();
    chk(fin[2][0] === (g[0] ^ g[1] ^ g[2]), "G^q coefficient 1");
    chk(fin[2][1] === (g[1] ^ g[2] ^ g[3]), "G^q coefficient u");
    chk(fin[2][2] === (g[2] ^ g[3]),        "G^q coefficient v");
    chk(fin[2][3] === g[3],                 "G^q coefficient uv");
    chk(fin[3][0] === R::mul(g[0] ^ g[1] ^ g[3], g[0] ^ g[1] ^ g[3]), "G^2 coefficient 1");
    chk(fin[3][1] === R::mul(g[1] ^ g[2], g[1] ^ g[2]),               "G^2 coefficient u");
    chk(fin[3][2] === R::mul(g[2] ^ g[3], g[2] ^ g[3]),               "G^2 coefficient v");
    chk(fin[3][3] === R::mul(g[3], g[3]),                             "G^2 coefficient uv");
    chk(fin[1][0] === (f[0] ^ f[2]), "alt G^q coefficient 1");
    chk(fin[1][1] === f[2],          "alt G^q coefficient x");
    chk(fin[1][2] === (f[1] ^ f[3]), "alt G^q coefficient x^2");
    chk(fin[1][3] === f[3],          "alt G^q coefficient x^4");

    // ---- run 2: Miller-loop fragments, F0..F3 = x1, y1, x2, y2
    x1 = R::rnd(); y1 = R::rnd(); x2 = R::rnd(); y2 = R::rnd();
    host_write(0, 0, x1); host_write(0, 1, y1); host_write(0, 2, x2); host_write(0, 3, y2);
    prog.delete();
    // beta = -1: G0 = y1 + y2 + 1, kept in V0
    prog.push_back(mk_instr(CMD_ADD, DST_G, R0, SRC_F, 4'b1010));
    prog.push_back(mk_instr(CMD_INCG0, B00, 4'b0000, B00, 4'b0000));
    prog.push_back(mk_instr(CMD_ADD, DST_V, R0, SRC_G, R0));
    // gamma = 1: s = x1 + 1 into Fs, then s * (sqrt(x1) + 1 + x2)
    prog.push_back(mk_instr(CMD_ADD, DST_G, R0, SRC_F, R0));
    prog.push_back(mk_instr(CMD_INCG0, B00, 4'b0000, B00, 4'b0000));
    prog.push_back(mk_instr(CMD_ADD, DST_S, R0, SRC_G, R0));
    prog.push_back(mk_instr(CMD_SQRT, DST_G, R0, SRC_F, R0));
    prog.push_back(mk_instr(CMD_INCG0, B00, 4'b0000, B00, 4'b0000));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R1, SRC_F, R2));
    prog.push_back(mk_instr(CMD_LOADMULT, MUL_SREG, 4'b0000, SRC_G, 4'b0011));
    prog.push_back(mk_ctrl(CMD_WAIT, 12'd8));
    prog.push_back(mk_instr(CMD_STOREMULT, DST_V, R1, B00, 4'b0000));
    // gamma = 0: x1 * (sqrt(x1) + x2), with y1 + y2 + x1 + 1 computed meanwhile
    prog.push_back(mk_instr(CMD_SQRT, DST_G, R0, SRC_F, R0));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R1, SRC_F, R2));
    prog.push_back(mk_instr(CMD_LOADMULT, SRC_F, R0, SRC_G, 4'b0011));
    prog.push_back(mk_instr(CMD_ADD, DST_G, R0, SRC_F, 4'b1011));
    prog.push_back(mk_instr(CMD_INCG0, B00, 4'b0000, B00, 4'b0000));
    prog.push_back(mk_instr(CMD_ADD, DST_W, R0, SRC_G, R0));
    prog.push_back(mk_ctrl(CMD_WAIT, 12'd5));
    prog.push_back(mk_instr(CMD_STOREMULT, DST_V, R2, B00, 4'b0000));
    prog.push_back(mk_ctrl(CMD_END, 12'd0));
    run_program();
    s = x1 ^ M'(1);
    chk(fin[4][0] === (y1 ^ y2 ^ M'(1)), "y1 + y2 + 1");
    chk(fin[6][0] === s, "Fs = x1 + 1");
    // sqrt(x1) is checked through the products it feeds
    chk(fin[4][1] === R::mul(s, sqrt_ref(x1) ^ M'(1) ^ x2), "s*(sqrt(x1)+x2+1)");
    chk(fin[4][2] === R::mul(x1, sqrt_ref(x1) ^ x2), "x1*(sqrt(x1)+x2)");
    chk(fin[5][0] === (y1 ^ y2 ^ x1 ^ M'(1)), "y1 + y2 + x1 + 1 during the multiplication");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // square root by m-1 squarings (a^(2^(m-1)))
  function automatic logic [M-1:0] sqrt_ref(logic [M-1:0] a);
    for (int i = 0; i < int'(M) - 1; i++) a = R::mul(a, a);
    return a;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
