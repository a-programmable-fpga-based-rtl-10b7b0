// tb_pairing_datapath: drives the datapath control word directly, on a small
// field (m = 17, f = x^17 + x^3 + 1, two Karatsuba levels in the core), and checks
// every path against a register-level model: adders with read enables, all
// arithmetic destinations (G, V, W, Fs, Gs), squaring, square root, LoadMult
// from banks and from Fs/Gs with StoreMult after 9 cycles, IncG0, the six
// MoveBank paths and the host port.
module tb_pairing_datapath;
  import gf2m_pkg::*;
  import gf_ref_pkg::*;
  localparam int unsigned M = 17, K = 3;
  typedef gf_ref #(M, K) R;

  logic clk = 0, rst_n = 0;
  dp_ctrl_t ctrl;
  logic host_we = 0;
  logic [2:0] host_bank = '0;
  logic [1:0] host_reg = '0;
  logic [M-1:0] host_wdata = '0, host_rdata;
  logic mult_busy, mult_done;
  logic [M-1:0] mdl [7][4];   // model: banks F,G,H,I,V,W, then Fs/Gs in [6][0..1]
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pairing_datapath #(.M(M), .K(K), .DEPTH(2)) dut (
    .clk, .rst_n, .ctrl, .host_we, .host_bank, .host_reg, .host_wdata, .host_rdata,
    .mult_busy, .mult_done
  );

  function automatic dp_ctrl_t nop();
    dp_ctrl_t c = '0;
    c.res_sel = RES_ADD;
    return c;
  endfunction

  task automatic step(dp_ctrl_t c);
    @(negedge clk);
    ctrl = c;
    @(negedge clk);
    ctrl = nop();
  endtask

  function automatic logic [M-1:0] bsum(int b, logic [3:0] re);
    logic [M-1:0] s = '0;
    for (int i = 0; i < 4; i++) if (re[i]) s ^= mdl[b][i];
    return s;
  endfunction

  task automatic check_all(string what);
    for (int b = 0; b < 7; b++)
      for (int r = 0; r < ((b == 6) ? 2 : 4); r++) begin
        @(negedge clk);
        host_bank = 3'(b); host_reg = 2'(r);
        #1;
        checks++;
        if (host_rdata !== mdl[b][r]) begin
          failures++;
          $display("FAIL %s: bank %0d reg %0d got %h exp %h", what, b, r, host_rdata, mdl[b][r]);
        end
      end
  endtask

  task automatic arith(res_sel_e sel, bit src_g, logic [3:0] re, int dst, logic [3:0] wm);
    dp_ctrl_t c = nop();
    logic [M-1:0] s, res;
    s = src_g ? bsum(1, re) : bsum(0, re);
    if (src_g) begin c.g_re = re; c.src_is_g = 1; end else c.f_re = re;
    c.res_sel = sel;
    unique case (sel)
      RES_SQR:  res = R::mul(s, s);
      RES_SQRT: res = '0;   // checked separately
      default:  res = s;
    endcase
    case (dst)
      1: c.g_we = wm;
      4: c.v_we = wm;
      5: c.w_we = wm;
      default: begin c.fs_we = wm[0]; c.gs_we = wm[1]; end
    endcase
    step(c);
    if (sel == RES_SQRT) begin
      // read back the root and check that it squares to the source
      for (int i = 0; i < 4; i++) if (wm[i]) begin
        host_bank = 3'(dst); host_reg = 2'(i); #1;
        res = host_rdata;
      end
      checks++;
      if (R::mul(res, res) !== s) begin failures++; $display("FAIL sqrt"); end
    end
    for (int i = 0; i < 4; i++) if (wm[i]) mdl[dst][i] = res;
  endtask

  initial begin
    ctrl = nop();
    for (int b = 0; b < 7; b++) for (int r = 0; r < 4; r++) mdl[b][r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all("reset");
    // host loads every register
    for (int b = 0; b < 7; b++)
      for (int r = 0; r < ((b == 6) ? 2 : 4); r++) begin
        @(negedge clk);
        host_we = 1; host_bank = 3'(b); host_reg = 2'(r); host_wdata = R::rnd();
        mdl[b][r] = host_wdata;
      end
    @(negedge clk);
    host_we = 0;
    check_all("host load");

    arith(RES_ADD, 0, 4'b0101, 1, 4'b0001);   // G0 = F0 + F2
    arith(RES_ADD, 1, 4'b1111, 5, 4'b0110);   // W1,W2 = G0+G1+G2+G3
    arith(RES_SQR, 0, 4'b1010, 4, 4'b0001);   // V0 = (F1+F3)^2
    arith(RES_SQR, 1, 4'b0011, 1, 4'b1000);   // G3 = (G0+G1)^2
    arith(RES_SQRT, 0, 4'b0001, 1, 4'b0010);  // G1 = sqrt(F0)
    arith(RES_ADD, 1, 4'b0001, 6, 4'b0001);   // Fs = G0
    arith(RES_ADD, 0, 4'b1000, 6, 4'b0010);   // Gs = F3
    check_all("arith");

    // LoadMult(Fs, G[1,2]); Wait; StoreMult(V[3])
    begin
      dp_ctrl_t c = nop();
      logic [M-1:0] e;
      e = R::mul(mdl[6][0], bsum(1, 4'b0110));
      c.mult_use_fs = 1; c.g_re = 4'b0110; c.mult_start = 1;
      step(c);
      repeat (8) @(negedge clk);
      checks++;
      if (mult_done) begin failures++; $display("FAIL mult_done before 10 cycles"); end
      @(negedge clk);
      checks++;
      if (!mult_done) begin failures++; $display("FAIL mult_done after 10 cycles"); end
      c = nop(); c.res_sel = RES_MUL; c.v_we = 4'b1000;
      ctrl = c;
      @(negedge clk);
      ctrl = nop();
      mdl[4][3] = e;
      // LoadMult(F[0,1], Gs); StoreMult(W[0], G[2])
      e = R::mul(bsum(0, 4'b0011), mdl[6][1]);
      c = nop(); c.f_re = 4'b0011; c.mult_use_gs = 1; c.mult_start = 1;
      step(c);
      repeat (9) @(negedge clk);
      c = nop(); c.res_sel = RES_MUL; c.w_we = 4'b0001;
      step(c);
      c.w_we = '0; c.g_we = 4'b0100;
      step(c);
      mdl[5][0] = e;
      mdl[1][2] = e;
    end
    check_all("mult");

    // IncG0 twice
    for (int k = 0; k < 2; k++) begin
      dp_ctrl_t c = nop();
      c.inc_g0 = 1;
      step(c);
      mdl[1][0][0] = ~mdl[1][0][0];
      check_all("incg0");
    end

    // MoveBank paths: {dst, src, mask}
    begin
      int unsigned paths [6][3] = '{
        '{MVD_H, MVS_V, 4'b1111}, '{MVD_I, MVS_W, 4'b1111}, '{MVD_F, MVS_H, 4'b0110},
        '{MVD_G, MVS_I, 4'b1001}, '{MVD_F, MVS_V, 4'b0001}, '{MVD_G, MVS_W, 4'b0010}};
      int unsigned dstb [4] = '{0, 1, 2, 3};
      int unsigned srcb [4] = '{4, 5, 2, 3};
      // give V and W fresh contents first
      arith(RES_ADD, 0, 4'b0011, 4, 4'b1111);
      arith(RES_ADD, 1, 4'b1100, 5, 4'b1010);
      for (int p = 0; p < 6; p++) begin
        dp_ctrl_t c = nop();
        c.move_en = 1; c.move_dst = 2'(paths[p][0]); c.move_src = 2'(paths[p][1]);
        c.move_mask = 4'(paths[p][2]);
        step(c);
        for (int i = 0; i < 4; i++)
          if (paths[p][2][i]) mdl[dstb[paths[p][0]]][i] = mdl[srcb[paths[p][1]]][i];
        check_all($sformatf("move %0d", p));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
