// tb_table1_flow -- the optical-flow workload of the performance table
// (8-bit images, search range +-8 pixels), run end to end on the
// default-size system (Q = 128). The full search has 289 displacements; the
// program memory holds about 20 blocks of this size, so the test searches
// 13 of them: the dense +-1 square plus four that reach 8 pixels away in
// each direction. A column offset beyond 2 is reached by repeated two-column
// template shifts through a morphological register (|dx| = 8: four picks).
//
// For every pixel the search finds the displacement (dx, dy) that gives
// the smallest absolute difference |I1(x, y) - I2(x + dx, y + dy)|. Ties
// keep the earlier displacement. Images: I1 (descriptor 0) and I2
// (descriptor 1), acquired from the camera as the low and high bytes of a
// pixel; the running minimum MIN (2) and the index of the best
// displacement IDX (3) live in the image memory, DIFF (4) is scratch.
//
// One program block per displacement, copied into the writable control
// store and run over all lines. Per line:
//   A. DIFF = I1 - I2(dx, dy), bit-serial with a borrow; the final borrow
//      SG says I1 < I2.
//   B. DIFF = |DIFF|: two's complement negation where SG = 1 (a bit is
//      inverted once a lower bit was 1), and in the same bit loop the
//      borrow of DIFF - MIN, whose final value LT says DIFF < MIN.
//   C. LT is copied into the %EN mask register; MIN and IDX are rewritten
//      with DIFF and the displacement number only where it is set.
//
// Checked: MIN and IDX of every pixel of the lines whose searches stay
// inside the image, against a software search; and the clock count of one
// block against its instruction count.
module tb_table1_flow;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, H = 20, ND = 13, MEMC = 5, R = 8;
  localparam int NP = 8;                    // planes per image
  logic clk = 0, rst_n = 0;
  logic [P-1:0] cam_pix = 0, disp_pix;
  logic cam_valid = 0, disp_valid, host_wr = 0, busy, done;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  paprica3_top dut (.*);
  always #5 clk = ~clk;

  logic [7:0] i1 [H][Q], i2 [H][Q];
  int cyc = 0, n_wrun = 0, t0 = -1, t1 = -1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d blocks run", n_wrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRUN) begin
      n_wrun++;
      if (n_wrun == 2) t0 = cyc;
    end
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRET && n_wrun == 2 && t1 < 0) t1 = cyc;
  end

  task automatic hwr(int a, logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = 4'(a); host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  int pc = 0;
  task automatic put(instr_t i);
    logic [127:0] w;
    w = 128'(i);
    hwr(0, pc);
    for (int k = 0; k < 4; k++) hwr(1 + k, w[k*32 +: 32]);
    hwr(5, 0);
    pc++;
  endtask

  function automatic logic membit(int addr, int x);
    case (x / 32)
      0: return dut.u_im.g_mod[0].u_mod.mem[addr][x % 32];
      1: return dut.u_im.g_mod[1].u_mod.mem[addr][x % 32];
      2: return dut.u_im.g_mod[2].u_mod.mem[addr][x % 32];
      default: return dut.u_im.g_mod[3].u_mod.mem[addr][x % 32];
    endcase
  endfunction

  function automatic int memval(int d, int nb, int y, int x);
    int v = 0;
    for (int p = 0; p < nb; p++) v |= int'(membit(d * NP * H + p * H + y, x)) << p;
    return v;
  endfunction

  localparam int M1 = 1, M2 = 2;
  // displacement list: k -> (dx, dy)
  localparam int DXS [ND] = '{-1, 0, 1, -1, 0, 1, -1, 0, 1, -8, 8, 5, -3};
  localparam int DYS [ND] = '{-1, -1, -1, 0, 0, 0, 1, 1, 1, 2, -3, -8, 8};
  // extra template shifts for a column offset
  function automatic int nshift(int dx);
    int a = (dx < 0) ? -dx : dx;
    return (a <= 2) ? 0 : (a + 1) / 2 - 1;
  endfunction
  localparam int A = NMOR, B = NMOR + 1, T = NMOR + 2, BR = NMOR + 3, DF = NMOR + 4,
                 BR2 = NMOR + 5, MN = NMOR + 6, LT = NMOR + EN_LOR;
  // registers reused in part B
  localparam int DV = A, SEEN = B, W = T, SG = BR, ABS = DF, U = A;
  localparam int NIDX = 4;   // ND <= 16
  function automatic int blen(int dx);
    return 1 + NP * (8 + nshift(dx)) + 2 + NP * 10 + 1 + NP * 3 + NIDX * 3 + 2;
  endfunction

  function automatic logic [24:0] pick(int dx);
    return 25'd1 << (4 * 5 + 2 + dx);
  endfunction

  function automatic instr_t with_en(instr_t i);
    i.en = 1'b1;
    return i;
  endfunction

  task automatic flow_block(int k, int dx, int dy);
    // A: DIFF = I1 - I2(dx, dy)
    put(i_morph(BR, 0, 0, '0, '0, LOP_NOTM));                 // borrow = 0
    for (int p = 0; p < NP; p++) begin
      put(i_ld(A, 0, p, 0));
      put(i_ld(M1, 1, p, dy));
      if (nshift(dx) == 0) put(i_morph(B, M1, 0, pick(dx), pick(dx)));
      else begin
        // move by 2 columns per pick, then by the remainder into B
        automatic int s = (dx < 0) ? -2 : 2, rest = dx;
        put(i_morph(M2, M1, 0, pick(s), pick(s))); rest -= s;
        for (int n = 1; n < nshift(dx); n++) begin
          put(i_morph(M2, M2, 0, pick(s), pick(s))); rest -= s;
        end
        put(i_morph(B, M2, 0, pick(rest), pick(rest)));
      end
      put(i_morph(T, A, B, TPL_ID, TPL_ID, LOP_XOR));
      put(i_morph(DF, T, BR, TPL_ID, TPL_ID, LOP_XOR));
      put(i_st(DF, 4, p, 0));
      put(i_morph(BR, T, BR, TPL_ID, TPL_ID, LOP_BANDN));     // br & ~t
      put(i_morph(BR, A, B, TPL_ID, TPL_ID, LOP_BANDN, ACC_OR)); // |= b & ~a
    end
    // B: DIFF = |DIFF| and LT = DIFF < MIN
    put(i_morph(SEEN, 0, 0, '0, '0, LOP_NOTM));
    put(i_morph(BR2, 0, 0, '0, '0, LOP_NOTM));
    for (int p = 0; p < NP; p++) begin
      put(i_ld(DV, 4, p, 0));
      put(i_morph(W, SEEN, SG, TPL_ID, TPL_ID, LOP_AND));
      put(i_morph(ABS, DV, W, TPL_ID, TPL_ID, LOP_XOR));
      put(i_morph(SEEN, DV, 0, TPL_ID, TPL_ID, LOP_M, ACC_OR));
      put(i_st(ABS, 4, p, 0));
      put(i_ld(MN, 2, p, 0));
      put(i_morph(T, ABS, MN, TPL_ID, TPL_ID, LOP_XOR));
      put(i_morph(U, ABS, MN, TPL_ID, TPL_ID, LOP_BANDN));    // min & ~abs
      put(i_morph(BR2, T, BR2, TPL_ID, TPL_ID, LOP_BANDN));
      put(i_morph(BR2, U, 0, TPL_ID, TPL_ID, LOP_M, ACC_OR));
    end
    // C: masked update of MIN and IDX
    put(i_mov(LT, BR2));
    for (int p = 0; p < NP; p++) begin
      put(i_ld(MN, 2, p, 0));
      put(with_en(i_ld(MN, 4, p, 0)));
      put(i_st(MN, 2, p, 0));
    end
    for (int p = 0; p < NIDX; p++) begin
      put(i_ld(MN, 3, p, 0));
      put(i_morph(MN, 0, 0, '0, '0, k[p] ? LOP_M : LOP_NOTM, ACC_ST, 1'b1));
      put(i_st(MN, 3, p, 0));
    end
    put(i_imm(OP_LOOP, 0));
    put(i_base(OP_WRET));
  endtask

  localparam int IBLEN = 1 + 1 + NP + NIDX + 2;
  task automatic init_block();
    put(i_morph(A, 0, 0, '0, '0, LOP_M));                    // 1
    put(i_morph(B, 0, 0, '0, '0, LOP_NOTM));                 // 0
    for (int p = 0; p < NP; p++) put(i_st(A, 2, p, 0));      // MIN = 255
    for (int p = 0; p < NIDX; p++) put(i_st(B, 3, p, 0));    // IDX = 0
    put(i_imm(OP_LOOP, 0));
    put(i_base(OP_WRET));
  endtask

  initial begin
    int blk, per_line, n_far = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < Q; x++) begin
        i1[y][x] = 8'($urandom);
        i2[y][x] = 8'($urandom);
      end
    repeat (2) @(negedge clk); rst_n = 1;
    // --- phase 1: camera -> I1, I2
    put(i_imm(OP_SETH, H));
    for (int d = 0; d < 5; d++) put(i_imm(OP_SETB, d * NP * H, d));
    put(i_imm(OP_SETL, 0));
    blk = pc;
    put(i_base(OP_ISYNC));
    for (int p = 0; p < NP; p++) begin
      put(i_ldi(A, p));      put(i_st(A, 0, p, 0));
      put(i_ldi(A, NP + p)); put(i_st(A, 1, p, 0));
    end
    put(i_imm(OP_LOOP, blk));
    // --- phase 2: initialise MIN and IDX, then one block per displacement
    blk = pc + 3 * (ND + 1) + 1;
    put(i_wld(blk, IBLEN)); put(i_imm(OP_SETL, 0)); put(i_imm(OP_WRUN, 0));
    blk += IBLEN;
    for (int k = 0; k < ND; k++) begin
      put(i_wld(blk, blen(DXS[k])));
      put(i_imm(OP_SETL, 0));
      put(i_imm(OP_WRUN, 0));
      blk += blen(DXS[k]);
    end
    put(i_base(OP_HALT));
    init_block();
    for (int k = 0; k < ND; k++) flow_block(k, DXS[k], DYS[k]);

    hwr(6, 1);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < Q; x++) begin
        @(negedge clk); cam_valid = 1; cam_pix = {i2[y][x], i1[y][x]};
      end
      @(negedge clk); cam_valid = 0;
      wait (!dut.ii_line_ready);
    end
    wait (done);
    for (int y = R; y < H - R; y++)
      for (int x = 0; x < Q; x++) begin
        automatic int mn = 255, idx = 0, gm = 0, gi = 0;
        for (int k = 0; k < ND; k++) begin
          automatic int dx = DXS[k], dy = DYS[k];
          automatic int b = (x + dx < 0 || x + dx >= Q) ? 0 : int'(i2[y + dy][x + dx]);
          automatic int ad = (int'(i1[y][x]) > b) ? int'(i1[y][x]) - b : b - int'(i1[y][x]);
          if (ad < mn) begin mn = ad; idx = k; end
        end
        if (idx >= 9) n_far++;
        gm = memval(2, NP, y, x);
        gi = memval(3, NIDX, y, x);
        checks++;
        if (gm != mn || gi != idx) begin
          failures++;
          if (failures < 10) $display("line %0d px %0d: min %0d idx %0d, expected %0d %0d", y, x, gm, gi, mn, idx);
        end
      end
    // the far displacements (shift chains) must win somewhere
    $display("%0d pixels matched best at a displacement of 3 to 8 columns or lines", n_far);
    checks++;
    if (n_far == 0) failures++;
    checks++;
    if (n_wrun != ND + 1) failures++;
    per_line = 1 + NP * (3 * (MEMC + 1) + 5) + 2 + NP * (3 * (MEMC + 1) + 7)
             + 1 + NP * 3 * (MEMC + 1) + NIDX * (2 * (MEMC + 1) + 1) + 1;
    $display("one displacement: %0d clocks per line (measured %0d for %0d lines); %0d displacements = %0d clocks/line",
             per_line, t1 - t0, H, ND, ND * per_line);
    $display("+-8 full search: 289 x %0d = %0d clocks/line, plus one clock per bit-plane per extra shift",
             per_line, 289 * per_line);
    checks++;
    if (t1 - t0 != H * per_line + 1) begin failures++; $display("expected %0d clocks", H * per_line + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
