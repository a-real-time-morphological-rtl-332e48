// tb_table1_skeleton -- the "skeleton of a B/W image" workload of the
// performance table, end to end on the default-size system (Q = 128).
//
// The skeleton is computed by hit-or-miss thinning. One thinning step
// removes every pixel whose 3x3 neighbourhood matches a template; eight
// templates (two shapes and their rotations by 90 degrees) are applied one
// after the other, and the sequence of eight is repeated until a whole
// round removes nothing.
//
// Phase 1 acquires H camera lines and stores bit-plane 0 in the image
// memory. Phase 2 holds the eight thinning steps as eight program blocks in
// the writable control store, one block per template. Each block is
// applied to the whole image, one line per iteration, reading one plane
// and writing the other:
//   LD   M0 <- line y+1          (M0 rows 2,3,4 = lines y-1, y, y+1)
//   H   = template match on M0
//   OUT = row-3 centre of M0 AND NOT H
//   CH |= H                      (a pixel was removed somewhere)
//   ST   OUT -> line y
// After each round the program memory evaluates the flags on CH over all
// PEs and leaves the loop when every PE reports "nothing removed". The
// last camera line is blank, so the line read past the image end never
// reaches a result.
//
// Checked: the final plane against a software model of the same thinning,
// the number of rounds against the model's, and the clock count of one
// block against its instruction count.
module tb_table1_skeleton;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, H = 16, MEMC = 5;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] cam_pix = 0, disp_pix;
  logic cam_valid = 0, disp_valid, host_wr = 0, busy, done;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  paprica3_top dut (.*);
  always #5 clk = ~clk;

  logic img [H][Q];
  logic ref_img [H][Q];
  logic [24:0] tcare [8], tval [8];
  int cyc = 0, n_fen = 0, n_wrun = 0, t0 = -1, t1 = -1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d flag evaluations, %0d blocks run, pc %0d", n_fen, n_wrun, dut.u_ct.pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_FEN) n_fen++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRUN) begin
      n_wrun++;
      if (n_wrun == 1) t0 = cyc;
    end
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRET && t1 < 0) t1 = cyc;
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

  // A 3x3 template as three rows of '0', '1' or 'x', north row first,
  // west pixel first; placed in rows 2..4, columns 1..3 of the 5x5 word.
  task automatic mk_tpl(int k, string n, string m, string s);
    string rows [3];
    rows = '{n, m, s};
    tcare[k] = '0; tval[k] = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (rows[r][c] != "x") begin
          tcare[k][(r + 2) * 5 + c + 1] = 1'b1;
          tval[k][(r + 2) * 5 + c + 1] = (rows[r][c] == "1");
        end
  endtask

  // rotate a 3x3 template by 90 degrees clockwise: new(r,c) = old(2-c, r)
  task automatic rot(int k, int from);
    tcare[k] = '0; tval[k] = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        tcare[k][(r + 2) * 5 + c + 1] = tcare[from][(2 - c + 2) * 5 + r + 1];
        tval[k][(r + 2) * 5 + c + 1]  = tval[from][(2 - c + 2) * 5 + r + 1];
      end
  endtask

  function automatic logic px(int y, int x);
    if (y < 0 || y >= H || x < 0 || x >= Q) return 1'b0;
    return ref_img[y][x];
  endfunction

  // one software thinning step with template k; returns the pixels removed
  function automatic int sw_step(int k);
    logic nxt [H][Q];
    int removed = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < Q; x++) begin
        logic [24:0] nb = '0;
        for (int r = 2; r < 5; r++)
          for (int c = 0; c < 5; c++) nb[r*5+c] = px(y + r - 3, x + c - 2);
        nxt[y][x] = ref_img[y][x] & ~sw_match(nb, tcare[k], tval[k]);
        if (nxt[y][x] != ref_img[y][x]) removed++;
      end
    ref_img = nxt;
    return removed;
  endfunction

  localparam int M0 = 0, HR = NMOR, OUT = NMOR + 1, CH = NMOR + 2, ONE = NMOR + 3;
  localparam int BLK = 64, BLEN = 9;
  localparam logic [24:0] ROW3 = 25'd1 << 17;

  initial begin
    int rounds, removed, per_line;
    mk_tpl(0, "000", "x1x", "111");
    mk_tpl(1, "x00", "110", "x1x");
    for (int k = 2; k < 8; k++) rot(k, k - 2);
    // blobs: random filled rectangles; the last line stays blank
    for (int y = 0; y < H; y++) for (int x = 0; x < Q; x++) img[y][x] = 1'b0;
    for (int b = 0; b < 10; b++) begin
      automatic int y0 = $urandom % (H - 4), x0 = $urandom % (Q - 12);
      automatic int hh = 2 + $urandom % 8, ww = 2 + $urandom % 10;
      for (int y = y0; y < y0 + hh && y < H - 1; y++)
        for (int x = x0; x < x0 + ww; x++) img[y][x] = 1'b1;
    end
    ref_img = img;
    rounds = 0;
    do begin
      removed = 0;
      for (int k = 0; k < 8; k++) removed += sw_step(k);
      rounds++;
    end while (removed != 0);

    repeat (2) @(negedge clk); rst_n = 1;
    // --- phase 1: camera plane 0 -> image memory plane 0
    put(i_imm(OP_SETH, H));
    put(i_imm(OP_SETB, 0, 0));
    put(i_imm(OP_SETL, 0));
    put(i_base(OP_ISYNC));                                   // pc 3
    put(i_ldi(OUT, 0));
    put(i_st(OUT, 0, 0, 0));
    put(i_imm(OP_LOOP, 3));
    // --- phase 2: thinning rounds until nothing changes
    put(i_wld(BLK, 8 * BLEN));
    put(i_morph(ONE, 0, 0, '0, '0, LOP_M));                  // ONE = 1
    put(i_morph(CH, 0, 0, '0, '0, LOP_NOTM));                // pc 9: CH = 0
    for (int k = 0; k < 8; k++) begin
      put(i_imm(OP_SETL, 0));
      put(i_imm(OP_WRUN, k * BLEN));
    end
    put(i_fen(CH, ONE));
    put(i_br(BR_RESET, pc + 2));
    put(i_imm(OP_JMP, 9));
    put(i_base(OP_HALT));
    pc = BLK;
    for (int k = 0; k < 8; k++) begin
      automatic int a = k % 2, b = 1 - (k % 2);
      put(i_morph(M0, 0, 0, '0, '0, LOP_NOTM));              // shift in blank line -1
      put(i_ld(M0, 0, a, 0));                                // line 0
      put(i_ld(M0, 0, a, 1));                                // loop head: line y+1
      put(i_morph(HR, M0, 0, tcare[k], tval[k]));
      put(i_morph(OUT, M0, HR, ROW3, ROW3, LOP_ANDN));
      put(i_morph(CH, HR, 0, TPL_ID, TPL_ID, LOP_M, ACC_OR));
      put(i_st(OUT, 0, b, 0));
      put(i_imm(OP_LOOP, k * BLEN + 2));
      put(i_base(OP_WRET));
    end

    hwr(6, 1);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < Q; x++) begin
        @(negedge clk); cam_valid = 1; cam_pix = P'(img[y][x]) | P'($urandom) & ~P'(1);
      end
      @(negedge clk); cam_valid = 0;
      wait (!dut.ii_line_ready);
    end
    wait (done);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < Q; x++) begin
        checks++;
        if (membit(y, x) !== ref_img[y][x]) begin
          failures++;
          if (failures < 10) $display("line %0d px %0d: got %0b exp %0b", y, x, membit(y, x), ref_img[y][x]);
        end
      end
    $display("skeleton: %0d rounds of 8 thinning steps (model %0d), %0d blocks run", n_fen, rounds, n_wrun);
    begin
      int n_in = 0, n_out = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < Q; x++) begin
        n_in += int'(img[y][x]); n_out += int'(ref_img[y][x]);
      end
      $display("%0d object pixels thinned to %0d", n_in, n_out);
      checks++;
      if (n_out == 0 || n_out == n_in) failures++;   // the test image must be non-trivial
    end
    checks++;
    if (n_fen != rounds || n_wrun != 8 * rounds) failures++;
    // one block: WRUN, shift, first LD, then per line LD + 3 logic + ST + LOOP
    per_line = (MEMC + 1) + 3 + (MEMC + 1) + 1;
    $display("one step: %0d clocks for %0d lines (%0d per line); %0d rounds = %0d clocks per line",
             t1 - t0, H, per_line, rounds, rounds * 8 * per_line);
    $display("=> %0.1f ns/pixel at T_C = 10 ns, Q = %0d", (rounds * 8 * per_line) * 10.0 / Q, Q);
    checks++;
    if (t1 - t0 != 1 + 1 + (MEMC + 1) + H * per_line) begin
      failures++;
      $display("expected %0d clocks", 1 + 1 + (MEMC + 1) + H * per_line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
