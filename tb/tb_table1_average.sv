// tb_table1_average -- the 3x3 and 5x5 pixel-average workloads of the
// performance table (8-bit images), end to end on the default-size system
// (Q = 128).
//
// An average over a (2R+1)x(2R+1) window is its box sum divided by a
// constant; this test computes the box sums (9 and 25 times the averages)
// and leaves the constant division out. The box sum is separable: the
// horizontal sum of 2R+1 pixels, then the vertical sum of 2R+1 such lines.
// Every step is one bit-serial addition of two images kept in the image
// memory, each operand being a line taken at a line offset dy (address
// offset of the load) and a column offset dx (a one-pixel template on the
// loaded morphological register, which reaches two PEs east or west).
// All images are W = 13 bit-planes wide, enough for 25 x 255.
//
// One addition is one program block: the program memory copies it into
// the writable control store (WLD), then runs it once per line (WRUN).
// Per bit-plane and line:
//   LD M0; A = pick(M0, dx_a); LD M1; B = pick(M1, dx_b)
//   t = a ^ b;  s = t ^ c;  ST s;  u = t & c;  c = a & b;  c |= u
// so 4 array instructions, 3 memory transfers and 3 carry instructions.
//
// Checked: the 3x3 and 5x5 box sums of every pixel of the lines whose
// windows lie inside the image (columns outside the array read as 0), and
// the clock count of one addition block.
module tb_table1_average;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, H = 8, W = 13, MEMC = 5;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] cam_pix = 0, disp_pix;
  logic cam_valid = 0, disp_valid, host_wr = 0, busy, done;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  paprica3_top dut (.*);
  always #5 clk = ~clk;

  logic [7:0] img [H][Q];
  int cyc = 0, n_wrun = 0, n_wld = 0, t0 = -1, t1 = -1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d blocks run", n_wrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WLD) n_wld++;
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

  // W-bit value of pixel x, line y of the image behind descriptor d
  function automatic int memval(int d, int y, int x);
    int v = 0;
    for (int p = 0; p < W; p++) v |= int'(membit(d * W * H + p * H + y, x)) << p;
    return v;
  endfunction

  function automatic int px(int y, int x);
    if (x < 0 || x >= Q) return 0;
    return int'(img[y][x]);
  endfunction

  localparam int M0 = 0, M1 = 1;
  localparam int A = NMOR, B = NMOR + 1, C = NMOR + 2, T = NMOR + 3, S = NMOR + 4, U = NMOR + 5;
  localparam int BLEN = 1 + W * 10 + 2;

  // pixel at column offset dx of the newest line in a MOR register
  function automatic logic [24:0] pick(int dx);
    return 25'd1 << (4 * 5 + 2 + dx);
  endfunction

  // one addition block: image dd = image da (dya, dxa) + image db (dyb, dxb)
  task automatic add_block(int dd, int da, int dya, int dxa, int db, int dyb, int dxb);
    put(i_morph(C, 0, 0, '0, '0, LOP_NOTM));                 // c = 0
    for (int p = 0; p < W; p++) begin
      put(i_ld(M0, da, p, dya));
      put(i_morph(A, M0, 0, pick(dxa), pick(dxa)));
      put(i_ld(M1, db, p, dyb));
      put(i_morph(B, M1, 0, pick(dxb), pick(dxb)));
      put(i_morph(T, A, B, TPL_ID, TPL_ID, LOP_XOR));
      put(i_morph(S, T, C, TPL_ID, TPL_ID, LOP_XOR));
      put(i_st(S, dd, p, 0));
      put(i_morph(U, T, C, TPL_ID, TPL_ID, LOP_AND));
      put(i_morph(C, A, B, TPL_ID, TPL_ID, LOP_AND));
      put(i_morph(C, U, 0, TPL_ID, TPL_ID, LOP_M, ACC_OR));
    end
    put(i_imm(OP_LOOP, 0));
    put(i_base(OP_WRET));
  endtask

  // block list: destination and two operands per addition
  typedef struct { int dd, da, dya, dxa, db, dyb, dxb; } add_t;
  add_t adds [$];
  int res [3];   // descriptor of the box sum for R = 1, 2

  initial begin
    int nd, per_line, blk;
    for (int y = 0; y < H; y++) for (int x = 0; x < Q; x++) img[y][x] = 8'($urandom);
    // schedule of additions for R = 1 and R = 2; descriptor 0 is the source
    nd = 1;
    for (int r = 1; r <= 2; r++) begin
      int acc, hsum;
      adds.push_back('{nd, 0, 0, -r, 0, 0, -r + 1}); acc = nd; nd++;
      for (int dx = -r + 2; dx <= r; dx++) begin
        adds.push_back('{nd, acc, 0, 0, 0, 0, dx}); acc = nd; nd++;
      end
      hsum = acc;
      adds.push_back('{nd, hsum, -r, 0, hsum, -r + 1, 0}); acc = nd; nd++;
      for (int dy = -r + 2; dy <= r; dy++) begin
        adds.push_back('{nd, acc, 0, 0, hsum, dy, 0}); acc = nd; nd++;
      end
      res[r] = acc;
    end

    repeat (2) @(negedge clk); rst_n = 1;
    // --- phase 1: camera -> W bit-planes of the source image (upper planes 0)
    put(i_imm(OP_SETH, H));
    for (int d = 0; d < nd; d++) put(i_imm(OP_SETB, d * W * H, d));
    put(i_imm(OP_SETL, 0));
    blk = pc;
    put(i_base(OP_ISYNC));
    for (int p = 0; p < W; p++) begin
      put(i_ldi(A, p)); put(i_st(A, 0, p, 0));
    end
    put(i_imm(OP_LOOP, blk));
    // --- phase 2: each addition copied into the WCS and run over all lines
    blk = pc + 3 * adds.size() + 1;
    for (int k = 0; k < adds.size(); k++) begin
      put(i_wld(blk + k * BLEN, BLEN));
      put(i_imm(OP_SETL, 0));
      put(i_imm(OP_WRUN, 0));
    end
    put(i_base(OP_HALT));
    for (int k = 0; k < adds.size(); k++)
      add_block(adds[k].dd, adds[k].da, adds[k].dya, adds[k].dxa, adds[k].db, adds[k].dyb, adds[k].dxb);

    hwr(6, 1);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < Q; x++) begin
        @(negedge clk); cam_valid = 1; cam_pix = {8'($urandom), img[y][x]} & 16'h00ff;
      end
      @(negedge clk); cam_valid = 0;
      wait (!dut.ii_line_ready);
    end
    wait (done);
    for (int r = 1; r <= 2; r++)
      for (int y = r; y < H - r; y++)
        for (int x = 0; x < Q; x++) begin
          automatic int e = 0, g = 0;
          for (int dy = -r; dy <= r; dy++) for (int dx = -r; dx <= r; dx++) e += px(y + dy, x + dx);
          g = memval(res[r], y, x);
          checks++;
          if (g != e) begin
            failures++;
            if (failures < 10) $display("%0dx%0d sum, line %0d px %0d: got %0d exp %0d", 2*r+1, 2*r+1, y, x, g, e);
          end
        end
    checks++;
    if (n_wrun != adds.size() || n_wld != adds.size()) failures++;
    // one addition: c = 0, W x (2 LD + 2 picks + 2 XOR + ST + 3 carry), LOOP
    per_line = 1 + W * (3 * (MEMC + 1) + 7) + 1;
    $display("%0d additions, %0d clocks per line each (measured %0d for %0d lines)",
             adds.size(), per_line, t1 - t0, H);
    $display("3x3: %0d additions = %0d clocks/line; 5x5: %0d additions = %0d clocks/line",
             4, 4 * per_line, 8, 8 * per_line);
    checks++;
    if (t1 - t0 != H * per_line + 1) begin failures++; $display("expected %0d clocks", H * per_line + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
