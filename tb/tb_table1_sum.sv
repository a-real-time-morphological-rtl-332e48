// tb_table1_sum -- the "matrix summation" workload of the performance
// table (8-bit images), end to end on the default-size system (Q = 128).
//
// Phase 1 acquires H camera lines whose 16-bit pixels carry two 8-bit
// images A (planes 0-7) and B (planes 8-15) and stores them in the image
// memory as two images of 8 bit-planes (descriptors 0 and 1).
// Phase 2, run from the writable control store, adds them bit-serially,
// one bit-plane at a time, into a 9-plane image C (descriptor 2):
//   t = a ^ b;  s = t ^ c;  store s;  u = t & c;  c = a & b;  c |= u
// i.e. 5 array instructions and 3 memory transfers per bit (each transfer
// is an issue clock plus a 5-clock memory cycle). The result in
// the image memory is compared with A + B for every pixel, and the clock
// count of phase 2 is compared with that instruction count.
module tb_table1_sum;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, H = 4, MEMC = 5;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] cam_pix = 0, disp_pix;
  logic cam_valid = 0, disp_valid, host_wr = 0, busy, done;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  paprica3_top dut (.*);
  always #5 clk = ~clk;

  logic [P-1:0] img [H][Q];
  int cyc = 0, t_start = -1, t_end = -1, n_logic = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRUN) t_start = cyc;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_WRET) t_end = cyc;
    if (rst_n && dut.pa_valid && dut.pa_instr.op == OP_MORPH && dut.u_ct.in_wcs) n_logic++;
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

  // one bit of a line in the image memory
  function automatic logic membit(int addr, int x);
    case (x / 32)
      0: return dut.u_im.g_mod[0].u_mod.mem[addr][x % 32];
      1: return dut.u_im.g_mod[1].u_mod.mem[addr][x % 32];
      2: return dut.u_im.g_mod[2].u_mod.mem[addr][x % 32];
      default: return dut.u_im.g_mod[3].u_mod.mem[addr][x % 32];
    endcase
  endfunction

  localparam int A = NMOR, B = NMOR + 1, C = NMOR + 2, T = NMOR + 3, S = NMOR + 4, U = NMOR + 5;
  localparam int BLK = 64, BLEN = 1 + 8 * 8 + 1 + 2;

  initial begin
    int per_line;
    for (int y = 0; y < H; y++) for (int x = 0; x < Q; x++) img[y][x] = P'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    // --- phase 1, from the program memory: camera -> image memory
    put(i_imm(OP_SETH, H));
    put(i_imm(OP_SETB, 0, 0));
    put(i_imm(OP_SETB, 8 * H, 1));
    put(i_imm(OP_SETB, 16 * H, 2));
    put(i_imm(OP_SETL, 0));
    put(i_base(OP_ISYNC));                                   // pc 5: loop head
    for (int p = 0; p < 8; p++) begin
      put(i_ldi(A, p));      put(i_st(A, 0, p, 0));
      put(i_ldi(A, 8 + p));  put(i_st(A, 1, p, 0));
    end
    put(i_imm(OP_LOOP, 5));
    // --- phase 2, from the WCS: C = A + B
    put(i_wld(BLK, BLEN));
    put(i_imm(OP_SETL, 0));
    put(i_imm(OP_WRUN, 0));
    put(i_base(OP_HALT));
    pc = BLK;
    put(i_morph(C, 0, 0, '0, '0, LOP_NOTM));                 // c = 0
    for (int p = 0; p < 8; p++) begin
      put(i_ld(A, 0, p, 0));
      put(i_ld(B, 1, p, 0));
      put(i_morph(T, A, B, TPL_ID, TPL_ID, LOP_XOR));        // t = a ^ b
      put(i_morph(S, T, C, TPL_ID, TPL_ID, LOP_XOR));        // s = t ^ c
      put(i_st(S, 2, p, 0));
      put(i_morph(U, T, C, TPL_ID, TPL_ID, LOP_AND));        // u = t & c
      put(i_morph(C, A, B, TPL_ID, TPL_ID, LOP_AND));        // c = a & b
      put(i_morph(C, U, 0, TPL_ID, TPL_ID, LOP_M, ACC_OR));  // c |= u
    end
    put(i_st(C, 2, 8, 0));                                   // carry out = bit 8
    put(i_imm(OP_LOOP, 0));
    put(i_base(OP_WRET));

    hwr(6, 1);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < Q; x++) begin
        @(negedge clk); cam_valid = 1; cam_pix = img[y][x];
      end
      @(negedge clk); cam_valid = 0;
      wait (!dut.ii_line_ready);
    end
    wait (done);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < Q; x++) begin
        logic [8:0] got, exp;
        exp = 9'(img[y][x][7:0]) + 9'(img[y][x][15:8]);
        for (int p = 0; p < 9; p++) got[p] = membit(16 * H + p * H + y, x);
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10) $display("line %0d px %0d: %0d + %0d gave %0d", y, x, img[y][x][7:0], img[y][x][15:8], got);
        end
      end
    // phase 2 clocks: per line 1 + 8 x (2 LD + 5 logic + 1 ST) + ST + LOOP,
    // a memory transfer being its issue clock plus the MEMC-clock memory cycle
    per_line = 1 + 8 * (3 * (MEMC + 1) + 5) + (MEMC + 1) + 1;
    $display("summation: %0d clocks for %0d lines (%0d per line, %0d array logic instructions in all)",
             t_end - t_start, H, (t_end - t_start) / H, n_logic);
    $display("=> %0.2f ns/pixel at T_C = 10 ns, Q = %0d; without memory transfers %0d clocks/line",
             (t_end - t_start) * 10.0 / (H * Q), Q, 1 + 8 * 5);
    checks++;
    if (n_logic != H * (1 + 8 * 5)) begin failures++; $display("logic instruction count %0d", n_logic); end
    checks++;
    // from the WRUN clock to the WRET clock: WRUN itself plus H line passes
    if (t_end - t_start != H * per_line + 1) begin failures++; $display("expected %0d clocks", H * per_line + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
