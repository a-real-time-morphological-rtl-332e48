// tb_table1_morph -- the single-instruction binary workloads of the
// performance table, run end to end on the default-size system (Q = 128):
// contouring of a B/W image and 5x5 pattern matching. Each is one array
// instruction per image line:
//   contour: L8 = centre & ~(4-neighbour erosion)   (LOP b & ~m)
//   match:   L9 = MOP(5x5 ternary template)
// The program streams NL camera lines through the imager interface; every
// output pixel is checked against a software model, and the number of
// array instructions and clocks per line is counted: one clock per
// operation per line, i.e. T_C / Q per pixel (0.078 ns/pixel at 10 ns and
// Q = 128; the 256-PE figure in the table is 10 ns / 256 = 0.04 ns/pixel).
module tb_table1_morph;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, NL = 10;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] cam_pix = 0, disp_pix;
  logic cam_valid = 0, disp_valid, host_wr = 0, busy, done;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  paprica3_top dut (.*);
  always #5 clk = ~clk;

  logic [P-1:0] img [NL][Q];
  logic [P-1:0] outexp [NL][Q];
  logic [P-1:0] got [$];
  logic [24:0] tcare, tval;
  int n_contour = 0, n_match = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && disp_valid) got.push_back(disp_pix);
    if (rst_n && dut.pa_valid && dut.pa_instr.op == OP_MORPH && dut.pa_instr.rd == 4'(NMOR)) n_contour++;
    if (rst_n && dut.pa_valid && dut.pa_instr.op == OP_MORPH && dut.pa_instr.rd == 4'(NMOR + 1)) n_match++;
  end

  task automatic hwr(int a, logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = 4'(a); host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic put(int addr, instr_t i);
    logic [127:0] w;
    w = 128'(i);
    hwr(0, addr);
    for (int k = 0; k < 4; k++) hwr(1 + k, w[k*32 +: 32]);
    hwr(5, 0);
  endtask

  function automatic logic p0(int y, int x);
    if (y < 0 || x < 0 || x >= Q) return 1'b0;
    return img[y][x][0];
  endfunction

  localparam logic [24:0] CROSS = (25'd1 << 7) | (25'd1 << 11) | (25'd1 << 12) | (25'd1 << 13) | (25'd1 << 17);

  initial begin
    for (int k = 0; k < 5; k++) tcare[$urandom % 25] = 1'b1;
    tcare = '0;
    for (int k = 0; k < 4; k++) tcare[$urandom % 25] = 1'b1;
    tval = 25'($urandom);
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < Q; x++) begin
        img[y][x] = P'($urandom);
        img[y][x][0] = ($urandom % 10) < 7;
      end
    // expected outputs; iteration y has lines y-4..y in MOR 0, centre y-2
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < Q; x++) begin
        logic c, e, m;
        logic [24:0] nb;
        c = p0(y - 2, x);
        e = c & p0(y - 3, x) & p0(y - 1, x) & p0(y - 2, x - 1) & p0(y - 2, x + 1);
        for (int r = 0; r < 5; r++) for (int cc = 0; cc < 5; cc++) nb[r*5+cc] = p0(y - 4 + r, x + cc - 2);
        m = sw_match(nb, tcare, tval);
        outexp[y][x] = {c & ~e, m, img[y][x][13:0]};
      end
    repeat (2) @(negedge clk); rst_n = 1;
    put(0, i_imm(OP_SETH, NL));
    put(1, i_wld(8, 7));
    put(2, i_imm(OP_SETL, 0));
    put(3, i_imm(OP_WRUN, 0));
    put(4, i_base(OP_HALT));
    put(8 + 0, i_base(OP_ISYNC));
    put(8 + 1, i_ldi(0, 0));
    put(8 + 2, i_morph(NMOR, 0, 0, CROSS, CROSS, LOP_BANDN));   // contour
    put(8 + 3, i_morph(NMOR + 1, 0, 0, tcare, tval));           // pattern match
    put(8 + 4, i_sti(NMOR, 15));
    put(8 + 5, i_sti(NMOR + 1, 14));
    put(8 + 6, i_imm(OP_LOOP, 0));
    put(8 + 7, i_base(OP_WRET));
    put(1, i_wld(8, 8));
    hwr(6, 1);
    for (int y = 0; y < NL; y++) begin
      for (int x = 0; x < Q; x++) begin
        @(negedge clk); cam_valid = 1; cam_pix = img[y][x];
      end
      @(negedge clk); cam_valid = 0;
      wait (!dut.ii_line_ready);
    end
    wait (done);
    checks++;
    if (got.size() != NL * Q) begin failures++; $display("got %0d pixels", got.size()); end
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < Q; x++) begin
        logic [P-1:0] e;
        e = (y < 2) ? '0 : outexp[y-2][x];
        checks++;
        if (y * Q + x >= got.size() || got[y*Q + x] !== e) begin
          failures++;
          if (failures < 10) $display("line %0d px %0d got %h exp %h size %0d", y, x, got[y*Q + x], e, got.size());
        end
      end
    $display("contour: %0d array instructions for %0d lines; pattern match: %0d", n_contour, NL, n_match);
    $display("=> 1 clock per line of %0d pixels each: %0.3f ns/pixel at T_C = 10 ns", Q, 10.0 / Q);
    checks++;
    if (n_contour != NL || n_match != NL) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
