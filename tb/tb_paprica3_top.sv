// tb_paprica3_top -- end-to-end test of the PAPRICA-3 system at its default
// size (Q = 128 PEs, 16 bit-planes, 64K-line image memory).
//
// The host loads a line-processing program through the host bus and starts
// it. Per image line the program, run from the writable control store:
//   waits for the camera line and swaps the imager buffers (ISYNC),
//   shifts bit-plane 0 into morphological register 0,
//   computes a 3x3 erosion of it (centred two lines back) into L8,
//   writes it to output plane 15,
//   stores it to the image memory and loads it back (memory wait cycles),
//   writes the XOR of the two to plane 14 (must be all zero),
//   evaluates the FEN flags of L8 and branches: plane 13 = all ones when the
//   eroded line is empty, zeros otherwise,
//   broadcasts L8 over ICN clusters whose switches are camera plane 1,
//   writes that to plane 12, and loops to the next line.
// The first lines come from the camera, the rest from the host's debug
// pixel path. Every output pixel is checked against a software model, and
// the test counts that each mechanism (PM fetch, WCS copy, memory waits,
// imager waits, both branch directions, ICN, host pixel path) occurred.
module tb_paprica3_top;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 128, P = 16, NL = 12, NCAM = 7;
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
  int cyc = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pm_fetch = 0, n_wcs_copy = 0, n_mem_wait = 0, n_isync_wait = 0;
  int n_br_taken = 0, n_br_fall = 0, n_icn = 0, n_host_pix = 0, n_wcs_exec = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && disp_valid) got.push_back(disp_pix);
    if (rst_n && dut.u_ct.state == dut.u_ct.S_FWAIT) n_pm_fetch++;
    if (rst_n && dut.wcs_we) n_wcs_copy++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_MEM) n_mem_wait++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.u_ct.in_wcs) n_wcs_exec++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_ISYNC && !dut.ii_line_ready) n_isync_wait++;
    if (rst_n && dut.u_ct.state == dut.u_ct.S_EXEC && dut.pa_instr.op == OP_BR) begin
      if (dut.u_ct.do_jump) n_br_taken++; else n_br_fall++;
    end
    if (rst_n && dut.pa_valid && dut.pa_instr.op == OP_ICN) n_icn++;
    if (rst_n && dut.u_host.host_pix_valid) n_host_pix++;
  end

  // ---------------- host bus ----------------
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

  // ---------------- reference model ----------------
  function automatic logic p0(int y, int x);
    if (y < 0 || x < 0 || x >= Q) return 1'b0;
    return img[y][x][0];
  endfunction

  task automatic build_expected();
    for (int y = 0; y < NL; y++) begin
      logic [Q-1:0] ero, sw, icn_v;
      logic any;
      for (int x = 0; x < Q; x++) begin
        ero[x] = 1'b1;
        for (int dy = 1; dy <= 3; dy++) for (int dx = -1; dx <= 1; dx++)
          if (!p0(y - dy, x + dx)) ero[x] = 1'b0;
        sw[x] = img[y][x][1];
      end
      any = |ero;
      begin
        int cid [Q];
        logic cv [Q];
        cid[0] = 0;
        for (int x = 1; x < Q; x++) cid[x] = sw[x] ? cid[x-1] : cid[x-1] + 1;
        for (int x = 0; x < Q; x++) cv[x] = 1'b0;
        for (int x = 0; x < Q; x++) if (ero[x]) cv[cid[x]] = 1'b1;
        for (int x = 0; x < Q; x++) icn_v[x] = cv[cid[x]];
      end
      for (int x = 0; x < Q; x++)
        outexp[y][x] = {ero[x], 1'b0, !any, icn_v[x], img[y][x][11:0]};
    end
  endtask

  // ---------------- pixel source ----------------
  task automatic send_line(int y);
    for (int x = 0; x < Q; x++) begin
      if (y < NCAM) begin
        @(negedge clk); cam_valid = 1; cam_pix = img[y][x];
        @(negedge clk); cam_valid = 0;
        if ($urandom % 4 == 0) @(negedge clk);
      end else begin
        hwr(7, 32'(img[y][x]));
      end
    end
  endtask

  localparam int L8 = NMOR, L9 = NMOR + 1, L10 = NMOR + 2, L11 = NMOR + 3,
                 L12 = NMOR + 4, L13 = NMOR + 5, L14 = NMOR + 6;
  localparam logic [24:0] ERODE = 25'h00739c0;   // rows 1..3, columns 1..3

  initial begin
    int t0;
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < Q; x++) begin
        img[y][x] = P'($urandom);
        img[y][x][0] = ($urandom % 10) != 0;
        if (y == 4) img[y][x][0] = 1'b0;    // an empty line: later erosions empty
      end
    build_expected();
    repeat (2) @(negedge clk); rst_n = 1;

    // main program (program memory)
    put(0, i_imm(OP_SETH, NL));
    put(1, i_imm(OP_SETB, 0, 0));
    put(2, i_morph(L11, 0, 0, '0, '0));          // L11 = 1 everywhere (empty template)
    put(3, i_wld(16, 18));
    put(4, i_imm(OP_SETL, 0));
    put(5, i_imm(OP_WRUN, 0));
    put(6, i_base(OP_HALT));
    // line block, copied into the WCS
    put(16 + 0,  i_base(OP_ISYNC));
    put(16 + 1,  i_ldi(0, 0));
    put(16 + 2,  i_morph(L8, 0, 0, ERODE, ERODE));
    put(16 + 3,  i_sti(L8, 15));
    put(16 + 4,  i_st(L8, 0, 0, 0));
    put(16 + 5,  i_ld(L9, 0, 0, 0));
    put(16 + 6,  i_morph(L10, L9, L8, TPL_ID, TPL_ID, LOP_XOR));
    put(16 + 7,  i_sti(L10, 14));
    put(16 + 8,  i_fen(L8, L11));
    put(16 + 9,  i_br(BR_NRESET, 12));
    put(16 + 10, i_sti(L11, 13));
    put(16 + 11, i_imm(OP_JMP, 13));
    put(16 + 12, i_sti(L13, 13));
    put(16 + 13, i_ldi(L12, 1));
    put(16 + 14, i_icn(L14, L8, L12));
    put(16 + 15, i_sti(L14, 12));
    put(16 + 16, i_imm(OP_LOOP, 0));
    put(16 + 17, i_base(OP_WRET));

    hwr(6, 32'h1);                                // start
    t0 = cyc;
    for (int y = 0; y < NL; y++) begin
      if (y == NCAM) hwr(6, 32'h2);               // switch to the host pixel path
      send_line(y);
      wait (!dut.ii_line_ready);                  // the controller took the line
    end
    wait (done);
    $display("program done after %0d cycles", cyc - t0);
    host_addr = 8; #1 chk(host_rdata[1] && !host_rdata[0], "status reads done");

    // output stream: while line y streams in, processed line y-2 leaves
    chk(got.size() == NL * Q, $sformatf("output pixel count %0d", got.size()));
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < Q; x++) begin
        logic [P-1:0] e;
        e = (y < 2) ? '0 : outexp[y-2][x];
        if (y * Q + x < got.size()) begin
          checks++;
          if (got[y*Q + x] !== e) begin
            failures++;
            if (failures < 10) $display("line %0d px %0d got %h exp %h", y, x, got[y*Q + x], e);
          end
        end
      end

    $display("mechanisms: pm_fetch=%0d wcs_copy=%0d wcs_exec=%0d mem_wait=%0d isync_wait=%0d br_taken=%0d br_fall=%0d icn=%0d host_pix=%0d",
             n_pm_fetch, n_wcs_copy, n_wcs_exec, n_mem_wait, n_isync_wait, n_br_taken, n_br_fall, n_icn, n_host_pix);
    chk(n_pm_fetch > 0, "program memory fetches");
    chk(n_wcs_copy == 18, "WCS block copy");
    chk(n_wcs_exec > 0, "execution from WCS");
    chk(n_mem_wait == NL * 2 * 5, $sformatf("memory wait cycles %0d = 2 x 5 per line", n_mem_wait));
    chk(n_isync_wait > 0, "controller waited for the imager");
    chk(n_br_taken > 0 && n_br_fall > 0, "FEN branch both ways");
    chk(n_icn == NL, "ICN broadcasts");
    chk(n_host_pix == (NL - NCAM) * Q, "host pixel path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
