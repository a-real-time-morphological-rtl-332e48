// tb_controller -- self-checking test of the controller, with the program
// and image memories attached and the array side modelled in the testbench
// (a WCS array, flag inputs, an imager line-ready input). The program
// exercises initialisation, the logical-to-absolute address mapping, memory
// wait cycles, a taken conditional branch, copying a block into the WCS,
// a line loop executed from the WCS at one instruction per clock, waiting
// for the imager and halting.
module tb_controller;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int CYC = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic pm_req, pm_ack, pa_valid, flag_set = 1, flag_reset = 0, wcs_we;
  logic [11:0] pm_raddr;
  instr_t pm_rdata, pa_instr, wcs_wdata, wcs_rdata;
  logic [7:0] wcs_waddr, wcs_raddr;
  logic im_req, im_we, im_ack, ii_line_ready = 0, ii_swap, ii_we;
  logic [15:0] im_addr;
  logic [3:0] ii_rd_plane, ii_wr_plane;
  logic [127:0] im_rdata;
  logic hwe = 0;
  logic [11:0] hwaddr = 0;
  instr_t hwdata = '0;
  instr_t wcs_mem [256];
  int checks = 0, failures = 0, cyc = 0;

  controller #(.AW(16), .PM_DEPTH(4096), .WCS_DEPTH(256), .P(16)) dut (.*);
  program_memory #(.DEPTH(4096), .CYCLES(3)) u_pm (
    .clk, .rst_n, .we(hwe), .waddr(hwaddr), .wdata(hwdata),
    .req(pm_req), .raddr(pm_raddr), .rdata(pm_rdata), .ack(pm_ack));
  image_memory #(.Q(128), .AW(16), .CYCLES(CYC)) u_im (
    .clk, .rst_n, .req(im_req), .we(im_we), .addr(im_addr), .wdata('0),
    .rdata(im_rdata), .ack(im_ack), .busy());

  always_ff @(posedge clk) if (wcs_we) wcs_mem[wcs_waddr] <= wcs_wdata;
  assign wcs_rdata = wcs_mem[wcs_raddr];
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // event log, sampled on clock edges
  int ld_req_cyc = -1, ld_issue_cyc = -1, st_addr = -1, ld_addr = -1;
  int n_morph1 = 0, n_fen = 0, n_bad = 0, n_swap = 0, first_m1 = -1, last_m1 = -1, ready_cyc = -1, swap_cyc = -1;
  always @(posedge clk) if (rst_n) begin
    if (im_req && !im_we) begin ld_req_cyc = cyc; ld_addr = im_addr; end
    if (im_req && im_we) st_addr = im_addr;
    if (pa_valid) begin
      if (pa_instr.op == OP_LD) ld_issue_cyc = cyc;
      if (pa_instr.op == OP_MORPH && pa_instr.rd == 1) begin
        n_morph1++; if (first_m1 < 0) first_m1 = cyc; last_m1 = cyc;
      end
      if (pa_instr.op == OP_FEN) n_fen++;
      if (pa_instr.op == OP_MORPH && pa_instr.rd == 15) n_bad++;
    end
    if (ii_swap) begin n_swap++; swap_cyc = cyc; end
  end

  task automatic load(int a, instr_t i);
    @(negedge clk); hwe = 1; hwaddr = 12'(a); hwdata = i;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    load(0, i_imm(OP_SETH, 10));
    load(1, i_imm(OP_SETB, 1000, 1));
    load(2, i_imm(OP_SETL, 3));
    load(3, i_ld(0, 1, 2, -1));         // 1000 + 2*10 + 3 - 1 = 1022
    load(4, i_st(9, 1, 0, 0));          // 1003
    load(5, i_mov(2, 3));
    load(6, i_br(BR_SET, 9));
    load(7, i_mov(15, 3));
    load(8, i_base(OP_HALT));
    load(9, i_wld(20, 4));
    load(10, i_imm(OP_SETL, 0));
    load(11, i_imm(OP_WRUN, 0));
    load(12, i_base(OP_ISYNC));
    load(13, i_base(OP_HALT));
    load(20, i_mov(1, 3));
    load(21, i_fen(3, 4));
    load(22, i_imm(OP_LOOP, 0));
    load(23, i_base(OP_WRET));
    @(negedge clk); hwe = 0;
    start = 1; @(negedge clk); start = 0;
    // release the imager line some time after the controller waits for it
    wait (pa_instr.op == OP_ISYNC && !dut.in_wcs && dut.state == dut.S_EXEC);
    repeat (20) @(negedge clk);
    chk(n_swap == 0, "no swap before the line is ready");
    ii_line_ready = 1; ready_cyc = cyc;
    @(negedge clk); ii_line_ready = 0;
    wait (done);
    @(negedge clk);
    chk(ld_addr == 1022, $sformatf("LD address %0d", ld_addr));
    chk(st_addr == 1003, $sformatf("ST address %0d", st_addr));
    chk(ld_issue_cyc - ld_req_cyc == CYC, $sformatf("LD wait cycles %0d", ld_issue_cyc - ld_req_cyc));
    chk(n_bad == 0, "taken branch skipped the fall-through instruction");
    chk(n_morph1 == 10 && n_fen == 10, $sformatf("WCS loop ran %0d/%0d times", n_morph1, n_fen));
    chk(last_m1 - first_m1 == 9 * 3, $sformatf("WCS loop at one instruction per clock (%0d)", last_m1 - first_m1));
    chk(n_swap == 1, "one imager swap");
    chk(wcs_mem[2] == i_imm(OP_LOOP, 0), "block copied into WCS");
    chk(!busy, "idle after HALT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
