// tb_processor_array -- self-checking test of the processor array (Q = 32).
// Loads five random image lines into a morphological register, applies
// random 5x5 templates and an erosion, and checks every PE's result against
// a software neighbourhood built from the loaded lines (zeros beyond the
// array edge). Also checks the imager load path, the FEN flags, ICN cluster
// broadcasts, %EN masking and the WCS ports.
module tb_processor_array;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  localparam int Q = 32;
  logic clk = 0, rst_n = 0, valid = 0;
  instr_t instr = '0;
  logic [Q-1:0] mem_rdata = 0, ii_rdata = 0, out_data;
  logic flag_set, flag_reset, wcs_we = 0;
  logic [7:0] wcs_waddr = 0, wcs_raddr = 0;
  instr_t wcs_wdata = '0, wcs_rdata;
  logic [Q-1:0] img [5];
  int checks = 0, failures = 0;

  processor_array #(.Q(Q), .WCS_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(instr_t i);
    @(negedge clk); instr = i; valid = 1;
    @(negedge clk); valid = 0;
  endtask

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // read centre of register r of every PE
  task automatic read_reg(int r, output logic [Q-1:0] v);
    instr = i_base(OP_NOP); instr.rs1 = 4'(r); #1 v = out_data;
  endtask

  function automatic logic pix(int row, int col);
    if (col < 0 || col >= Q) return 1'b0;
    return img[row][col];
  endfunction

  initial begin
    logic [Q-1:0] v, exp_v, d, s;
    logic [24:0] care, value, nb;
    @(negedge clk); rst_n = 1;
    // five lines into MOR 0 through the memory load path
    for (int r = 0; r < 5; r++) begin
      img[r] = Q'($urandom);
      mem_rdata = img[r];
      issue(i_ld(0, 0, 0, 0));
    end
    // MOR 0 now holds img[0] (north) .. img[4] (south); centre = img[2]
    read_reg(0, v); chk(v == img[2], "centre of MOR after five loads");
    for (int n = 0; n < 40; n++) begin
      care = 25'($urandom) & 25'($urandom);
      value = 25'($urandom);
      if (n == 0) begin care = 25'h00739c0; value = care; end  // 3x3 erosion
      issue(i_morph(NMOR + 1, 0, 0, care, value, LOP_M));
      read_reg(NMOR + 1, v);
      for (int i = 0; i < Q; i++) begin
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) nb[r*5+c] = pix(r, i + c - 2);
        exp_v[i] = sw_match(nb, care, value);
      end
      chk(v == exp_v, $sformatf("template %0d got %h exp %h", n, v, exp_v));
    end
    // imager load path and %EN: EN mask = pattern, write only where 1
    ii_rdata = Q'($urandom); issue(i_ldi(EN_REG, 0));
    read_reg(EN_REG, v); chk(v == ii_rdata, "LDI into EN register");
    d = ii_rdata;
    ii_rdata = '1; issue(i_ldi(NMOR + 2, 0));
    ii_rdata = '0;
    begin instr_t i; i = i_ldi(NMOR + 2, 0); i.en = 1; issue(i); end
    read_reg(NMOR + 2, v); chk(v == ~d, "masked load writes only where EN = 1");
    // FEN
    mem_rdata = '1; issue(i_ld(NMOR + 3, 0, 0, 0));       // all-ones selection
    for (int n = 0; n < 20; n++) begin
      ii_rdata = (n == 0) ? '1 : (n == 1) ? '0 : Q'($urandom);
      issue(i_ldi(NMOR + 4, 0));
      issue(i_fen(NMOR + 4, NMOR + 3));
      chk(flag_set == (ii_rdata == '1) && flag_reset == (ii_rdata == '0), $sformatf("FEN n=%0d", n));
    end
    // ICN: switches in LOR 5, data in LOR 4
    for (int n = 0; n < 20; n++) begin
      int cid [Q];
      logic cv [Q];
      s = Q'($urandom); d = '0; d[$urandom % Q] = 1'b1; if (n % 2) d = Q'($urandom) & Q'($urandom);
      ii_rdata = s; issue(i_ldi(NMOR + 5, 0));
      ii_rdata = d; issue(i_ldi(NMOR + 4, 0));
      issue(i_icn(NMOR + 6, NMOR + 4, NMOR + 5));
      read_reg(NMOR + 6, v);
      cid[0] = 0; for (int i = 1; i < Q; i++) cid[i] = s[i] ? cid[i-1] : cid[i-1] + 1;
      for (int i = 0; i < Q; i++) cv[i] = 0;
      for (int i = 0; i < Q; i++) if (d[i]) cv[cid[i]] = 1;
      for (int i = 0; i < Q; i++) exp_v[i] = cv[cid[i]];
      chk(v == exp_v, $sformatf("ICN n=%0d", n));
    end
    // WCS
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); wcs_we = 1; wcs_waddr = 8'(a); wcs_wdata = i_imm(OP_JMP, a * 3);
    end
    @(negedge clk); wcs_we = 0;
    for (int a = 0; a < 8; a++) begin
      wcs_raddr = 8'(a); #1 chk(wcs_rdata == i_imm(OP_JMP, a * 3), "WCS read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
