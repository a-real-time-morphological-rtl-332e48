// tb_pe -- self-checking test of one processing element. Random
// morphological, load and communication instructions (random templates,
// logical operators, store/accumulate modes, %EN mask, neighbour columns)
// are applied; after each one, every register is read back through the
// Rs1 column output and compared with a software model of the PE.
module tb_pe;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  instr_t instr = '0;
  logic [4:0] col_w2 = 0, col_w1 = 0, col_e1 = 0, col_e2 = 0, col_out;
  logic mem_bit = 0, ii_bit = 0, icn_bit = 0, out_bit, aux_bit;
  logic [4:0] mor [NMOR];
  logic lor [NLOR];
  int checks = 0, failures = 0;
  int n_morph = 0, n_masked = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] mcol(int r);
    if (r < NMOR) return mor[r];
    return {2'b00, lor[r - NMOR], 2'b00};
  endfunction

  function automatic logic lop_f(lop_e l, logic m, logic b);
    case (l)
      LOP_M: return m;        LOP_NOTM: return !m;
      LOP_AND: return m && b; LOP_OR: return m || b;
      LOP_XOR: return m != b; LOP_ANDN: return m && !b;
      LOP_BANDN: return b && !m; default: return b;
    endcase
  endfunction

  task automatic model_step();
    logic [24:0] nb;
    logic [4:0] c;
    logic res, wr;
    c = mcol(instr.rs1);
    for (int r = 0; r < 5; r++) begin
      nb[r*5+0] = col_w2[r]; nb[r*5+1] = col_w1[r]; nb[r*5+2] = c[r];
      nb[r*5+3] = col_e1[r]; nb[r*5+4] = col_e2[r];
    end
    wr = 1'b1;
    case (instr.op)
      OP_MORPH: res = lop_f(instr.lop, sw_match(nb, instr.care, instr.value), mcol(instr.rs2)[2]);
      OP_LD: res = mem_bit;
      OP_LDI: res = ii_bit;
      OP_ICN: res = icn_bit;
      default: begin res = 0; wr = 0; end
    endcase
    if (instr.en && !lor[NLOR-1]) begin wr = 0; n_masked++; end
    if (!valid) wr = 0;
    if (wr) begin
      if (instr.rd < NMOR) begin
        case (instr.acc)
          ACC_OR:  mor[instr.rd][4] = mor[instr.rd][4] | res;
          ACC_AND: mor[instr.rd][4] = mor[instr.rd][4] & res;
          default: mor[instr.rd] = {res, mor[instr.rd][4:1]};
        endcase
      end else begin
        case (instr.acc)
          ACC_OR:  lor[instr.rd - NMOR] = lor[instr.rd - NMOR] | res;
          ACC_AND: lor[instr.rd - NMOR] = lor[instr.rd - NMOR] & res;
          default: lor[instr.rd - NMOR] = res;
        endcase
      end
    end
  endtask

  task automatic check_all();
    instr_t save;
    save = instr;
    for (int r = 0; r < NREG; r++) begin
      instr.rs1 = 4'(r); instr.rs2 = 4'((r + 3) % NREG); #1;
      checks += 3;
      if (col_out !== mcol(r)) begin failures++; $display("reg %0d col %b exp %b", r, col_out, mcol(r)); end
      if (out_bit !== mcol(r)[2]) begin failures++; $display("reg %0d out_bit", r); end
      if (aux_bit !== mcol((r + 3) % NREG)[2]) begin failures++; $display("reg %0d aux_bit", r); end
    end
    instr = save;
  endtask

  initial begin
    opcode_e ops [4] = '{OP_MORPH, OP_LD, OP_LDI, OP_ICN};
    for (int r = 0; r < NMOR; r++) mor[r] = '0;
    for (int r = 0; r < NLOR; r++) lor[r] = 1'b0;
    @(negedge clk); rst_n = 1;
    check_all();
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      instr = '0;
      instr.op  = (n % 3 == 0) ? ops[$urandom % 4] : OP_MORPH;
      if (n % 50 == 7) instr.op = OP_ST;     // does not write registers
      instr.rd  = 4'($urandom); instr.rs1 = 4'($urandom); instr.rs2 = 4'($urandom);
      instr.acc = acc_e'($urandom % 3);
      instr.lop = lop_e'($urandom % 8);
      instr.en  = ($urandom % 4 == 0);
      instr.care  = 25'($urandom) & 25'($urandom);
      instr.value = 25'($urandom);
      if (n % 5 == 0) begin instr.care = TPL_ID; instr.value = TPL_ID; end
      col_w2 = 5'($urandom); col_w1 = 5'($urandom); col_e1 = 5'($urandom); col_e2 = 5'($urandom);
      mem_bit = 1'($urandom); ii_bit = 1'($urandom); icn_bit = 1'($urandom);
      valid = ($urandom % 8 != 0);
      if (instr.op == OP_MORPH) n_morph++;
      #1 model_step();
      @(negedge clk); valid = 0;
      check_all();
    end
    checks++;
    if (n_masked == 0 || n_morph == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
