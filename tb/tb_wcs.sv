// tb_wcs -- self-checking test of the Writable Control Store: fills every
// word with a known pattern, reads them back in the same cycle the address
// is applied, overwrites a few and checks again.
module tb_wcs;
  import paprica_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [INSTR_W-1:0] wdata = 0, rdata;
  logic [INSTR_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  wcs #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTR_W-1:0] pat(int a, int s);
    return {INSTR_W'(a * 32'h9e3779b9 + s), 32'(a ^ s), 32'(a + 7 * s)};
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = pat(a, 1); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk);
      if (n % 4 == 0) begin we = 1; waddr = 8'(a); wdata = pat(a, n + 2); ref_mem[a] = wdata; end
      else we = 0;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 8'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("addr %0d mismatch", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
