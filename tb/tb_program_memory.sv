// tb_program_memory -- self-checking test of the program memory: host-side
// writes, controller-side reads with request/acknowledge; each read must be
// acknowledged CYCLES clocks after the request with the stored word.
module tb_program_memory;
  import paprica_pkg::*;
  localparam int DEPTH = 64, CYC = 3;
  logic clk = 0, rst_n = 0, we = 0, req = 0, ack;
  logic [5:0] waddr = 0, raddr = 0;
  logic [INSTR_W-1:0] wdata = 0, rdata;
  logic [INSTR_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  program_memory #(.DEPTH(DEPTH), .CYCLES(CYC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a);
      wdata = {INSTR_W'($urandom), 32'($urandom), 32'($urandom)};
      ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 100; n++) begin
      int a, c;
      a = $urandom % DEPTH;
      @(negedge clk); req = 1; raddr = 6'(a);
      @(negedge clk); req = 0; raddr = 6'(a + 1);
      c = 1;
      while (!ack) begin @(negedge clk); c++; end
      checks += 2;
      if (c != CYC) begin failures++; $display("latency %0d", c); end
      if (rdata !== ref_mem[a]) begin failures++; $display("data mismatch at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
