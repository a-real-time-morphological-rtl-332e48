// tb_image_memory -- self-checking test of the Q-bit image memory: random
// line writes and reads against a reference array, each access must take
// exactly CYCLES clocks from request to acknowledge, requests while busy are
// ignored, and all 32-bit modules must hold their part of the line.
module tb_image_memory;
  localparam int Q = 128, AW = 8, CYC = 5;
  logic clk = 0, rst_n = 0, req = 0, we = 0, ack, busy;
  logic [AW-1:0] addr = 0;
  logic [Q-1:0] wdata = 0, rdata;
  logic [Q-1:0] ref_mem [2**AW];
  logic [2**AW-1:0] written = '0;
  int checks = 0, failures = 0;

  image_memory #(.Q(Q), .AW(AW), .MW(32), .CYCLES(CYC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One access; returns the number of clocks until the controller may go on.
  task automatic access(logic w, logic [AW-1:0] a, logic [Q-1:0] d);
    int n;
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 1; addr = ~a; wdata = ~d;   // ignored: busy
    req = 0;
    n = 1;
    while (!ack) begin @(negedge clk); n++; end
    // ack seen in cycle n after the request edge; access ends at next edge
    checks++;
    if (n != CYC) begin failures++; $display("latency %0d, expected %0d", n, CYC); end
    if (w) begin ref_mem[a] = d; written[a] = 1'b1; end
    else begin
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("read %h got %h exp %h", a, rdata, ref_mem[a]); end
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 16; a++) access(1, AW'(a), {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 300; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom % 16);
      if ($urandom % 2) access(1, a, {$urandom, $urandom, $urandom, $urandom});
      else access(0, a, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
