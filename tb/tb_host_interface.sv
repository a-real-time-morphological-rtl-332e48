// tb_host_interface -- self-checking test of the host interface register
// map: staging and committing instructions into the program memory port with
// auto-incrementing address, the start pulse, the pixel source switch, host
// pixel injection and the status register.
module tb_host_interface;
  import paprica_pkg::*;
  logic clk = 0, rst_n = 0, host_wr = 0;
  logic [3:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic pm_we, ct_start, ct_busy = 0, ct_done = 0, src_host, host_pix_valid;
  logic [11:0] pm_waddr;
  logic [INSTR_W-1:0] pm_wdata;
  logic [15:0] host_pix;
  int checks = 0, failures = 0;

  host_interface #(.P(16), .PM_DEPTH(4096)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = 4'(a); host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  initial begin
    logic [127:0] w;
    @(negedge clk); rst_n = 1;
    wr(0, 100);
    for (int n = 0; n < 10; n++) begin
      w = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 4; k++) wr(1 + k, w[k*32 +: 32]);
      @(negedge clk); host_wr = 1; host_addr = 5;
      @(negedge clk); host_wr = 0;
      chk(pm_we && pm_waddr == 12'(100 + n) && pm_wdata == w[INSTR_W-1:0], $sformatf("commit %0d", n));
      @(negedge clk);
      chk(!pm_we, "pm_we is one clock");
    end
    host_addr = 0; #1 chk(host_rdata == 110, "PM_ADDR read back");
    @(negedge clk); host_wr = 1; host_addr = 6; host_wdata = 32'h3;
    @(negedge clk); host_wr = 0;
    chk(ct_start && src_host, "start pulse and host source");
    @(negedge clk); chk(!ct_start && src_host, "start is a pulse");
    host_addr = 6; #1 chk(host_rdata == 32'h2, "CTRL read back");
    @(negedge clk); host_wr = 1; host_addr = 7; host_wdata = 32'hbeef;
    @(negedge clk); host_wr = 0;
    chk(host_pix_valid && host_pix == 16'hbeef, "pixel injection");
    @(negedge clk); chk(!host_pix_valid, "pixel valid is a pulse");
    ct_busy = 1; ct_done = 0; host_addr = 8; #1 chk(host_rdata == 32'h1, "status busy");
    ct_busy = 0; ct_done = 1; #1 chk(host_rdata == 32'h2, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
