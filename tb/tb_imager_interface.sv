// tb_imager_interface -- self-checking test of the imager interface.
// Streams NL random camera lines (with random gaps), swaps after each line
// (on alternate lines in the same clock as the next line's first pixel),
// reads every bit-plane of the acquired line on the array side, writes a
// result plane, and checks that the monitor output carries, pixel by pixel,
// the processed line two lines back (first line out = reset content).
module tb_imager_interface;
  localparam int Q = 16, P = 4, NL = 8;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] pix_in = 0, pix_out;
  logic pix_in_valid = 0, pix_out_valid, line_ready, swap = 0, we = 0;
  logic [1:0] rd_plane = 0, wr_plane = 0;
  logic [Q-1:0] rdata, wdata = 0;
  logic [P-1:0] line [NL+1][Q];
  logic [P-1:0] proc [NL+1][Q];
  int checks = 0, failures = 0, j;

  imager_interface #(.Q(Q), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0] exp_out(int k, int jj);   // k = incoming line
    if (k < 2) return '0;
    return proc[k-2][jj];
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // drive pixel j of line k this clock and check the outgoing pixel
  task automatic drive_pixel(int k);
    pix_in_valid = 1; pix_in = line[k][j];
    #1 chk(pix_out == exp_out(k, j) && pix_out_valid, $sformatf("out k=%0d j=%0d got %h exp %h", k, j, pix_out, exp_out(k, j)));
    j++;
  endtask

  initial begin
    for (int k = 0; k <= NL; k++) for (int x = 0; x < Q; x++) line[k][x] = P'($urandom);
    @(negedge clk); rst_n = 1;
    j = 0;
    for (int k = 0; k < NL; k++) begin
      while (j < Q) begin
        @(negedge clk); swap = 0; we = 0; pix_in_valid = 0;
        if ($urandom % 3 != 0) drive_pixel(k);
      end
      @(negedge clk); pix_in_valid = 0;
      chk(line_ready, "line_ready after Q pixels");
      // swap, alone or with the first pixel of the next line
      swap = 1; j = 0;
      if (k % 2 == 1) drive_pixel(k + 1);
      @(negedge clk); swap = 0; pix_in_valid = 0;
      chk(!line_ready, "line_ready cleared by swap");
      for (int p = 0; p < P; p++) begin
        rd_plane = 2'(p); #1;
        for (int x = 0; x < Q; x++) chk(rdata[x] == line[k][x][p], $sformatf("plane %0d pixel %0d of line %0d", p, x, k));
      end
      rd_plane = 0; #1;
      we = 1; wr_plane = 2'(P - 1); wdata = ~rdata;
      for (int x = 0; x < Q; x++) proc[k][x] = {~line[k][x][0], line[k][x][P-2:0]};
      @(negedge clk); we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
