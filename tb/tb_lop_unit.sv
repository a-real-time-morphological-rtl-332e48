// tb_lop_unit -- exhaustive check of the eight logical operators against a
// truth table written out independently.
module tb_lop_unit;
  import paprica_pkg::*;
  lop_e lop;
  logic m, b, y;
  int checks = 0, failures = 0;
  // Expected output per operator, indexed by {m,b}: 00,01,10,11.
  logic [3:0] tt [8] = '{4'b1100, 4'b0011, 4'b1000, 4'b1110,
                         4'b0110, 4'b0100, 4'b0010, 4'b1010};

  lop_unit dut (.lop, .m, .b, .y);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 8; l++)
      for (int v = 0; v < 4; v++) begin
        lop = lop_e'(l); m = v[1]; b = v[0];
        #1;
        checks++;
        if (y !== tt[l][v]) begin
          failures++;
          $display("lop %0d m=%b b=%b got %b", l, m, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
