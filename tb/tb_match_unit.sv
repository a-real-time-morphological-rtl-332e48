// tb_match_unit -- self-checking test of the 5x5 ternary template match:
// random neighbourhoods against random templates, and templates built to
// match or to miss by one pixel, compared with a per-position software loop.
module tb_match_unit;
  import paprica_pkg::*;
  import paprica_asm_pkg::*;
  logic [24:0] nbhd, care, value;
  logic match;
  int checks = 0, failures = 0;

  match_unit dut (.nbhd, .care, .value, .match);

  task automatic check(logic exp);
    #1;
    checks++;
    if (match !== exp) begin
      failures++;
      $display("mismatch nb=%h care=%h val=%h got %b exp %b", nbhd, care, value, match, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    for (int n = 0; n < 300; n++) begin
      nbhd = 25'($urandom); care = 25'($urandom) & 25'($urandom) & 25'($urandom); value = 25'($urandom);
      check(sw_match(nbhd, care, value));
      // exact hit
      value = nbhd ^ (25'($urandom) & ~care);
      check(1'b1);
      // miss by one cared pixel
      k = $urandom % 25;
      care[k] = 1'b1;
      value[k] = ~nbhd[k];
      check(1'b0);
    end
    care = '0; check(1'b1);     // all don't care
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
