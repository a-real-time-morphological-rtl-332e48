// tb_mor_reg -- self-checking test of the morphological register: direct
// stores shift the five cells S->N, OR/AND accumulation modifies only the
// southmost cell. Random operations are checked against a software model.
module tb_mor_reg;
  import paprica_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, din = 0;
  acc_e acc = ACC_ST;
  logic [4:0] cells, model;
  int checks = 0, failures = 0;

  mor_reg dut (.clk, .rst_n, .wr_en, .acc, .din, .cells);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      wr_en = ($urandom % 4) != 0;
      din   = 1'($urandom);
      acc   = acc_e'($urandom % 3);
      @(posedge clk); #1;
      if (wr_en) begin
        case (acc)
          ACC_OR:  model[4] = model[4] | din;
          ACC_AND: model[4] = model[4] & din;
          default: model = {din, model[4:1]};
        endcase
      end
      checks++;
      if (cells !== model) begin
        failures++;
        $display("mismatch n=%0d cells=%b model=%b", n, cells, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
