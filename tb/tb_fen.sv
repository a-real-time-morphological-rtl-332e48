// tb_fen -- self-checking test of the Flag Evaluation Network: random and
// corner-case value/selection patterns; SET must be 1 exactly when every
// selected PE holds 1, RESET exactly when every selected PE holds 0; the
// flags change only on eval.
module tb_fen;
  localparam int Q = 64;
  logic clk = 0, rst_n = 0, eval = 0;
  logic [Q-1:0] val, sel;
  logic flag_set, flag_reset, es, er;
  int checks = 0, failures = 0;

  fen #(.Q(Q)) dut (.clk, .rst_n, .eval, .val, .sel, .flag_set, .flag_reset);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [Q-1:0] v, logic [Q-1:0] s, logic e);
    val = v; sel = s; eval = e;
    if (e) begin
      es = 1'b1; er = 1'b1;
      for (int i = 0; i < Q; i++) if (s[i]) begin
        if (!v[i]) es = 1'b0;
        if (v[i])  er = 1'b0;
      end
    end
    @(posedge clk); #1;
    checks += 2;
    if (flag_set !== es || flag_reset !== er) begin
      failures++;
      $display("v=%h s=%h e=%b got %b%b exp %b%b", v, s, e, flag_set, flag_reset, es, er);
    end
  endtask

  initial begin
    val = '0; sel = '0; es = 0; er = 0;
    @(posedge clk); #1 rst_n = 1;
    apply('1, '1, 1);
    apply('0, '1, 1);
    apply('1, '0, 0);                  // no eval: flags hold
    apply({{(Q-1){1'b1}}, 1'b0}, '1, 1);  // one zero: neither flag
    apply({{(Q-1){1'b1}}, 1'b0}, {{(Q-1){1'b1}}, 1'b0}, 1); // zero not selected: SET
    apply({1'b1, {(Q-1){1'b0}}}, {1'b0, {(Q-1){1'b1}}}, 1); // one not selected: RESET
    apply('0, '0, 1);                  // nobody selected: both
    for (int n = 0; n < 300; n++) begin
      logic [Q-1:0] v, s;
      v = {$urandom, $urandom};
      s = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (n % 3 == 0) v = v | ~s;
      if (n % 3 == 1) v = v & s & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      apply(v, s, 1'($urandom % 4 != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
