// tb_icn -- self-checking test of the Interprocessor Communication Network:
// random switch settings split the array into clusters; every PE must see
// the OR of the values its cluster's members put on the line, computed here
// by explicit cluster bookkeeping. Includes single-PE broadcasts.
module tb_icn;
  localparam int Q = 48;
  logic [Q-1:0] data, sw, dout;
  int checks = 0, failures = 0;

  icn #(.Q(Q)) dut (.data, .sw, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int cid [Q];
    logic cval [Q];
    #1;
    // cluster id of each PE, then OR per cluster
    cid[0] = 0;
    for (int i = 1; i < Q; i++) cid[i] = sw[i] ? cid[i-1] : cid[i-1] + 1;
    for (int i = 0; i < Q; i++) cval[i] = 1'b0;
    for (int i = 0; i < Q; i++) if (data[i]) cval[cid[i]] = 1'b1;
    for (int i = 0; i < Q; i++) begin
      checks++;
      if (dout[i] !== cval[cid[i]]) begin
        failures++;
        $display("PE %0d got %b exp %b (data=%h sw=%h)", i, dout[i], cval[cid[i]], data, sw);
      end
    end
  endtask

  initial begin
    // whole array one cluster, one PE broadcasts
    sw = '1; data = '0; data[17] = 1'b1; check();
    // all switches open: every PE alone
    sw = '0; data = 48'h5a5a_0f0f_3c3c; check();
    for (int n = 0; n < 200; n++) begin
      sw = {$urandom, $urandom};
      data = '0;
      if (n % 2 == 0) data[$urandom % Q] = 1'b1;
      else data = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
