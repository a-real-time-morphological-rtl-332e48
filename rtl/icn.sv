// icn -- Interprocessor Communication Network (ICN) of the processor array.
//
// A line running along the whole array is cut into segments by one switch
// per PE; each PE drives its own switch, so the program groups the PEs into
// clusters at run time. Within a cluster every PE receives, in the same
// instruction, the value put on the line by the cluster's members: one PE
// holding 1 broadcasts it to all the others. Several PEs driving 1 combine
// as an OR; that combining rule is this design's choice.
//
// Switch convention (this design's choice): sw[i] = 1 joins PE i to PE i-1,
// sw[0] is unused. Purely combinational: the result is written into the
// destination register in the same cycle as the instruction.
module icn #(
  parameter int unsigned Q = 128
) (
  input  logic [Q-1:0] data,   // value each PE puts on the line
  input  logic [Q-1:0] sw,     // switch of each PE
  output logic [Q-1:0] dout    // value each PE sees
);

  logic [Q-1:0] fwd, bwd;
  always_comb begin
    logic run;
    // West to east: what reaches PE i from itself and the PEs west of it.
    run = 1'b0;
    for (int i = 0; i < Q; i++) begin
      run    = data[i] | (sw[i] & run);
      fwd[i] = run;
    end
    // East to west: what reaches PE i from itself and the PEs east of it.
    run = 1'b0;
    for (int i = Q - 1; i >= 0; i--) begin
      bwd[i] = data[i] | run;
      run    = sw[i] & bwd[i];
    end
    dout = fwd | bwd;
  end

endmodule
