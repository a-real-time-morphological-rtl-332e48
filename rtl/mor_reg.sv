// mor_reg -- morphological register (MOR) of one processing element.
//
// A MOR holds five one-bit cells, one per image line of a 5-line window,
// linked as a shift register from south to north. cell[0] is the northmost
// (oldest) line and cell[4] the southmost (newest); the centre pixel, the one
// the PE is working on, is cell[2]. Following the published architecture the
// cells form an S->N shift register; the rules for when it shifts are this
// design's own: a direct store ("Rd = ...") shifts every cell one place north
// and writes the new bit into cell[4], while an OR- or AND-accumulation
// updates cell[4] in place. The whole column is visible to the match
// operator; neighbouring PEs see it through the array.
//
// Timing: one write per clock, when wr_en is high. Synchronous active-low
// reset clears all cells.
module mor_reg
  import paprica_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,     // write this cycle
  input  acc_e       acc,       // store (shift) or accumulate into cell[4]
  input  logic       din,       // new bit
  output logic [4:0] cells      // cells[0] = N ... cells[4] = S
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (wr_en) begin
      unique case (acc)
        ACC_OR:  cells[4] <= cells[4] | din;
        ACC_AND: cells[4] <= cells[4] & din;
        default: cells    <= {din, cells[4:1]};
      endcase
    end
  end

endmodule
