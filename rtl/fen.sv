// fen -- Flag Evaluation Network (FEN) of the processor array.
//
// A global network over all Q PEs that produces two flags from the centre
// pixels of a register: SET when every participating PE holds 1 and RESET
// when every participating PE holds 0. The controller uses them for
// conditional jumps. Each PE offers two bits, as the network is drawn with
// two registers per PE: the value, and a participation bit that closes the
// PE's switch onto the two flag lines; a PE whose participation bit is 0
// does not affect the flags. Taking the second register as a participation
// switch is this design's reading; the two flags and their meaning follow
// the document.
//
// Timing: the flags are registered on the clock edge where eval is high and
// hold their value until the next evaluation. Reset clears both.
module fen #(
  parameter int unsigned Q = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         eval,
  input  logic [Q-1:0] val,     // centre pixel of each PE
  input  logic [Q-1:0] sel,     // 1 = PE takes part
  output logic         flag_set,
  output logic         flag_reset
);

  logic all_one, all_zero;
  assign all_one  = &(~sel | val);
  assign all_zero = &(~sel | ~val);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flag_set   <= 1'b0;
      flag_reset <= 1'b0;
    end else if (eval) begin
      flag_set   <= all_one;
      flag_reset <= all_zero;
    end
  end

endmodule
