// match_unit -- matching operator (MOP) of a processing element.
//
// Compares the 5x5 binary neighbourhood of a pixel with a ternary template
// ('1', '0' or don't care), the hit-or-miss style operator the instruction
// set is built on. The output is 1 when every position the template cares
// about holds the template's value; a template with no cared position
// matches everything. The template is coded as two 25-bit words, care and
// value, a coding chosen by this design.
//
// Bit order (see paprica_pkg): index = row*5 + col, row 0 = north,
// col 0 = west (PE i-2). Purely combinational.
module match_unit
  import paprica_pkg::*;
(
  input  logic [NB-1:0] nbhd,   // neighbourhood pixels
  input  logic [NB-1:0] care,   // 1 = position is checked
  input  logic [NB-1:0] value,  // required value at checked positions
  output logic          match
);

  assign match = ~|(care & (nbhd ^ value));

endmodule
