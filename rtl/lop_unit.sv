// lop_unit -- logical operator (LOP) of a processing element.
//
// Combines the match operator output m with a second operand b, the centre
// pixel of register Rs2, by one of eight boolean functions. The document
// fixes the count (eight) and gives NOT, AND and OR as examples; the full
// table and its encoding (lop_e in paprica_pkg) are this design's choice:
// m, ~m, m&b, m|b, m^b, m&~b, b&~m, b. The last but one removes a
// matched pattern from an image, e.g. a contour is a pixel minus its erosion. Purely combinational.
module lop_unit
  import paprica_pkg::*;
(
  input  lop_e lop,
  input  logic m,
  input  logic b,
  output logic y
);

  always_comb begin
    unique case (lop)
      LOP_M:    y = m;
      LOP_NOTM: y = ~m;
      LOP_AND:  y = m & b;
      LOP_OR:   y = m | b;
      LOP_XOR:  y = m ^ b;
      LOP_ANDN: y = m & ~b;
      LOP_BANDN:y = b & ~m;
      default:  y = b;
    endcase
  end

endmodule
