// pe -- one 1-bit processing element (PE) of the PAPRICA-3 array.
//
// Each PE owns one image column. It holds NMOR morphological registers
// (mor_reg, five cells = five lines of its column) and NLOR one-bit logical
// registers. A morphological instruction
//     Rd {=,|=,&=} LOP( MOP(Rs1), Rs2 ) [%EN]
// builds the 5x5 neighbourhood of Rs1 from this PE's column and the columns
// of the two PEs on each side (east/west links), matches it against the
// instruction's template (match_unit), combines the result with the centre
// pixel of Rs2 (lop_unit) and stores or accumulates it into Rd. With %EN the
// write happens only where the mask register EN_REG holds 1. Loads from the
// image memory, the imager interface and the communication network (ICN) use
// the same store/accumulate/mask path with an external bit as the result.
//
// Follows the document: the register kinds, the 5x5 neighbourhood, the
// instruction form, the three store modes and the %EN mask. This design's
// choices: register counts, reading a MOR as a plain bit gives its centre
// cell, a LOR used as a MOP source shows 0 on the rows above and below,
// EN_REG as the mask.
//
// Interface: instr/valid are broadcast by the controller to all PEs. col_out
// is the Rs1 column offered to the neighbours; out_bit and aux_bit are the
// centre pixels of Rs1 and Rs2 (memory/imager store data, FEN and ICN inputs).
// Timing: registers update on the clock edge in which valid is high;
// col_out/out_bit/aux_bit depend combinationally on instr.
module pe
  import paprica_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  instr_t     instr,
  input  logic       valid,
  input  logic [4:0] col_w2,   // Rs1 column of PE i-2 (row 0 = north)
  input  logic [4:0] col_w1,   // Rs1 column of PE i-1
  input  logic [4:0] col_e1,   // Rs1 column of PE i+1
  input  logic [4:0] col_e2,   // Rs1 column of PE i+2
  input  logic       mem_bit,  // image memory data bit for OP_LD
  input  logic       ii_bit,   // imager interface bit for OP_LDI
  input  logic       icn_bit,  // cluster value for OP_ICN
  output logic [4:0] col_out,  // own Rs1 column
  output logic       out_bit,  // centre(Rs1)
  output logic       aux_bit   // centre(Rs2)
);

  logic [4:0]      mor_cells [NMOR];
  logic [NLOR-1:0] lor;

  // Column and centre of any register.
  function automatic logic [4:0] column(input logic [REG_W-1:0] r);
    if (r < REG_W'(NMOR)) return mor_cells[r[$clog2(NMOR)-1:0]];
    return {2'b00, lor[r[$clog2(NLOR)-1:0]], 2'b00};
  endfunction

  logic [4:0] col_c, col_2;
  always_comb begin
    col_c = column(instr.rs1);
    col_2 = column(instr.rs2);
  end
  assign col_out = col_c;
  assign out_bit = col_c[2];
  assign aux_bit = col_2[2];

  // Neighbourhood: index row*5 + col, col 0 = PE i-2.
  logic [NB-1:0] nbhd;
  always_comb begin
    for (int r = 0; r < 5; r++) begin
      nbhd[r*5 + 0] = col_w2[r];
      nbhd[r*5 + 1] = col_w1[r];
      nbhd[r*5 + 2] = col_c[r];
      nbhd[r*5 + 3] = col_e1[r];
      nbhd[r*5 + 4] = col_e2[r];
    end
  end

  logic m, lop_y;
  match_unit u_match (.nbhd(nbhd), .care(instr.care), .value(instr.value), .match(m));
  lop_unit   u_lop   (.lop(instr.lop), .m(m), .b(aux_bit), .y(lop_y));

  // Result selection and write enable.
  logic result, writes, en_ok, wr;
  always_comb begin
    unique case (instr.op)
      OP_MORPH: begin result = lop_y;   writes = 1'b1; end
      OP_LD:    begin result = mem_bit; writes = 1'b1; end
      OP_LDI:   begin result = ii_bit;  writes = 1'b1; end
      OP_ICN:   begin result = icn_bit; writes = 1'b1; end
      default:  begin result = 1'b0;    writes = 1'b0; end
    endcase
    en_ok = !instr.en || lor[EN_LOR];   // the logical register EN_REG
    wr    = valid && writes && en_ok;
  end

  for (genvar g = 0; g < NMOR; g++) begin : g_mor
    mor_reg u_mor (
      .clk(clk), .rst_n(rst_n),
      .wr_en(wr && instr.rd == REG_W'(g)),
      .acc(instr.acc), .din(result), .cells(mor_cells[g])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lor <= '0;
    end else begin
      for (int g = 0; g < NLOR; g++) begin
        if (wr && instr.rd == REG_W'(NMOR + g)) begin
          unique case (instr.acc)
            ACC_OR:  lor[g] <= lor[g] | result;
            ACC_AND: lor[g] <= lor[g] & result;
            default: lor[g] <= result;
          endcase
        end
      end
    end
  end

endmodule
