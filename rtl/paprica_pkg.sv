// paprica_pkg -- shared types and constants of the PAPRICA-3 morphological
// image processor.
//
// The processor is a linear SIMD array of 1-bit processing elements (PEs),
// one per image column, that executes morphological "match" instructions on a
// 5x5 neighbourhood. This package holds the instruction word that the
// controller sends to the array, the register numbering of a PE and the
// encodings of the logical operator (LOP) and of the store/accumulate mode.
//
// What follows the published architecture: the three store modes (=, |=, &=),
// eight logical operators, the optional write-enable mask (%EN), a 5x5
// ternary template per morphological instruction, morphological (MOR) and
// logical (LOR) registers. What is this design's own choice: the binary
// layout of the instruction word, the opcode list, the number of registers
// (8 MOR + 8 LOR), the register used as the %EN mask, the LOP table order and
// the template bit order.
package paprica_pkg;

  // Register file of a PE: registers 0..NMOR-1 are morphological (5 cells,
  // S->N shift), NMOR..NMOR+NLOR-1 are logical (1 cell).
  localparam int unsigned NMOR   = 8;
  localparam int unsigned NLOR   = 8;
  localparam int unsigned NREG   = NMOR + NLOR;
  localparam int unsigned REG_W  = 4;
  // Logical register used as the write-enable mask by instructions with %EN.
  localparam int unsigned EN_LOR = NLOR - 1;
  localparam logic [REG_W-1:0] EN_REG = REG_W'(NMOR + EN_LOR);

  // 5x5 neighbourhood: bit index = row*5 + col. Row 0 is the northmost
  // (oldest) line, row 4 the southmost (newest). Column 0 is PE i-2 (west),
  // column 4 is PE i+2 (east). The centre pixel is bit 12.
  localparam int unsigned NB     = 25;
  localparam int unsigned CENTER = 12;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_MORPH = 5'd1,   // Rd (acc)= LOP(MOP(Rs1), Rs2) [%EN]
    OP_LD    = 5'd2,   // Rd (acc)= image memory line [%EN]
    OP_ST    = 5'd3,   // image memory line = centre(Rs1)
    OP_LDI   = 5'd4,   // Rd (acc)= imager interface bit-plane [%EN]
    OP_STI   = 5'd5,   // imager interface bit-plane = centre(Rs1)
    OP_FEN   = 5'd6,   // SET/RESET flags from centre(Rs1), PEs selected by centre(Rs2)
    OP_ICN   = 5'd7,   // Rd (acc)= cluster broadcast of centre(Rs1), switches = centre(Rs2)
    OP_SETB  = 5'd8,   // image descriptor rd: base line address = imm
    OP_SETH  = 5'd9,   // lines per bit-plane H = imm
    OP_SETL  = 5'd10,  // current line = imm
    OP_LOOP  = 5'd11,  // line++; if line < H jump imm
    OP_JMP   = 5'd12,  // jump imm
    OP_BR    = 5'd13,  // conditional jump imm, condition in rd (see br_cond_e)
    OP_WLD   = 5'd14,  // copy imm[23:12] words from program memory imm[11:0] into WCS from 0
    OP_WRUN  = 5'd15,  // execute from WCS address imm until WRET
    OP_WRET  = 5'd16,  // return from WCS to the program memory
    OP_ISYNC = 5'd17,  // wait for a full camera line, then swap imager buffers
    OP_HALT  = 5'd18
  } opcode_e;

  typedef enum logic [1:0] {
    ACC_ST  = 2'd0,    // Rd  = result
    ACC_OR  = 2'd1,    // Rd |= result
    ACC_AND = 2'd2     // Rd &= result
  } acc_e;

  // m = match operator output, b = centre pixel of Rs2.
  typedef enum logic [2:0] {
    LOP_M    = 3'd0,   // m
    LOP_NOTM = 3'd1,   // ~m
    LOP_AND  = 3'd2,   // m & b
    LOP_OR   = 3'd3,   // m | b
    LOP_XOR  = 3'd4,   // m ^ b
    LOP_ANDN = 3'd5,   // m & ~b
    LOP_BANDN= 3'd6,   // b & ~m
    LOP_B    = 3'd7    // b
  } lop_e;

  typedef enum logic [3:0] {
    BR_SET    = 4'd0,
    BR_RESET  = 4'd1,
    BR_NSET   = 4'd2,
    BR_NRESET = 4'd3
  } br_cond_e;

  typedef struct packed {
    opcode_e          op;
    acc_e             acc;
    logic             en;      // %EN: write conditioned by register EN_REG
    lop_e             lop;
    logic [REG_W-1:0] rd;
    logic [REG_W-1:0] rs1;
    logic [REG_W-1:0] rs2;
    logic [NB-1:0]    care;    // template: 1 = position must match
    logic [NB-1:0]    value;   // template: required pixel value where care = 1
    logic [23:0]      imm;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Template of "no MOP": only the centre is checked, against 1, so the match
  // output equals the centre pixel of Rs1.
  localparam logic [NB-1:0] TPL_ID = NB'(1) << CENTER;

endpackage
