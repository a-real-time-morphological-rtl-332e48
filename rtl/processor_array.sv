// processor_array -- the PAPRICA-3 Processor Array (PA).
//
// A linear SIMD array of Q identical 1-bit PEs, one per image column, so one
// machine instruction processes a whole image line. Every PE receives the
// same instruction. The E/W links give each PE the Rs1 columns of the two
// PEs on each side (the 5x5 neighbourhood); outside the array they read 0.
// PE numbers grow towards the east. The array also holds the Flag Evaluation
// Network (fen), the Interprocessor Communication Network (icn) and the
// Writable Control Store (wcs), which the document places inside the PA.
//
// Data ports: mem_rdata is a line read from the image memory (OP_LD),
// ii_rdata a bit-plane of the imager interface (OP_LDI); out_data is the
// centre pixel of Rs1 in every PE, the data for OP_ST and OP_STI.
// Timing: instructions take effect on the clock edge where valid is high;
// FEN flags are registered on that edge; out_data is combinational from
// instr. The WCS ports are passed straight to the store.
module processor_array
  import paprica_pkg::*;
#(
  parameter int unsigned Q         = 128,
  parameter int unsigned WCS_DEPTH = 256,
  localparam int unsigned WAW      = $clog2(WCS_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  instr_t             instr,
  input  logic               valid,
  input  logic [Q-1:0]       mem_rdata,
  input  logic [Q-1:0]       ii_rdata,
  output logic [Q-1:0]       out_data,
  output logic               flag_set,
  output logic               flag_reset,
  input  logic               wcs_we,
  input  logic [WAW-1:0]     wcs_waddr,
  input  instr_t             wcs_wdata,
  input  logic [WAW-1:0]     wcs_raddr,
  output instr_t             wcs_rdata
);

  logic [4:0]   col [Q];
  logic [Q-1:0] aux, icn_out;

  function automatic logic [4:0] col_at(input int i);
    if (i < 0 || i >= int'(Q)) return 5'b0;
    return col[i];
  endfunction

  for (genvar i = 0; i < Q; i++) begin : g_pe
    pe u_pe (
      .clk(clk), .rst_n(rst_n), .instr(instr), .valid(valid),
      .col_w2(col_at(i-2)), .col_w1(col_at(i-1)),
      .col_e1(col_at(i+1)), .col_e2(col_at(i+2)),
      .mem_bit(mem_rdata[i]), .ii_bit(ii_rdata[i]), .icn_bit(icn_out[i]),
      .col_out(col[i]), .out_bit(out_data[i]), .aux_bit(aux[i])
    );
  end

  fen #(.Q(Q)) u_fen (
    .clk(clk), .rst_n(rst_n), .eval(valid && instr.op == OP_FEN),
    .val(out_data), .sel(aux), .flag_set(flag_set), .flag_reset(flag_reset)
  );

  icn #(.Q(Q)) u_icn (.data(out_data), .sw(aux), .dout(icn_out));

  wcs #(.DEPTH(WCS_DEPTH), .W(INSTR_W)) u_wcs (
    .clk(clk), .we(wcs_we), .waddr(wcs_waddr), .wdata(wcs_wdata),
    .raddr(wcs_raddr), .rdata(wcs_rdata)
  );

endmodule
