// wcs -- Writable Control Store inside the processor array.
//
// Holds one block of instructions so that the inner loop of a program, which
// is applied to every line of an image, is fetched at array speed instead of
// from the slower program memory. The controller fills it from the program
// memory and then executes from it. Size and ports are this design's own:
// DEPTH words of W bits, one synchronous write port and one asynchronous
// (same-cycle) read port, so that one instruction can be issued per clock.
module wcs #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = paprica_pkg::INSTR_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
