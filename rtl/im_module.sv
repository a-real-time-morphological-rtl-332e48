// im_module -- one 32-bit image memory module.
//
// The image memory is built from several identical memory modules of 32 bits
// each that share one address bus; this is one of them, modelled as a plain
// synchronous RAM: a write stores wdata at addr, a read registers mem[addr]
// into rdata on the same clock edge, where it stays until the next read.
module im_module #(
  parameter int unsigned AW = 16,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
