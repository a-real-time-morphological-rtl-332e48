// program_memory -- Program Memory (PM) of PAPRICA-3.
//
// Holds the program that the host loads and the controller executes. The
// host writes one instruction per clock through its own port; the
// controller reads through a request/acknowledge port that takes CYCLES
// clocks per read, as the program memory is slower than the array (which is
// why blocks of instructions are copied into the Writable Control Store).
// Depth, the dual port and the read time are this design's own choices.
//
// Read handshake: req samples raddr on a clock edge; ack is high for one
// clock CYCLES-1 clocks later, with rdata valid and held until the next read.
module program_memory #(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned W      = paprica_pkg::INSTR_W,
  parameter int unsigned CYCLES = 3,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // controller read port
  input  logic          req,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic          ack
);

  localparam int unsigned CNW = $clog2(CYCLES + 1);

  logic [W-1:0]   mem [DEPTH];
  logic [CNW-1:0] cnt;
  logic           busy, start;

  assign busy  = (cnt != '0);
  assign start = req && !busy;
  assign ack   = (cnt == CNW'(1));

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (start) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     cnt <= '0;
    else if (start) cnt <= CNW'(CYCLES);
    else if (busy)  cnt <= cnt - 1'b1;
  end

endmodule
