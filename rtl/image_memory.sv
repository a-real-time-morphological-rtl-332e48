// image_memory -- Q-bit wide Image Memory (IM) of PAPRICA-3.
//
// Every address holds one image line of Q pixels, 1 bit per pixel (an
// "absolute line address"); bit-planes and grey or colour images are
// formed by the controller out of groups of such lines. Following the
// document, the memory is made of Q/MW modules of MW = 32 bits that share
// one address bus, so a single access moves a whole line. Memory chips are
// slower than the array: one access occupies CYCLES clocks (memory cycle
// time over array clock period, 50 ns / 10 ns = 5 in the main
// configuration), which the controller sees as wait cycles.
//
// Handshake (this design's own): req starts a read (we = 0) or write
// (we = 1) with addr/wdata sampled on that clock edge; ack is high for one
// clock, CYCLES-1 clocks after that edge, and the access is finished at the
// next edge. Read data is valid from the clock after req and held until the
// next read. req while busy is ignored. Depth is 2**AW lines.
module image_memory #(
  parameter int unsigned Q      = 128,
  parameter int unsigned AW     = 16,
  parameter int unsigned MW     = 32,
  parameter int unsigned CYCLES = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [Q-1:0]  wdata,
  output logic [Q-1:0]  rdata,
  output logic          ack,
  output logic          busy
);

  localparam int unsigned NMOD = Q / MW;
  localparam int unsigned CNW  = $clog2(CYCLES + 1);

  logic [CNW-1:0] cnt;
  logic           start;

  assign busy  = (cnt != '0);
  assign start = req && !busy;
  assign ack   = (cnt == CNW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n)     cnt <= '0;
    else if (start) cnt <= CNW'(CYCLES);
    else if (busy)  cnt <= cnt - 1'b1;
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    im_module #(.AW(AW), .W(MW)) u_mod (
      .clk(clk), .en(start), .we(we), .addr(addr),
      .wdata(wdata[m*MW +: MW]), .rdata(rdata[m*MW +: MW])
    );
  end

endmodule
