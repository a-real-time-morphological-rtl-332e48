// imager_interface -- serial-to-parallel camera and monitor interface.
//
// Pixels arrive from the camera one per clock (pix_in_valid), P bits in
// parallel, one bit per bit-plane. The interface shifts them into a line
// register of P bit-planes x Q pixels; the first pixel of a line ends up at
// PE 0. While a line is shifting in, the processor array works on the
// previous one. When a full line is in (line_ready), the controller asks for
// a swap: in one clock the freshly acquired line becomes visible to the
// array, and the line the array has finished, with its results written on
// some bit-planes, goes to the shift side, from where it leaves one pixel per
// camera pixel towards the monitor (pix_out). This double buffer is how this
// design realises "load the following line while the current one is
// processed"; the shift-register behaviour, the bit-planes and the parallel
// exchange with the array follow the document, the 16-bit pixel width comes
// from the architecture drawing.
//
// Array side: rd_plane selects the bit-plane seen on rdata (combinational);
// we/wr_plane/wdata write one bit-plane of the array-side line on the clock.
// Writes in the swap cycle are applied before the exchange.
// Rule checked by an assertion: once a line is complete, the next camera
// pixel may come no earlier than the clock of the swap (the program must
// keep up with the camera; the blanking between lines gives it the time).
module imager_interface #(
  parameter int unsigned Q = 128,
  parameter int unsigned P = 16,
  localparam int unsigned PW = $clog2(P),
  localparam int unsigned CW = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // camera side
  input  logic [P-1:0]  pix_in,
  input  logic          pix_in_valid,
  // monitor side
  output logic [P-1:0]  pix_out,
  output logic          pix_out_valid,
  // controller
  output logic          line_ready,
  input  logic          swap,
  // processor array side
  input  logic [PW-1:0] rd_plane,
  output logic [Q-1:0]  rdata,
  input  logic          we,
  input  logic [PW-1:0] wr_plane,
  input  logic [Q-1:0]  wdata
);

  logic [Q-1:0]  sh   [P];   // camera/monitor shift side
  logic [Q-1:0]  hold [P];   // processor array side
  logic [CW-1:0] count;      // pixels shifted in since the last swap

  assign line_ready    = (count == CW'(Q));
  assign rdata         = hold[rd_plane];
  assign pix_out_valid = pix_in_valid;

  // Shift-side content seen in this cycle (after a swap, the finished line).
  logic [Q-1:0] sh_cur [P];
  always_comb begin
    for (int p = 0; p < P; p++) begin
      sh_cur[p] = sh[p];
      if (swap) sh_cur[p] = (we && wr_plane == PW'(p)) ? wdata : hold[p];
      pix_out[p] = sh_cur[p][0];
    end
  end

  // Camera overrun: a pixel would overwrite an unclaimed complete line.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(pix_in_valid && line_ready && !swap))
        else $error("imager_interface: camera pixel arrived before the line was taken");
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int p = 0; p < P; p++) begin
        sh[p]   <= '0;
        hold[p] <= '0;
      end
    end else begin
      for (int p = 0; p < P; p++) begin
        sh[p] <= pix_in_valid ? {pix_in[p], sh_cur[p][Q-1:1]} : sh_cur[p];
        if (swap)                           hold[p] <= sh[p];
        else if (we && wr_plane == PW'(p)) hold[p] <= wdata;
      end
      if (swap)                 count <= pix_in_valid ? CW'(1) : '0;
      else if (pix_in_valid && !line_ready) count <= count + 1'b1;
    end
  end

endmodule
