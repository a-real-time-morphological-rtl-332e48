// host_interface -- Host Interface of PAPRICA-3.
//
// Connects the host (a DSP in the field version, a workstation in the
// development version) to the system through a small register-mapped
// 32-bit bus. The host loads programs into the program memory, starts the
// controller and polls its status; in the development version it can also
// feed image lines into the imager input in place of the camera (the
// debugging channel). The document gives these duties; the register map
// below is this design's own.
//
// Registers (host_addr, word address):
//   0 PM_ADDR  (r/w) program memory address of the next instruction
//   1..4 INSTR (w)   instruction staging words, bits [31:0] .. [127:96]
//   5 COMMIT   (w)   write the staged instruction at PM_ADDR, PM_ADDR++
//   6 CTRL     (r/w) bit 0: start pulse (write 1), bit 1: pixel source = host
//   7 PIX      (w)   send pixel host_wdata[P-1:0] into the imager input
//   8 STATUS   (r)   bit 0: busy, bit 1: done
// Timing: writes act on the clock edge where host_wr is high; the pulses
// (pm_we, ct_start, host_pix_valid) are registered, one clock long.
module host_interface #(
  parameter int unsigned P        = 16,
  parameter int unsigned PM_DEPTH = 4096,
  parameter int unsigned W        = paprica_pkg::INSTR_W,
  localparam int unsigned PAW     = $clog2(PM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host bus
  input  logic           host_wr,
  input  logic [3:0]     host_addr,
  input  logic [31:0]    host_wdata,
  output logic [31:0]    host_rdata,
  // program memory write port
  output logic           pm_we,
  output logic [PAW-1:0] pm_waddr,
  output logic [W-1:0]   pm_wdata,
  // controller
  output logic           ct_start,
  input  logic           ct_busy,
  input  logic           ct_done,
  // pixel input path
  output logic           src_host,
  output logic [P-1:0]   host_pix,
  output logic           host_pix_valid
);

  logic [PAW-1:0] pm_addr;
  logic [127:0]   stage;

  assign pm_wdata = stage[W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pm_addr        <= '0;
      stage          <= '0;
      pm_we          <= 1'b0;
      pm_waddr       <= '0;
      ct_start       <= 1'b0;
      src_host       <= 1'b0;
      host_pix       <= '0;
      host_pix_valid <= 1'b0;
    end else begin
      pm_we          <= 1'b0;
      ct_start       <= 1'b0;
      host_pix_valid <= 1'b0;
      if (host_wr) begin
        unique case (host_addr)
          4'd0: pm_addr <= PAW'(host_wdata);
          4'd1: stage[31:0]   <= host_wdata;
          4'd2: stage[63:32]  <= host_wdata;
          4'd3: stage[95:64]  <= host_wdata;
          4'd4: stage[127:96] <= host_wdata;
          4'd5: begin
            pm_we    <= 1'b1;
            pm_waddr <= pm_addr;
            pm_addr  <= pm_addr + 1'b1;
          end
          4'd6: begin
            ct_start <= host_wdata[0];
            src_host <= host_wdata[1];
          end
          4'd7: begin
            host_pix       <= host_wdata[P-1:0];
            host_pix_valid <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (host_addr)
      4'd0:    host_rdata = 32'(pm_addr);
      4'd6:    host_rdata = {30'b0, src_host, 1'b0};
      4'd8:    host_rdata = {30'b0, ct_done, ct_busy};
      default: host_rdata = '0;
    endcase
  end

endmodule
