// paprica3_top -- PAPRICA-3 real-time morphological image processor.
//
// A camera streams pixels into the imager interface; a linear array of Q
// one-bit PEs, one per image column, processes one full image line per
// instruction with morphological match operators on a 5x5 neighbourhood; the
// results go back through the imager interface to the display (and host)
// output, one pixel per incoming camera pixel. The array exchanges whole
// Q-bit lines with an image memory built of 32-bit modules; the controller
// sequences everything from a program the host has loaded into the program
// memory, copying inner loops into the writable control store in the array.
//
// The block structure follows the document's system diagram; camera,
// display and host are outside. The camera interface is the pixel input
// (cam_pix/cam_valid), which the host can replace by its own pixels; the
// output interface is disp_pix/disp_valid, which the display and the host
// both receive.
//
// Defaults: Q = 128 PEs, 16 bit-planes in the imager interface, 64K lines of
// image memory, 5 clocks per memory cycle (T_M = 50 ns at T_C = 10 ns).
module paprica3_top
  import paprica_pkg::*;
#(
  parameter int unsigned Q         = 128,
  parameter int unsigned P         = 16,
  parameter int unsigned AW        = 16,
  parameter int unsigned IM_CYCLES = 5,
  parameter int unsigned PM_DEPTH  = 4096,
  parameter int unsigned PM_CYCLES = 3,
  parameter int unsigned WCS_DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // camera
  input  logic [P-1:0] cam_pix,
  input  logic         cam_valid,
  // display / host video output
  output logic [P-1:0] disp_pix,
  output logic         disp_valid,
  // host bus
  input  logic         host_wr,
  input  logic [3:0]   host_addr,
  input  logic [31:0]  host_wdata,
  output logic [31:0]  host_rdata,
  output logic         busy,
  output logic         done
);

  localparam int unsigned PAW = $clog2(PM_DEPTH);
  localparam int unsigned WAW = $clog2(WCS_DEPTH);
  localparam int unsigned PW  = $clog2(P);

  // host interface <-> program memory, controller, pixel input
  logic           pm_we;
  logic [PAW-1:0] pm_waddr;
  instr_t         pm_wdata;
  logic           ct_start, src_host, host_pix_valid;
  logic [P-1:0]   host_pix;

  // controller <-> program memory
  logic           pm_req, pm_ack;
  logic [PAW-1:0] pm_raddr;
  instr_t         pm_rdata;

  // controller <-> processor array
  instr_t         pa_instr, wcs_wdata, wcs_rdata;
  logic           pa_valid, flag_set, flag_reset, wcs_we;
  logic [WAW-1:0] wcs_waddr, wcs_raddr;
  logic [Q-1:0]   pa_out, im_rdata, ii_rdata;

  // controller <-> image memory
  logic           im_req, im_we, im_ack;
  logic [AW-1:0]  im_addr;

  // controller <-> imager interface
  logic           ii_line_ready, ii_swap, ii_we;
  logic [PW-1:0]  ii_rd_plane, ii_wr_plane;

  host_interface #(.P(P), .PM_DEPTH(PM_DEPTH), .W(INSTR_W)) u_host (
    .clk(clk), .rst_n(rst_n),
    .host_wr(host_wr), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .ct_start(ct_start), .ct_busy(busy), .ct_done(done),
    .src_host(src_host), .host_pix(host_pix), .host_pix_valid(host_pix_valid)
  );

  program_memory #(.DEPTH(PM_DEPTH), .W(INSTR_W), .CYCLES(PM_CYCLES)) u_pm (
    .clk(clk), .rst_n(rst_n),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .req(pm_req), .raddr(pm_raddr), .rdata(pm_rdata), .ack(pm_ack)
  );

  controller #(.AW(AW), .PM_DEPTH(PM_DEPTH), .WCS_DEPTH(WCS_DEPTH), .P(P)) u_ct (
    .clk(clk), .rst_n(rst_n), .start(ct_start), .busy(busy), .done(done),
    .pm_req(pm_req), .pm_raddr(pm_raddr), .pm_rdata(pm_rdata), .pm_ack(pm_ack),
    .pa_instr(pa_instr), .pa_valid(pa_valid), .flag_set(flag_set), .flag_reset(flag_reset),
    .wcs_we(wcs_we), .wcs_waddr(wcs_waddr), .wcs_wdata(wcs_wdata),
    .wcs_raddr(wcs_raddr), .wcs_rdata(wcs_rdata),
    .im_req(im_req), .im_we(im_we), .im_addr(im_addr), .im_ack(im_ack),
    .ii_line_ready(ii_line_ready), .ii_swap(ii_swap), .ii_rd_plane(ii_rd_plane),
    .ii_we(ii_we), .ii_wr_plane(ii_wr_plane)
  );

  processor_array #(.Q(Q), .WCS_DEPTH(WCS_DEPTH)) u_pa (
    .clk(clk), .rst_n(rst_n), .instr(pa_instr), .valid(pa_valid),
    .mem_rdata(im_rdata), .ii_rdata(ii_rdata), .out_data(pa_out),
    .flag_set(flag_set), .flag_reset(flag_reset),
    .wcs_we(wcs_we), .wcs_waddr(wcs_waddr), .wcs_wdata(wcs_wdata),
    .wcs_raddr(wcs_raddr), .wcs_rdata(wcs_rdata)
  );

  image_memory #(.Q(Q), .AW(AW), .MW(32), .CYCLES(IM_CYCLES)) u_im (
    .clk(clk), .rst_n(rst_n), .req(im_req), .we(im_we), .addr(im_addr),
    .wdata(pa_out), .rdata(im_rdata), .ack(im_ack), .busy()
  );

  imager_interface #(.Q(Q), .P(P)) u_ii (
    .clk(clk), .rst_n(rst_n),
    .pix_in(src_host ? host_pix : cam_pix),
    .pix_in_valid(src_host ? host_pix_valid : cam_valid),
    .pix_out(disp_pix), .pix_out_valid(disp_valid),
    .line_ready(ii_line_ready), .swap(ii_swap),
    .rd_plane(ii_rd_plane), .rdata(ii_rdata),
    .we(ii_we), .wr_plane(ii_wr_plane), .wdata(pa_out)
  );

endmodule
