// controller -- Control Unit (CT) of PAPRICA-3.
//
// The CT sequences the whole system. It fetches instructions from the
// program memory (slow, request/acknowledge) or from the Writable Control
// Store inside the array (one instruction per clock), executes the
// flow-control, initialisation and memory-transfer instructions itself and
// broadcasts the PE instructions to the processor array. The document gives
// the CT's duties: all transfers to and from the image memory, with wait
// cycles because the memory is slower than the array; the mapping of logical
// structures (images, bit-planes, lines) onto absolute line addresses;
// program flow control, using the FEN flags; loading instruction blocks
// into the WCS; and synchronisation with the imager. How it does them, and
// the instruction encoding (paprica_pkg), are this design's own.
//
// Address mapping: an image descriptor d holds the absolute address of the
// image's first line; an image is a stack of bit-planes of H lines each, so
//     address = base[d] + plane*H + line + offset
// where line is the current-line register (stepped by OP_LOOP) and offset a
// signed 8-bit displacement. OP_LOOP steps line and jumps back while
// line < H, which applies a block once to every line of an image.
//
// Timing: in the WCS a PE, flag or imager instruction takes one clock, a
// memory transfer its issue clock plus the CYCLES clocks of the image memory
// (wait cycles), OP_ISYNC waits for a full camera line. From the program
// memory each instruction also pays the fetch time. OP_WLD copies one word
// per program-memory read; the WCS write data is the program memory's read
// data passed straight through. start (a pulse while idle) begins at program
// address 0; done rises at OP_HALT and stays high until the next start.
module controller
  import paprica_pkg::*;
#(
  parameter int unsigned AW        = 16,     // image memory line address
  parameter int unsigned PM_DEPTH  = 4096,
  parameter int unsigned WCS_DEPTH = 256,
  parameter int unsigned P         = 16,     // imager bit-planes
  localparam int unsigned PAW      = $clog2(PM_DEPTH),
  localparam int unsigned WAW      = $clog2(WCS_DEPTH),
  localparam int unsigned PW       = $clog2(P)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // program memory
  output logic           pm_req,
  output logic [PAW-1:0] pm_raddr,
  input  instr_t         pm_rdata,
  input  logic           pm_ack,
  // processor array
  output instr_t         pa_instr,
  output logic           pa_valid,
  input  logic           flag_set,
  input  logic           flag_reset,
  output logic           wcs_we,
  output logic [WAW-1:0] wcs_waddr,
  output instr_t         wcs_wdata,
  output logic [WAW-1:0] wcs_raddr,
  input  instr_t         wcs_rdata,
  // image memory
  output logic           im_req,
  output logic           im_we,
  output logic [AW-1:0]  im_addr,
  input  logic           im_ack,
  // imager interface
  input  logic           ii_line_ready,
  output logic           ii_swap,
  output logic [PW-1:0]  ii_rd_plane,
  output logic           ii_we,
  output logic [PW-1:0]  ii_wr_plane
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_FWAIT, S_EXEC, S_MEM, S_COPY, S_CWAIT
  } state_e;

  state_e         state;
  instr_t         ir;            // instruction fetched from program memory
  logic           in_wcs;        // executing from the WCS
  logic [PAW-1:0] pc, ret_pc;
  logic [WAW-1:0] wpc;
  logic [AW-1:0]  base [16];
  logic [AW-1:0]  h_lines, line;
  logic [11:0]    copy_idx;

  instr_t cur;
  assign cur       = in_wcs ? wcs_rdata : ir;
  assign wcs_raddr = wpc;
  assign pa_instr  = cur;
  assign busy      = (state != S_IDLE);

  // Logical to absolute address.
  logic [AW-1:0] plane_off;
  always_comb begin
    plane_off = AW'(cur.imm[15:8]) * h_lines;
    im_addr   = base[cur.imm[23:20]] + plane_off + line + AW'(signed'(cur.imm[7:0]));
  end

  logic exec, mem_op, pe_op, cond, last_copy;
  always_comb begin
    exec   = (state == S_EXEC);
    mem_op = (cur.op == OP_LD) || (cur.op == OP_ST);
    pe_op  = (cur.op == OP_MORPH) || (cur.op == OP_LDI) ||
             (cur.op == OP_ICN)   || (cur.op == OP_FEN);
    unique case (br_cond_e'(cur.rd))
      BR_SET:    cond = flag_set;
      BR_RESET:  cond = flag_reset;
      BR_NSET:   cond = !flag_set;
      default:   cond = !flag_reset;
    endcase
    pa_valid    = (exec && pe_op) || (state == S_MEM && im_ack && cur.op == OP_LD);
    im_req      = exec && mem_op;
    im_we       = (cur.op == OP_ST);
    ii_rd_plane = cur.imm[PW-1:0];
    ii_wr_plane = cur.imm[PW-1:0];
    ii_we       = exec && cur.op == OP_STI;
    ii_swap     = exec && cur.op == OP_ISYNC && ii_line_ready;
    pm_req      = (state == S_FETCH) || (state == S_COPY);
    pm_raddr    = (state == S_COPY) ? cur.imm[PAW-1:0] + PAW'(copy_idx) : pc;
    wcs_we      = (state == S_CWAIT) && pm_ack;
    wcs_waddr   = WAW'(copy_idx);
    wcs_wdata   = pm_rdata;
    last_copy   = (copy_idx + 12'd1 >= cur.imm[23:12]);
  end

  // Step to the next instruction, or jump, in the current program space.
  logic do_next, do_jump;
  always_comb begin
    do_next = 1'b0;
    do_jump = 1'b0;
    if (state == S_EXEC) begin
      unique case (cur.op)
        OP_LD, OP_ST, OP_WRUN, OP_WRET, OP_HALT: ;
        OP_LOOP:  if (line + 1'b1 < h_lines) do_jump = 1'b1; else do_next = 1'b1;
        OP_JMP:   do_jump = 1'b1;
        OP_BR:    if (cond) do_jump = 1'b1; else do_next = 1'b1;
        OP_WLD:   do_next = (cur.imm[23:12] == '0);
        OP_ISYNC: do_next = ii_line_ready;
        default:  do_next = 1'b1;
      endcase
    end else if (state == S_MEM) begin
      do_next = im_ack;
    end else if (state == S_CWAIT) begin
      do_next = pm_ack && last_copy;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ir       <= '0;
      in_wcs   <= 1'b0;
      pc       <= '0;
      ret_pc   <= '0;
      wpc      <= '0;
      h_lines  <= '0;
      line     <= '0;
      copy_idx <= '0;
      done     <= 1'b0;
      for (int i = 0; i < 16; i++) base[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pc     <= '0;
          in_wcs <= 1'b0;
          done   <= 1'b0;
          state  <= S_FETCH;
        end
        S_FETCH: state <= S_FWAIT;
        S_FWAIT: if (pm_ack) begin
          ir    <= pm_rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (cur.op)
            OP_LD, OP_ST: state <= S_MEM;
            OP_SETB: base[cur.rd] <= AW'(cur.imm);
            OP_SETH: h_lines <= AW'(cur.imm);
            OP_SETL: line <= AW'(cur.imm);
            OP_LOOP: line <= line + 1'b1;
            OP_WLD: begin
              copy_idx <= '0;
              if (cur.imm[23:12] != '0) state <= S_COPY;
            end
            OP_WRUN: begin
              ret_pc <= pc + 1'b1;
              in_wcs <= 1'b1;
              wpc    <= WAW'(cur.imm);
            end
            OP_WRET: begin
              in_wcs <= 1'b0;
              pc     <= ret_pc;
              state  <= S_FETCH;
            end
            OP_HALT: begin
              done   <= 1'b1;
              in_wcs <= 1'b0;
              state  <= S_IDLE;
            end
            default: ;   // NOP, PE instructions, JMP, BR, ISYNC: see below
          endcase
        end
        S_MEM: if (im_ack) state <= S_EXEC;
        S_COPY: state <= S_CWAIT;
        S_CWAIT: if (pm_ack) begin
          copy_idx <= copy_idx + 1'b1;
          state    <= last_copy ? S_EXEC : S_COPY;
        end
        default: state <= S_IDLE;
      endcase
      if (do_jump || do_next) begin
        if (in_wcs) wpc <= do_jump ? WAW'(cur.imm) : wpc + 1'b1;
        else begin
          pc    <= do_jump ? PAW'(cur.imm) : pc + 1'b1;
          state <= S_FETCH;
        end
      end
    end
  end

endmodule
