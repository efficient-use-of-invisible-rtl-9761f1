// axthumb_frontend: fetch and decode/register-read stages of a five-stage
// (F D E M W) Thumb core extended with augmenting instructions, so that Thumb
// code can use all sixteen registers.
//
// Thumb register fields are three bits wide, so plain Thumb code reaches only
// r0-r7. Here the sixteen registers form eight pairs (r0,r8)...(r7,r15) and an
// 8-bit bitmask, loaded by the SetMask instruction, picks the visible member of
// each pair. SetMask and setshift (a shift to be merged into the next
// instruction) are absorbed in decode alongside a neighbouring instruction and
// never reach execute, so they cost no cycles.
//
//   fetch_unit      word fetch into a two-halfword buffer
//   ax_decode_stage AX absorption, bitmask, Thumb-to-ARM translation
//   paired_regfile  register read through the bitmask (row and bitmask bit
//                   looked up in parallel), one write port for write-back
//   D/E register    the issued ARM instruction with its three operand values
//
// The execute, memory and write-back stages are not part of this block: the
// decoded instruction and operands leave through the de_* ports, and results
// come back through the wb_* write port, redirect (taken branches) and
// thumb_state (the T bit). stall holds decode and the D/E register. A redirect
// empties fetch and the D/E register; the bitmask is kept, as it is program
// state that the compiler tracks across branches.
//
// Timing: an instruction fetched in cycle t is decoded and its registers read
// in cycle t+1, and appears on de_* from cycle t+2. Operand values are read
// when the instruction is decoded; forwarding of results not yet written back
// belongs to the execute stage and is not modelled here.
module axthumb_frontend
  import axthumb_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              thumb_state,
  input  logic              stall,
  // instruction memory (single-cycle, e.g. a cache hit)
  output logic              imem_req,
  output logic [31:0]       imem_addr,
  input  logic              imem_ready,
  input  logic [31:0]       imem_rdata,
  // from execute / write-back
  input  logic              redirect,
  input  logic [31:0]       redirect_pc,
  input  logic              wb_we,
  input  logic [3:0]        wb_addr,
  input  logic [XLEN-1:0]   wb_data,
  // to execute
  output logic              de_valid,
  output logic [31:0]       de_instr,
  output logic              de_undef,
  output logic [31:0]       de_pc,
  output logic [XLEN-1:0]   de_opnd [NRPORTS],
  output logic [3:0]        de_reg  [NRPORTS],
  output logic [NRPORTS-1:0] de_ren,
  // state and events
  output logic [NPAIRS-1:0] mask,
  output logic              ev_setmask,
  output logic              ev_setshift,
  output logic              ev_coalesced,
  output logic              ev_shift_dropped
);
  logic [1:0]  buf_count, consume;
  logic [31:0] buf_data, buf_pc;

  logic              d_valid, d_undef;
  logic [31:0]       d_instr, d_pc;
  rd_req_t           d_rreq [NRPORTS];
  logic [NPAIRS-1:0] d_mask;
  logic [XLEN-1:0]   rf_data [NRPORTS];
  logic [3:0]        rf_reg  [NRPORTS];

  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .imem_req, .imem_addr, .imem_ready, .imem_rdata,
    .redirect, .redirect_pc,
    .buf_count, .buf_data, .buf_pc, .consume
  );

  ax_decode_stage u_dec (
    .clk, .rst_n, .thumb_state,
    .stall         (stall || redirect),
    .buf_count, .buf_data, .buf_pc, .consume,
    .out_valid     (d_valid),
    .out_instr     (d_instr),
    .out_undef     (d_undef),
    .out_pc        (d_pc),
    .out_rreq      (d_rreq),
    .op_mask       (d_mask),
    .mask_q        (mask),
    .ev_setmask, .ev_setshift, .ev_coalesced,
    .shift_dropped (ev_shift_dropped)
  );

  paired_regfile u_rf (
    .clk, .rst_n,
    .mask  (d_mask),
    .rreq  (d_rreq),
    .rdata (rf_data),
    .rreg  (rf_reg),
    .we    (wb_we),
    .waddr (wb_addr),
    .wdata (wb_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_valid <= 1'b0;
      de_instr <= '0;
      de_undef <= 1'b0;
      de_pc    <= '0;
      de_ren   <= '0;
      for (int p = 0; p < NRPORTS; p++) begin
        de_opnd[p] <= '0;
        de_reg[p]  <= '0;
      end
    end else if (redirect) begin
      de_valid <= 1'b0;
    end else if (!stall) begin
      de_valid <= d_valid;
      de_instr <= d_instr;
      de_undef <= d_undef;
      de_pc    <= d_pc;
      for (int p = 0; p < NRPORTS; p++) begin
        de_opnd[p] <= rf_data[p];
        de_reg[p]  <= rf_reg[p];
        de_ren[p]  <= d_rreq[p].en;
      end
    end
  end
endmodule
