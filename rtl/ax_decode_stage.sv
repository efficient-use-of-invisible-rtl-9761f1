// ax_decode_stage: the decode stage of the AX Thumb core. It looks at the two
// halfwords at the head of the fetch buffer each cycle and issues at most one
// ARM instruction.
//
// Augmenting instructions (SetMask, setshift) are handled here and go no
// further down the pipeline. SetMask loads the 8-bit bitmask that says, for
// each register pair (r0,r8)...(r7,r15), which member Thumb register fields
// name; the bitmask holds until the next SetMask. setshift leaves a shift that
// is merged into the next non-AX instruction and then dropped. Because two
// halfwords are examined per cycle, an AX instruction costs no cycle:
//   head = Thumb, next = AX : issue the Thumb instruction, absorb the AX,
//                             consume 2 (the AX is decoded alongside the
//                             instruction before it);
//   head = AX, next = Thumb : absorb the AX and issue the Thumb instruction
//                             with the AX already applied, consume 2;
//   head = AX, next = AX    : absorb both, consume 2, issue nothing;
//   otherwise               : issue (or absorb) the head alone, consume 1.
// An AX instruction therefore only changes instructions after it. In ARM state
// (thumb_state = 0) the buffer holds one 32-bit ARM instruction, which passes
// through unchanged with its register fields read by full number.
//
// Outputs: consume (0..2 halfwords, to the fetch buffer), the issued ARM
// instruction with its PC and read requests, and op_mask, the bitmask that
// applies to this instruction's reads (it already includes a SetMask absorbed
// this cycle ahead of the instruction). Event strobes report SetMask and
// setshift absorption and a shift merged into an instruction.
//
// The idea (AX instructions decoded in parallel with the preceding instruction
// and coalesced with the following one, bitmask kept in decode) follows the
// published scheme; the two-halfword window rules, what happens to a shift the
// next instruction cannot take (dropped, flagged by shift_dropped), reset of the
// bitmask to zero (plain Thumb view) and the stall input are this design's.
module ax_decode_stage
  import axthumb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              thumb_state,
  input  logic              stall,        // downstream cannot take an instruction
  // fetch buffer head
  input  logic [1:0]        buf_count,    // valid halfwords at the head (0..2)
  input  logic [31:0]       buf_data,     // [15:0] head halfword, [31:16] next
  input  logic [31:0]       buf_pc,       // address of the head halfword
  output logic [1:0]        consume,
  // issued instruction
  output logic              out_valid,
  output logic [31:0]       out_instr,    // ARM encoding
  output logic              out_undef,    // Thumb encoding with no translation
  output logic [31:0]       out_pc,
  output rd_req_t           out_rreq [NRPORTS],
  output logic [NPAIRS-1:0] op_mask,
  // state and events
  output logic [NPAIRS-1:0] mask_q,
  output logic              ev_setmask,
  output logic              ev_setshift,
  output logic              ev_coalesced,  // a setshift merged into out_instr
  output logic              shift_dropped
);
  ax_shift_t shift_q;

  logic [15:0] h0, h1;
  logic        v0, v1, ax0, ax1;

  // state after absorbing AX halfwords that precede the issued instruction
  logic [NPAIRS-1:0] mask_pre, mask_nxt;
  ax_shift_t         shift_pre, shift_nxt;
  logic [15:0]       issue_h;
  logic [31:0]       issue_pc;
  logic              issue;

  logic [31:0]       x_arm;
  logic              x_ok, x_shift_used;
  rd_req_t           x_rreq [NRPORTS];

  function automatic ax_shift_t shift_of(input logic [15:0] h);
    return '{valid: 1'b1, kind: shift_e'(h[6:5]), amount: h[4:0]};
  endfunction

  thumb_translator u_xlate (
    .thumb      (issue_h),
    .shift      (shift_pre),
    .mask       (mask_pre),
    .arm        (x_arm),
    .ok         (x_ok),
    .shift_used (x_shift_used),
    .rreq       (x_rreq)
  );

  always_comb begin
    h0  = buf_data[15:0];
    h1  = buf_data[31:16];
    v0  = buf_count != 2'd0;
    v1  = buf_count == 2'd2;
    ax0 = v0 && is_ax(h0);
    ax1 = v1 && is_ax(h1);

    consume      = 2'd0;
    issue        = 1'b0;
    issue_h      = h0;
    issue_pc     = buf_pc;
    mask_pre     = mask_q;
    shift_pre    = shift_q;
    mask_nxt     = mask_q;
    shift_nxt    = shift_q;
    ev_setmask   = 1'b0;
    ev_setshift  = 1'b0;

    if (thumb_state && !stall && v0) begin
      if (!ax0) begin
        // head is an ordinary instruction; an AX right behind it rides along
        issue           = 1'b1;
        consume         = 2'd1;
        shift_nxt.valid = 1'b0;
        if (ax1) begin
          consume = 2'd2;
          if (is_setmask(h1)) begin
            mask_nxt   = h1[7:0];
            ev_setmask = 1'b1;
          end else begin
            shift_nxt   = shift_of(h1);
            ev_setshift = 1'b1;
          end
        end
      end else begin
        // head is AX: absorb it, then look at the next halfword
        consume = 2'd1;
        if (is_setmask(h0)) begin
          mask_pre   = h0[7:0];
          ev_setmask = 1'b1;
        end else begin
          shift_pre   = shift_of(h0);
          ev_setshift = 1'b1;
        end
        mask_nxt  = mask_pre;
        shift_nxt = shift_pre;
        if (v1) begin
          consume = 2'd2;
          if (!ax1) begin
            issue           = 1'b1;
            issue_h         = h1;
            issue_pc        = buf_pc + 32'd2;
            shift_nxt.valid = 1'b0;
          end else if (is_setmask(h1)) begin
            mask_nxt = h1[7:0];
          end else begin
            shift_nxt = shift_of(h1);
          end
        end
      end
    end else if (!thumb_state && !stall && v1) begin
      issue   = 1'b1;
      consume = 2'd2;
    end
  end

  always_comb begin
    op_mask       = mask_pre;
    out_valid     = issue;
    out_pc        = issue_pc;
    ev_coalesced  = 1'b0;
    shift_dropped = 1'b0;
    if (thumb_state) begin
      out_instr     = x_arm;
      out_undef     = !x_ok;
      out_rreq      = x_rreq;
      ev_coalesced  = issue && x_shift_used;
      shift_dropped = issue && shift_pre.valid && !x_shift_used;
    end else begin
      // ARM state: pass the word through; read Rn, Rm and Rs (or Rd of a store)
      out_instr   = buf_data;
      out_undef   = 1'b0;
      out_rreq[0] = '{en: 1'b1, use_mask: 1'b0, spec: buf_data[19:16]};
      out_rreq[1] = '{en: 1'b1, use_mask: 1'b0, spec: buf_data[3:0]};
      out_rreq[2] = '{en: 1'b1, use_mask: 1'b0,
                      spec: (buf_data[27:26] == 2'b01 && !buf_data[20]) ? buf_data[15:12]
                                                                         : buf_data[11:8]};
    end
  end

  // decode never takes more halfwords than the buffer holds, and an AX
  // halfword never leaves decode as an instruction
  a_consume_le_count: assert property (@(posedge clk) disable iff (!rst_n)
                                       consume <= buf_count);
  a_ax_not_issued: assert property (@(posedge clk) disable iff (!rst_n)
                                    (issue && thumb_state) |-> !is_ax(issue_h));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q  <= '0;
      shift_q <= '0;
    end else begin
      mask_q  <= mask_nxt;
      shift_q <= shift_nxt;
    end
  end
endmodule
