// axthumb_pkg: types, encodings and helper functions shared by the AX Thumb
// front end (fetch, AX decode, Thumb-to-ARM translation, paired register file).
//
// The register file holds 16 registers seen as 8 pairs (r0,r8)...(r7,r15).
// A Thumb register field names a pair with 3 bits; the SetMask bitmask (one bit
// per pair) says whether the low or the high member is meant. ARM-state fields
// carry the full 4-bit number. The two augmenting (AX) instructions, SetMask
// and setshift, are never executed: the decode stage absorbs them and folds
// their effect into the following instruction.
//
// The 16-bit encodings of the two AX instructions are this design's own choice;
// both sit in opcode space that is undefined in the original Thumb set:
//   SetMask  : 1101_1110_mmmm_mmmm  (conditional-branch space, cond = 1110)
//              m[i] = 1 makes r(i+8) visible in place of r(i).
//   setshift : 1011_1000_0tta_aaaa  (misc space, undefined in Thumb v1)
//              t = shift type (LSL, LSR, ASR, ROR as in ARM), a = amount.
package axthumb_pkg;

  localparam int NPAIRS   = 8;   // register pairs (rows of the register file)
  localparam int XLEN     = 32;  // register and ARM instruction width
  localparam int NRPORTS  = 3;   // register read ports (Rn, Rm, Rs/Rd)

  localparam logic [3:0] COND_AL = 4'hE;
  localparam logic [3:0] REG_SP  = 4'd13;
  localparam logic [3:0] REG_PC  = 4'd15;

  typedef enum logic [1:0] {
    SH_LSL = 2'b00,
    SH_LSR = 2'b01,
    SH_ASR = 2'b10,
    SH_ROR = 2'b11
  } shift_e;

  // ARM data-processing opcodes
  typedef enum logic [3:0] {
    DP_AND = 4'h0, DP_EOR = 4'h1, DP_SUB = 4'h2, DP_RSB = 4'h3,
    DP_ADD = 4'h4, DP_ADC = 4'h5, DP_SBC = 4'h6, DP_RSC = 4'h7,
    DP_TST = 4'h8, DP_TEQ = 4'h9, DP_CMP = 4'hA, DP_CMN = 4'hB,
    DP_ORR = 4'hC, DP_MOV = 4'hD, DP_BIC = 4'hE, DP_MVN = 4'hF
  } dp_op_e;

  // A shift carried by a setshift instruction, waiting for its partner.
  typedef struct packed {
    logic       valid;
    shift_e     kind;
    logic [4:0] amount;
  } ax_shift_t;

  // One register read request as it leaves decode. In Thumb state a 3-bit
  // field is looked up through the bitmask (use_mask = 1, spec[3] unused);
  // otherwise spec is the full register number.
  typedef struct packed {
    logic       en;
    logic       use_mask;
    logic [3:0] spec;
  } rd_req_t;

  function automatic logic is_setmask(input logic [15:0] h);
    return h[15:8] == 8'hDE;
  endfunction

  function automatic logic is_setshift(input logic [15:0] h);
    return h[15:7] == 9'b1011_1000_0;
  endfunction

  function automatic logic is_ax(input logic [15:0] h);
    return is_setmask(h) || is_setshift(h);
  endfunction

  // Full register number named by a read request under a given bitmask.
  function automatic logic [3:0] resolve_reg(input rd_req_t r, input logic [7:0] mask);
    logic hi;
    hi = r.use_mask ? mask[r.spec[2:0]] : r.spec[3];
    return {hi, r.spec[2:0]};
  endfunction

endpackage
