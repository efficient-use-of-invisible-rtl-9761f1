// thumb_translator: turns one 16-bit Thumb instruction into the equivalent
// 32-bit ARM instruction, as the decode stage of a dual-width core does, and
// folds in a shift carried by a preceding setshift instruction.
//
// The decode stage calls it once per cycle. A Thumb register field is three
// bits wide; under the SetMask bitmask it names either the low or the high
// member of a register pair, so the ARM instruction it produces carries the
// resolved 4-bit register numbers. Alongside the ARM word it issues up to three
// register read requests (port 0: first operand / base, port 1: second
// operand / offset, port 2: shift register or store data) in the unresolved
// form the register file's bitmask lookup takes.
//
// A pending setshift is merged into the register second operand of the ARM
// form wherever ARM allows an immediate shift there: the data-processing
// register forms (ADD/SUB three-register, the two-operand ALU ops except
// shifts, NEG and MUL, and the high-register ADD/CMP/MOV) and the register-
// offset word/byte load/store. Elsewhere the shift is not used (shift_used = 0).
//
// The idea of pairing an AX instruction with the next one into one ARM
// instruction follows the published scheme; the choice of which Thumb forms take
// the shift, and the mapping of each Thumb format to ARM, are this design's.
// High-register forms (ADD/CMP/MOV/BX with H bits) name their registers
// directly, not through the bitmask, so plain Thumb moves between the halves
// keep working. Register lists (PUSH/POP/LDM/STM) are not remapped.
// Conditional and unconditional branches keep their halfword offset in the ARM
// offset field. The BL pair and undefined encodings are not translated (ok = 0).
//
// Purely combinational.
module thumb_translator
  import axthumb_pkg::*;
(
  input  logic [15:0]       thumb,
  input  ax_shift_t         shift,
  input  logic [NPAIRS-1:0] mask,
  output logic [31:0]       arm,
  output logic              ok,
  output logic              shift_used,
  output rd_req_t           rreq [NRPORTS]
);

  function automatic rd_req_t lo_req(input logic [2:0] f);
    return '{en: 1'b1, use_mask: 1'b1, spec: {1'b0, f}};
  endfunction

  function automatic rd_req_t full_req(input logic [3:0] r);
    return '{en: 1'b1, use_mask: 1'b0, spec: r};
  endfunction

  function automatic logic [31:0] dp(input dp_op_e op, input logic s, input logic imm,
                                     input logic [3:0] rn, input logic [3:0] rd,
                                     input logic [11:0] op2);
    return {COND_AL, 2'b00, imm, op, s, rn, rd, op2};
  endfunction

  logic [2:0]  f_rd, f_rs, f_rn;      // Thumb fields [2:0], [5:3], [8:6]
  logic [3:0]  r_rd, r_rs, r_rn;      // the same, resolved through the mask
  logic [2:0]  f_hi;                  // Thumb field [10:8]
  logic [3:0]  r_hi;
  logic [11:0] op2_rs, op2_rn;        // register operand, with setshift if any
  logic [3:0]  h1_rd, h2_rs;          // high-register form operands
  dp_op_e      alu_op;

  always_comb begin
    f_rd  = thumb[2:0];
    f_rs  = thumb[5:3];
    f_rn  = thumb[8:6];
    f_hi  = thumb[10:8];
    r_rd  = {mask[f_rd], f_rd};
    r_rs  = {mask[f_rs], f_rs};
    r_rn  = {mask[f_rn], f_rn};
    r_hi  = {mask[f_hi], f_hi};
    h1_rd = {thumb[7], f_rd};
    h2_rs = {thumb[6], f_rs};
    op2_rs = shift.valid ? {shift.amount, shift.kind, 1'b0, r_rs} : {8'd0, r_rs};
    op2_rn = shift.valid ? {shift.amount, shift.kind, 1'b0, r_rn} : {8'd0, r_rn};

    arm        = 32'd0;
    ok         = 1'b1;
    shift_used = 1'b0;
    alu_op     = DP_AND;
    for (int p = 0; p < NRPORTS; p++) rreq[p] = '0;

    casez (thumb[15:8])
      // Format 1: LSL/LSR/ASR Rd, Rs, #imm5  ->  MOVS Rd, Rs, <sh> #imm5
      8'b000?_????: begin
        if (thumb[12:11] != 2'b11) begin
          arm     = dp(DP_MOV, 1'b1, 1'b0, 4'd0, r_rd, {thumb[10:6], thumb[12:11], 1'b0, r_rs});
          rreq[1] = lo_req(f_rs);
        end else begin
          // Format 2: ADD/SUB Rd, Rs, Rn|#imm3  ->  ADDS/SUBS Rd, Rs, op2
          rreq[0] = lo_req(f_rs);
          if (thumb[10]) begin
            arm = dp(thumb[9] ? DP_SUB : DP_ADD, 1'b1, 1'b1, r_rs, r_rd, {9'd0, f_rn});
          end else begin
            arm        = dp(thumb[9] ? DP_SUB : DP_ADD, 1'b1, 1'b0, r_rs, r_rd, op2_rn);
            rreq[1]    = lo_req(f_rn);
            shift_used = shift.valid;
          end
        end
      end
      // Format 3: MOV/CMP/ADD/SUB Rd, #imm8
      8'b001?_????: begin
        unique case (thumb[12:11])
          2'b00: arm = dp(DP_MOV, 1'b1, 1'b1, 4'd0, r_hi, {4'd0, thumb[7:0]});
          2'b01: arm = dp(DP_CMP, 1'b1, 1'b1, r_hi, 4'd0, {4'd0, thumb[7:0]});
          2'b10: arm = dp(DP_ADD, 1'b1, 1'b1, r_hi, r_hi, {4'd0, thumb[7:0]});
          default: arm = dp(DP_SUB, 1'b1, 1'b1, r_hi, r_hi, {4'd0, thumb[7:0]});
        endcase
        if (thumb[12:11] != 2'b00) rreq[0] = lo_req(f_hi);
      end
      // Format 4: two-operand ALU operations Rd, Rs
      8'b0100_00??: begin
        unique case (thumb[9:6])
          4'h2, 4'h3, 4'h4, 4'h7: begin   // LSL/LSR/ASR/ROR Rd, Rs -> MOVS Rd, Rd, <sh> Rs
            arm = dp(DP_MOV, 1'b1, 1'b0, 4'd0, r_rd,
                     {r_rs, 1'b0,
                      (thumb[9:6] == 4'h2) ? SH_LSL :
                      (thumb[9:6] == 4'h3) ? SH_LSR :
                      (thumb[9:6] == 4'h4) ? SH_ASR : SH_ROR,
                      1'b1, r_rd});
            rreq[1] = lo_req(f_rd);
            rreq[2] = lo_req(f_rs);
          end
          4'h9: begin                      // NEG Rd, Rs -> RSBS Rd, Rs, #0
            arm     = dp(DP_RSB, 1'b1, 1'b1, r_rs, r_rd, 12'd0);
            rreq[0] = lo_req(f_rs);
          end
          4'hD: begin                      // MUL Rd, Rs -> MULS Rd, Rs, Rd
            arm     = {COND_AL, 7'b0000000, 1'b1, r_rd, 4'd0, r_rd, 4'b1001, r_rs};
            rreq[1] = lo_req(f_rs);
            rreq[2] = lo_req(f_rd);
          end
          default: begin
            unique case (thumb[9:6])
              4'h0: alu_op = DP_AND;
              4'h1: alu_op = DP_EOR;
              4'h5: alu_op = DP_ADC;
              4'h6: alu_op = DP_SBC;
              4'h8: alu_op = DP_TST;
              4'hA: alu_op = DP_CMP;
              4'hB: alu_op = DP_CMN;
              4'hC: alu_op = DP_ORR;
              4'hE: alu_op = DP_BIC;
              default: alu_op = DP_MVN;
            endcase
            if (alu_op == DP_MVN) begin
              arm = dp(alu_op, 1'b1, 1'b0, 4'd0, r_rd, op2_rs);
            end else if (alu_op inside {DP_TST, DP_CMP, DP_CMN}) begin
              arm     = dp(alu_op, 1'b1, 1'b0, r_rd, 4'd0, op2_rs);
              rreq[0] = lo_req(f_rd);
            end else begin
              arm     = dp(alu_op, 1'b1, 1'b0, r_rd, r_rd, op2_rs);
              rreq[0] = lo_req(f_rd);
            end
            rreq[1]    = lo_req(f_rs);
            shift_used = shift.valid;
          end
        endcase
      end
      // Format 5: high-register ADD/CMP/MOV and BX (registers named directly)
      8'b0100_01??: begin
        rreq[1] = full_req(h2_rs);
        unique case (thumb[9:8])
          2'b00: begin
            arm        = dp(DP_ADD, 1'b0, 1'b0, h1_rd, h1_rd,
                            shift.valid ? {shift.amount, shift.kind, 1'b0, h2_rs} : {8'd0, h2_rs});
            rreq[0]    = full_req(h1_rd);
            shift_used = shift.valid;
          end
          2'b01: begin
            arm        = dp(DP_CMP, 1'b1, 1'b0, h1_rd, 4'd0,
                            shift.valid ? {shift.amount, shift.kind, 1'b0, h2_rs} : {8'd0, h2_rs});
            rreq[0]    = full_req(h1_rd);
            shift_used = shift.valid;
          end
          2'b10: begin
            arm        = dp(DP_MOV, 1'b0, 1'b0, 4'd0, h1_rd,
                            shift.valid ? {shift.amount, shift.kind, 1'b0, h2_rs} : {8'd0, h2_rs});
            shift_used = shift.valid;
          end
          default: arm = {COND_AL, 24'h12FFF1, h2_rs};   // BX Rs
        endcase
      end
      // Format 6: LDR Rd, [PC, #imm8*4]
      8'b0100_1???: begin
        arm     = {COND_AL, 8'h59, REG_PC, r_hi, 2'b00, thumb[7:0], 2'b00};
        rreq[0] = full_req(REG_PC);
      end
      // Format 7 (bit 9 = 0): LDR/STR/LDRB/STRB Rd, [Rb, Ro]
      // Format 8 (bit 9 = 1): STRH/LDRH/LDSB/LDSH Rd, [Rb, Ro]
      8'b0101_????: begin
        rreq[0] = lo_req(f_rs);
        rreq[1] = lo_req(f_rn);
        if (!thumb[9]) begin
          arm        = {COND_AL, 3'b011, 1'b1, 1'b1, thumb[10], 1'b0, thumb[11], r_rs, r_rd, op2_rn};
          shift_used = shift.valid;
          if (!thumb[11]) rreq[2] = lo_req(f_rd);
        end else begin
          arm = {COND_AL, 3'b000, 1'b1, 1'b1, 1'b0, 1'b0, thumb[10] | thumb[11], r_rs, r_rd,
                 4'b0000, 1'b1, thumb[10], thumb[10] ? thumb[11] : 1'b1, 1'b1, r_rn};
          if (!(thumb[10] | thumb[11])) rreq[2] = lo_req(f_rd);
        end
      end
      // Format 9: LDR/STR/LDRB/STRB Rd, [Rb, #imm5]
      8'b011?_????: begin
        arm     = {COND_AL, 3'b010, 1'b1, 1'b1, thumb[12], 1'b0, thumb[11], r_rs, r_rd,
                   thumb[12] ? {7'd0, thumb[10:6]} : {5'd0, thumb[10:6], 2'b00}};
        rreq[0] = lo_req(f_rs);
        if (!thumb[11]) rreq[2] = lo_req(f_rd);
      end
      // Format 10: STRH/LDRH Rd, [Rb, #imm5*2]
      8'b1000_????: begin
        arm     = {COND_AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, thumb[11], r_rs, r_rd,
                   2'b00, thumb[10:9], 4'b1011, thumb[8:6], 1'b0};
        rreq[0] = lo_req(f_rs);
        if (!thumb[11]) rreq[2] = lo_req(f_rd);
      end
      // Format 11: LDR/STR Rd, [SP, #imm8*4]
      8'b1001_????: begin
        arm     = {COND_AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, thumb[11], REG_SP, r_hi,
                   2'b00, thumb[7:0], 2'b00};
        rreq[0] = full_req(REG_SP);
        if (!thumb[11]) rreq[2] = lo_req(f_hi);
      end
      // Format 12: ADD Rd, PC|SP, #imm8*4  (imm8 rotated right by 30)
      8'b1010_????: begin
        arm     = dp(DP_ADD, 1'b0, 1'b1, thumb[11] ? REG_SP : REG_PC, r_hi, {4'hF, thumb[7:0]});
        rreq[0] = full_req(thumb[11] ? REG_SP : REG_PC);
      end
      // Format 13: ADD SP, #+/-imm7*4
      8'b1011_0000: begin
        arm     = dp(thumb[7] ? DP_SUB : DP_ADD, 1'b0, 1'b1, REG_SP, REG_SP,
                     {4'hF, 1'b0, thumb[6:0]});
        rreq[0] = full_req(REG_SP);
      end
      // Format 14: PUSH {rlist[,LR]} / POP {rlist[,PC]}
      8'b1011_?10?: begin
        if (!thumb[11])
          arm = {COND_AL, 12'h92D, 1'b0, thumb[8], 6'd0, thumb[7:0]};   // STMDB SP!, {...}
        else
          arm = {COND_AL, 12'h8BD, thumb[8], 7'd0, thumb[7:0]};         // LDMIA SP!, {...}
        rreq[0] = full_req(REG_SP);
      end
      // Format 15: STMIA/LDMIA Rb!, {rlist}
      8'b1100_????: begin
        arm     = {COND_AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b1, thumb[11], r_hi, 8'd0, thumb[7:0]};
        rreq[0] = lo_req(f_hi);
      end
      // Format 16/17: B<cond> label, SWI imm8 (cond 1110 is SetMask, never here)
      8'b1101_????: begin
        if (thumb[11:8] == 4'hF)
          arm = {COND_AL, 4'hF, 16'd0, thumb[7:0]};
        else if (thumb[11:8] == 4'hE)
          ok = 1'b0;
        else
          arm = {thumb[11:8], 4'hA, {16{thumb[7]}}, thumb[7:0]};
      end
      // Format 18: B label
      8'b1110_0???: arm = {COND_AL, 4'hA, {13{thumb[10]}}, thumb[10:0]};
      default: ok = 1'b0;
    endcase
    if (!ok) arm = 32'd0;
  end
endmodule
