// reg_operand_access: one register read port of the paired register file.
//
// The low three bits of the register specifier pick a row of the register
// file, and the same three bits pick one bit of the SetMask bitmask; both
// lookups happen side by side so the bitmask adds no delay to the read. Each
// row holds a low register and its high partner. In Thumb state (use_mask = 1)
// the selected bitmask bit chooses between them; in ARM state, and for Thumb
// fields that already name the high half explicitly, the specifier's MSB does.
// This row/bitmask organisation follows the published scheme; the use_mask
// flag, which lets one port serve both states, is this design's choice.
//
// Interface: req (specifier, use_mask), mask (8-bit bitmask), row_sel (to the
// storage), row_lo/row_hi (the selected row), data (operand), reg_num (the
// register actually read). Purely combinational.
module reg_operand_access
  import axthumb_pkg::*;
#(
  parameter int W = XLEN
) (
  input  rd_req_t           req,
  input  logic [NPAIRS-1:0] mask,
  output logic [2:0]        row_sel,
  input  logic [W-1:0]      row_lo,
  input  logic [W-1:0]      row_hi,
  output logic [W-1:0]      data,
  output logic [3:0]        reg_num
);
  logic sel_hi;

  always_comb begin
    row_sel = req.spec[2:0];
    sel_hi  = req.use_mask ? mask[req.spec[2:0]] : req.spec[3];
    data    = sel_hi ? row_hi : row_lo;
    reg_num = {sel_hi, req.spec[2:0]};
  end
endmodule
