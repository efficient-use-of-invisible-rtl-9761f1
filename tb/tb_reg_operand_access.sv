// tb_reg_operand_access: exhaustive check of one register read port. For every
// specifier, both lookup modes and a set of bitmasks, the selected half of the
// row, the row index and the reported register number are compared with the
// pairing rule: row = low three bits; high half if (Thumb lookup) the bitmask
// bit of that row is set, or (full-number lookup) the specifier's MSB is set.
module tb_reg_operand_access;
  import axthumb_pkg::*;

  rd_req_t     req;
  logic [7:0]  mask;
  logic [2:0]  row_sel;
  logic [31:0] row_lo, row_hi, data;
  logic [3:0]  reg_num;
  int checks = 0, failures = 0;

  reg_operand_access dut (.req, .mask, .row_sel, .row_lo, .row_hi, .data, .reg_num);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (spec=%h use_mask=%b mask=%h)",
               what, got, exp, req.spec, req.use_mask, mask);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] masks [6];
    logic [3:0] exp_reg;
    masks = '{8'h00, 8'hFF, 8'h04, 8'hA5, 8'h5A, 8'h81};
    for (int m = 0; m < 6; m++) begin
      for (int um = 0; um < 2; um++) begin
        for (int s = 0; s < 16; s++) begin
          mask         = masks[m];
          req.en       = 1'b1;
          req.use_mask = um[0];
          req.spec     = s[3:0];
          row_lo       = 32'h1000_0000 | s;
          row_hi       = 32'h8000_0000 | (s << 8);
          #1;
          // which register of the pair: worked out per case, not by formula
          if (um == 0) exp_reg = s[3:0];
          else         exp_reg = ((masks[m] >> (s % 8)) & 1) ? 4'(8 + s % 8) : 4'(s % 8);
          check("row", {29'd0, row_sel}, s % 8);
          check("reg", {28'd0, reg_num}, {28'd0, exp_reg});
          check("data", data, (exp_reg >= 8) ? row_hi : row_lo);
        end
      end
    end
    // the published example: SetMask 0x04 makes field 2 read r10
    mask = 8'h04; req = '{en: 1'b1, use_mask: 1'b1, spec: 4'd2}; #1;
    check("fig3 r10", {28'd0, reg_num}, 32'd10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
