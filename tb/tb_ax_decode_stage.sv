// tb_ax_decode_stage: feeds the decode stage a stream of Thumb and AX
// halfwords through an ideal buffer (always two halfwords ahead) and checks,
// cycle by cycle, which ARM instruction issues, from which PC and under which
// bitmask. The stream covers every pairing case: Thumb then AX, AX then Thumb,
// AX then AX, a setshift merged into the next instruction, a setshift the next
// instruction cannot take, and the published SetMask 0x04 example. The whole
// stream of 21 halfwords must take 12 cycles (AX instructions cost none).
// A stall and ARM-state pass-through are checked afterwards.
module tb_ax_decode_stage;
  import axthumb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        thumb_state, stall;
  logic [1:0]  buf_count, consume;
  logic [31:0] buf_data, buf_pc;
  logic        out_valid, out_undef;
  logic [31:0] out_instr, out_pc;
  rd_req_t     out_rreq [NRPORTS];
  logic [7:0]  op_mask, mask_q;
  logic        ev_setmask, ev_setshift, ev_coalesced, shift_dropped;
  int checks = 0, failures = 0;

  ax_decode_stage dut (.*);

  always #5 clk = ~clk;

  localparam logic [31:0] BASE = 32'h0000_1000;
  logic [15:0] prog [$];
  int hd;

  // the buffer advances by what decode takes, sampled at the clock edge
  always_ff @(posedge clk) if (rst_n) hd <= hd + 32'(consume);

  always_comb begin
    buf_count = (prog.size() - hd >= 2) ? 2'd2 : 2'(prog.size() - hd);
    buf_data  = {(hd + 1 < prog.size()) ? prog[hd+1] : 16'h0000,
                 (hd < prog.size()) ? prog[hd] : 16'h0000};
    buf_pc    = BASE + 32'(hd) * 2;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // expected issue per cycle: valid, ARM word, halfword index, bitmask
  typedef struct { logic v; logic [31:0] a; int idx; logic [7:0] m; } exp_t;
  exp_t ex [12];

  int n_setmask = 0, n_setshift = 0, n_coal = 0, n_drop = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hd = 0;
    prog = '{16'h1888, 16'hDE04, 16'h1D6A, 16'h1880, 16'hB802, 16'h1A89, 16'hDE00,
             16'hB841, 16'h50D1, 16'h257F, 16'hB81F, 16'h257F, 16'h1888, 16'hDEFF,
             16'hDE03, 16'h4011, 16'h1888, 16'hDE80, 16'hDE00, 16'hDE06, 16'h4011};
    ex[0]  = '{1, 32'hE0910002,  0, 8'h00};  // ADD r0,r1,r2 ; SetMask 04 rides along
    ex[1]  = '{1, 32'hE295A005,  2, 8'h04};  // ADD r10,r5,#5
    ex[2]  = '{1, 32'hE090000A,  3, 8'h04};  // ADD r0,r0,r10 ; setshift lsl#2 rides along
    ex[3]  = '{1, 32'hE051110A,  5, 8'h04};  // SUB r1,r1,r10,lsl#2 ; SetMask 00
    ex[4]  = '{1, 32'hE78210C3,  8, 8'h00};  // setshift asr#1 + STR r1,[r2,r3,asr#1]
    ex[5]  = '{1, 32'hE3B0507F,  9, 8'h00};  // MOV r5,#0x7f ; setshift lsl#31
    ex[6]  = '{1, 32'hE3B0507F, 11, 8'h00};  // MOV r5,#0x7f, shift dropped
    ex[7]  = '{1, 32'hE0910002, 12, 8'h00};  // ADD ; SetMask FF
    ex[8]  = '{1, 32'hE0199002, 15, 8'h03};  // SetMask 03 + AND r9,r9,r2
    ex[9]  = '{1, 32'hE0998002, 16, 8'h03};  // ADD r8,r9,r2 ; SetMask 80
    ex[10] = '{0, 32'h0,         0, 8'h00};  // SetMask 00, SetMask 06: nothing issues
    ex[11] = '{1, 32'hE019900A, 20, 8'h06};  // AND r9,r9,r10
    thumb_state = 1; stall = 0;
    repeat (2) @(posedge clk); #1;
    #1 rst_n = 1;
    check("reset mask", {24'd0, mask_q}, 0);
    for (int c = 0; c < 12; c++) begin
      #1;
      check($sformatf("c%0d valid", c), {31'd0, out_valid}, {31'd0, ex[c].v});
      if (ex[c].v) begin
        check($sformatf("c%0d instr", c), out_instr, ex[c].a);
        check($sformatf("c%0d pc", c), out_pc, BASE + 32'(ex[c].idx) * 2);
        check($sformatf("c%0d mask", c), {24'd0, op_mask}, {24'd0, ex[c].m});
        check($sformatf("c%0d undef", c), {31'd0, out_undef}, 0);
      end
      n_setmask  += ev_setmask;
      n_setshift += ev_setshift;
      n_coal     += ev_coalesced;
      n_drop     += shift_dropped;
      @(posedge clk); #1;
     
    end
    check("all consumed in 12 cycles", hd, prog.size());
    check("setmask strobes", n_setmask, 6);
    check("setshift strobes", n_setshift, 3);
    check("coalesced", n_coal, 2);
    check("dropped", n_drop, 1);
    check("final mask", {24'd0, mask_q}, 8'h06);
    // read requests of the last instruction were in Thumb form
    // stall: nothing consumed, nothing issued, state kept
    prog.push_back(16'hDE01); prog.push_back(16'h1888);
    stall = 1;
    repeat (2) begin
      #1;
      check("stall valid", {31'd0, out_valid}, 0);
      check("stall consume", {30'd0, consume}, 0);
      @(posedge clk); #1;
    end
    check("stall mask kept", {24'd0, mask_q}, 8'h06);
    stall = 0; #1;
    check("after stall", out_instr, 32'hE0918002);   // SetMask 01 + ADD r8,r1,r2
    check("after stall mask", {24'd0, op_mask}, 8'h01);
    check("read port 0 resolves r1", {28'd0, resolve_reg(out_rreq[0], op_mask)}, 1);
    @(posedge clk); #1;
    // ARM state: one 32-bit word per cycle, passed through
    thumb_state = 0;
    prog.push_back(16'h2003); prog.push_back(16'hE08A);   // ADD r2,r10,r3
    prog.push_back(16'h5000); prog.push_back(16'hE58B);   // STR r5,[r11]
    #1;
    check("arm valid", {31'd0, out_valid}, 1);
    check("arm instr", out_instr, 32'hE08A2003);
    check("arm consume", {30'd0, consume}, 2);
    check("arm rn", {27'd0, out_rreq[0].use_mask, out_rreq[0].spec}, 32'h0A);
    check("arm rm", {27'd0, out_rreq[1].use_mask, out_rreq[1].spec}, 32'h03);
    @(posedge clk); #1; #1;
    check("arm str", out_instr, 32'hE58B5000);
    check("arm store data", {28'd0, out_rreq[2].spec}, 5);
    check("arm mask untouched", {24'd0, mask_q}, 8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
