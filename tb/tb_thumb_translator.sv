// tb_thumb_translator: checks the Thumb-to-ARM translation against ARM
// encodings assembled by hand, one or more per Thumb format, then the same
// instructions under a SetMask bitmask (fields name the high registers) and
// with a pending setshift merged into the second operand. Read requests are
// checked for representative forms.
module tb_thumb_translator;
  import axthumb_pkg::*;

  logic [15:0] thumb;
  ax_shift_t   shift;
  logic [7:0]  mask;
  logic [31:0] arm;
  logic        ok, shift_used;
  rd_req_t     rreq [NRPORTS];
  int checks = 0, failures = 0;

  thumb_translator dut (.thumb, .shift, .mask, .arm, .ok, .shift_used, .rreq);

  typedef struct {
    logic [15:0] t;
    logic [7:0]  m;
    logic        sv;
    logic [1:0]  sk;
    logic [4:0]  sa;
    logic [31:0] a;
    logic        ok;
    logic        su;
    string       name;
  } vec_t;

  vec_t v [$];

  task automatic add(input logic [15:0] t, input logic [7:0] m, input logic sv,
                     input logic [1:0] sk, input logic [4:0] sa, input logic [31:0] a,
                     input logic o, input logic su, input string name);
    vec_t e;
    e = '{t: t, m: m, sv: sv, sk: sk, sa: sa, a: a, ok: o, su: su, name: name};
    v.push_back(e);
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_req(input string what, input int p, input logic en, input logic um,
                           input logic [3:0] spec);
    check({what, " en"}, {31'd0, rreq[p].en}, {31'd0, en});
    if (en) begin
      check({what, " use_mask"}, {31'd0, rreq[p].use_mask}, {31'd0, um});
      check({what, " spec"}, {28'd0, rreq[p].spec & (um ? 4'h7 : 4'hF)}, {28'd0, spec});
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // plain Thumb, bitmask zero, no shift
    add(16'h00D1, 8'h00, 0, 0, 0, 32'hE1B01182, 1, 0, "LSL r1,r2,#3");
    add(16'h1888, 8'h00, 0, 0, 0, 32'hE0910002, 1, 0, "ADD r0,r1,r2");
    add(16'h1F63, 8'h00, 0, 0, 0, 32'hE2543005, 1, 0, "SUB r3,r4,#5");
    add(16'h257F, 8'h00, 0, 0, 0, 32'hE3B0507F, 1, 0, "MOV r5,#0x7f");
    add(16'h2A0A, 8'h00, 0, 0, 0, 32'hE352000A, 1, 0, "CMP r2,#10");
    add(16'h3005, 8'h00, 0, 0, 0, 32'hE2900005, 1, 0, "ADD r0,#5");
    add(16'h4011, 8'h00, 0, 0, 0, 32'hE0111002, 1, 0, "AND r1,r2");
    add(16'h40A3, 8'h00, 0, 0, 0, 32'hE1B03413, 1, 0, "LSL r3,r4");
    add(16'h4248, 8'h00, 0, 0, 0, 32'hE2710000, 1, 0, "NEG r0,r1");
    add(16'h435A, 8'h00, 0, 0, 0, 32'hE0120293, 1, 0, "MUL r2,r3");
    add(16'h4291, 8'h00, 0, 0, 0, 32'hE1510002, 1, 0, "CMP r1,r2");
    add(16'h43EC, 8'h00, 0, 0, 0, 32'hE1F04005, 1, 0, "MVN r4,r5");
    add(16'h4680, 8'h00, 0, 0, 0, 32'hE1A08000, 1, 0, "MOV r8,r0");
    add(16'h4448, 8'h00, 0, 0, 0, 32'hE0800009, 1, 0, "ADD r0,r9");
    add(16'h4770, 8'h00, 0, 0, 0, 32'hE12FFF1E, 1, 0, "BX lr");
    add(16'h4802, 8'h00, 0, 0, 0, 32'hE59F0008, 1, 0, "LDR r0,[pc,#8]");
    add(16'h50D1, 8'h00, 0, 0, 0, 32'hE7821003, 1, 0, "STR r1,[r2,r3]");
    add(16'h5CD1, 8'h00, 0, 0, 0, 32'hE7D21003, 1, 0, "LDRB r1,[r2,r3]");
    add(16'h5ED1, 8'h00, 0, 0, 0, 32'hE19210F3, 1, 0, "LDSH r1,[r2,r3]");
    add(16'h52D1, 8'h00, 0, 0, 0, 32'hE18210B3, 1, 0, "STRH r1,[r2,r3]");
    add(16'h6848, 8'h00, 0, 0, 0, 32'hE5910004, 1, 0, "LDR r0,[r1,#4]");
    add(16'h70C8, 8'h00, 0, 0, 0, 32'hE5C10003, 1, 0, "STRB r0,[r1,#3]");
    add(16'h88DA, 8'h00, 0, 0, 0, 32'hE1D320B6, 1, 0, "LDRH r2,[r3,#6]");
    add(16'h9304, 8'h00, 0, 0, 0, 32'hE58D3010, 1, 0, "STR r3,[sp,#16]");
    add(16'hA902, 8'h00, 0, 0, 0, 32'hE28D1F02, 1, 0, "ADD r1,sp,#8");
    add(16'hB084, 8'h00, 0, 0, 0, 32'hE24DDF04, 1, 0, "SUB sp,#16");
    add(16'hB510, 8'h00, 0, 0, 0, 32'hE92D4010, 1, 0, "PUSH {r4,lr}");
    add(16'hBD10, 8'h00, 0, 0, 0, 32'hE8BD8010, 1, 0, "POP {r4,pc}");
    add(16'hC006, 8'h00, 0, 0, 0, 32'hE8A00006, 1, 0, "STMIA r0!,{r1,r2}");
    add(16'hD002, 8'h00, 0, 0, 0, 32'h0A000002, 1, 0, "BEQ +2");
    add(16'hE7FF, 8'h00, 0, 0, 0, 32'hEAFFFFFF, 1, 0, "B -1");
    add(16'hDF12, 8'h00, 0, 0, 0, 32'hEF000012, 1, 0, "SWI 0x12");
    add(16'hF000, 8'h00, 0, 0, 0, 32'h00000000, 0, 0, "BL (not translated)");
    // under a bitmask: the published example, SetMask 0x04 then
    // ADD R2,R5,#5 / ADD R0,R0,R2 becomes ADD r10,r5,#5 / ADD r0,r0,r10
    add(16'h1D6A, 8'h04, 0, 0, 0, 32'hE295A005, 1, 0, "mask04 ADD r2,r5,#5");
    add(16'h1880, 8'h04, 0, 0, 0, 32'hE090000A, 1, 0, "mask04 ADD r0,r0,r2");
    add(16'h4011, 8'hFF, 0, 0, 0, 32'hE019900A, 1, 0, "maskFF AND r1,r2");
    add(16'h50D1, 8'h0E, 0, 0, 0, 32'hE78A900B, 1, 0, "mask0E STR r1,[r2,r3]");
    add(16'h4680, 8'hFF, 0, 0, 0, 32'hE1A08000, 1, 0, "maskFF MOV r8,r0 direct");
    add(16'hC006, 8'h01, 0, 0, 0, 32'hE8A80006, 1, 0, "mask01 STMIA r8!,{r1,r2}");
    // with a pending setshift
    add(16'h1A89, 8'h00, 1, 2'b00, 5'd2, 32'hE0511102, 1, 1, "lsl#2 SUB r1,r1,r2");
    add(16'h50D1, 8'h00, 1, 2'b10, 5'd3, 32'hE78211C3, 1, 1, "asr#3 STR r1,[r2,r3]");
    add(16'h257F, 8'h00, 1, 2'b00, 5'd4, 32'hE3B0507F, 1, 0, "shift not taken by MOV imm");
    add(16'h4680, 8'h00, 1, 2'b01, 5'd1, 32'hE1A080A0, 1, 1, "lsr#1 MOV r8,r0");
    add(16'h4011, 8'hFF, 1, 2'b11, 5'd8, 32'hE019946A, 1, 1, "ror#8 maskFF AND r1,r2");

    foreach (v[i]) begin
      thumb = v[i].t; mask = v[i].m;
      shift = '{valid: v[i].sv, kind: shift_e'(v[i].sk), amount: v[i].sa};
      #1;
      check({v[i].name, " arm"}, arm, v[i].a);
      check({v[i].name, " ok"}, {31'd0, ok}, {31'd0, v[i].ok});
      check({v[i].name, " shift_used"}, {31'd0, shift_used}, {31'd0, v[i].su});
    end

    // read requests
    shift = '0; mask = 8'h00;
    thumb = 16'h1888; #1;               // ADD r0,r1,r2
    check_req("add p0", 0, 1, 1, 4'd1); check_req("add p1", 1, 1, 1, 4'd2); check_req("add p2", 2, 0, 0, 0);
    thumb = 16'h50D1; #1;               // STR r1,[r2,r3]
    check_req("str p0", 0, 1, 1, 4'd2); check_req("str p1", 1, 1, 1, 4'd3); check_req("str p2", 2, 1, 1, 4'd1);
    thumb = 16'h6848; #1;               // LDR r0,[r1,#4]
    check_req("ldr p0", 0, 1, 1, 4'd1); check_req("ldr p1", 1, 0, 0, 0); check_req("ldr p2", 2, 0, 0, 0);
    thumb = 16'h4680; #1;               // MOV r8,r0
    check_req("mov p0", 0, 0, 0, 0); check_req("mov p1", 1, 1, 0, 4'd0);
    thumb = 16'h4448; #1;               // ADD r0,r9
    check_req("addh p0", 0, 1, 0, 4'd0); check_req("addh p1", 1, 1, 0, 4'd9);
    thumb = 16'h9304; #1;               // STR r3,[sp,#16]
    check_req("strsp p0", 0, 1, 0, 4'd13); check_req("strsp p2", 2, 1, 1, 4'd3);
    thumb = 16'h40A3; #1;               // LSL r3,r4
    check_req("lsl p1", 1, 1, 1, 4'd3); check_req("lsl p2", 2, 1, 1, 4'd4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
