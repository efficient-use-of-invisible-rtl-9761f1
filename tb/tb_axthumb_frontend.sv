// tb_axthumb_frontend: end-to-end test of the front end at its default
// parameters. A small behavioural execute stage in this file executes the ARM
// instructions that leave decode (data processing with immediate or shifted
// register operands, B and SWI), forwards its last result to the instruction
// behind it, writes results back through the register write port and raises
// redirect for a taken branch.
//
// The program is the published SetMask example extended: SetMask 0x04 makes
// Thumb field r2 mean r10, so "ADD r2,r5,#5 ; ADD r0,r0,r2" computes
// r0 = a + (c + 5) with r10 as the temporary; a setshift merges LSL #2 into a
// SUB; a setshift that the next instruction cannot use is dropped; a branch
// redirects fetch; a high-register MOV names r8 directly; SetMask 0x06 then
// remaps two fields at once, taking effect on the
// instruction absorbed with it in the same cycle. A short ARM-state program follows.
//
// Run 1 uses an ideal memory and no stalls and checks the cycle count (AX
// instructions cost no cycles: 9 Thumb instructions and 4 AX instructions,
// the SWI executes in cycle 12). Run 2 repeats the program with random stalls
// and memory wait cycles and must reach the same register values. Each
// mechanism (SetMask, setshift merge, dropped shift, two halfwords taken in one
// cycle, high register read through the bitmask, stall, memory wait, redirect,
// ARM state) is counted and must happen at least once. Finally the two
// instruction sequences of the pipeline diagram (six Thumb instructions;
// Thumb and AX instructions interleaved) are replayed and the cycles of every
// fetch and every issue are compared with the diagram.
module tb_axthumb_frontend;
  import axthumb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        thumb_state, stall;
  logic        imem_req, imem_ready;
  logic [31:0] imem_addr, imem_rdata;
  logic        redirect;
  logic [31:0] redirect_pc;
  logic        wb_we;
  logic [3:0]  wb_addr;
  logic [31:0] wb_data;
  logic        de_valid, de_undef;
  logic [31:0] de_instr, de_pc;
  logic [31:0] de_opnd [NRPORTS];
  logic [3:0]  de_reg  [NRPORTS];
  logic [NRPORTS-1:0] de_ren;
  logic [7:0]  mask;
  logic        ev_setmask, ev_setshift, ev_coalesced, ev_shift_dropped;

  axthumb_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- instruction memory ----------------
  logic [15:0] hw [64];
  always_comb imem_rdata = {hw[imem_addr[6:1] + 6'd1], hw[imem_addr[6:1]]};

  // ---------------- behavioural execute stage ----------------
  logic        fwd_v;
  logic [3:0]  fwd_r;
  logic [31:0] fwd_d;
  logic        stop;
  logic        rand_stall, rand_wait, preload;
  int          cycle, stop_cycle, n_exec;
  logic [31:0] exec_log [$];

  function automatic logic [31:0] opnd(input int p);
    return (fwd_v && de_reg[p] == fwd_r) ? fwd_d : de_opnd[p];
  endfunction

  function automatic logic [31:0] shifted(input logic [31:0] v, input logic [1:0] k,
                                          input logic [4:0] n);
    case (k)
      2'b00: return v << n;
      2'b01: return (n == 0) ? 32'd0 : v >> n;
      2'b10: return (n == 0) ? {32{v[31]}} : 32'($signed(v) >>> n);
      default: return (v >> n) | (v << (6'd32 - {1'b0, n}));
    endcase
  endfunction

  logic [31:0] x_op2, x_res;
  logic        x_wr;
  always_comb begin
    x_op2 = 0; x_res = 0; x_wr = 0;
    redirect = 0; redirect_pc = 0;
    if (de_valid && !stall && !stop && !de_undef) begin
      if (de_instr[27:24] == 4'hA) begin
        redirect    = 1;
        redirect_pc = thumb_state ? de_pc + 32'd4 + {{7{de_instr[23]}}, de_instr[23:0], 1'b0}
                                  : de_pc + 32'd8 + {{6{de_instr[23]}}, de_instr[23:0], 2'b00};
      end else if (de_instr[27:26] == 2'b00) begin
        x_op2 = de_instr[25] ? {24'd0, de_instr[7:0]} >> {de_instr[11:8], 1'b0}
                             : shifted(opnd(1), de_instr[6:5], de_instr[11:7]);
        x_wr  = 1;
        case (de_instr[24:21])
          4'h0: x_res = opnd(0) & x_op2;
          4'h2: x_res = opnd(0) - x_op2;
          4'h4: x_res = opnd(0) + x_op2;
          4'hD: x_res = x_op2;
          default: x_wr = 0;
        endcase
      end
    end
    wb_we   = x_wr || preload;
    wb_addr = preload ? pl_addr : de_instr[15:12];
    wb_data = preload ? pl_data : x_res;
  end

  logic [3:0]  pl_addr;
  logic [31:0] pl_data;

  // mechanism counters
  int n_setmask, n_coal, n_drop, n_pair, n_hiread, n_stall, n_wait, n_redirect, n_arm;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (!stall && !redirect) begin
        fwd_v <= x_wr; fwd_r <= de_instr[15:12]; fwd_d <= x_res;
      end
      if (de_valid && !stall && !stop && !de_undef) begin
        exec_log.push_back(de_instr);
        if (de_instr[27:24] == 4'hF) begin
          stop <= 1; stop_cycle <= cycle;
        end
        if (!thumb_state) n_arm++;
        for (int p = 0; p < NRPORTS; p++)
          if (de_ren[p] && de_reg[p] >= 8 && thumb_state) n_hiread++;
      end
      n_setmask  += ev_setmask;
      n_coal     += ev_coalesced;
      n_drop     += ev_shift_dropped;
      n_pair     += (dut.consume == 2 && thumb_state);
      n_stall    += (stall && !preload);
      n_wait     += (imem_req && !imem_ready && !preload);
      n_redirect += redirect;
    end
  end

  always_comb begin
    stall      = preload || rand_stall;
    imem_ready = !preload && !rand_wait;
  end

  always @(negedge clk) begin
    rand_stall <= use_random && ($urandom % 5 == 0);
    rand_wait  <= use_random && ($urandom % 4 == 0);
  end
  logic use_random;

  // ---------------- program ----------------
  task automatic load_program();
    logic [15:0] p [20];
    p = '{16'hDE04,   // SetMask 0x04            (r2 field -> r10)
          16'h1D6A,   // ADD  r2, r5, #5         -> r10 = c + 5
          16'h1880,   // ADD  r0, r0, r2         -> r0 = a + r10
          16'hB802,   // setshift LSL #2
          16'h1A89,   // SUB  r1, r1, r2         -> r1 = r1 - (r10 << 2)
          16'hDE00,   // SetMask 0x00
          16'h4680,   // MOV  r8, r0             (high register named directly)
          16'hB81F,   // setshift LSL #31        (next one cannot take it)
          16'h257F,   // MOV  r5, #0x7f
          16'hE005,   // B    0x20
          16'h2063, 16'h2063, 16'h2063, 16'h2063, 16'h2063, 16'h2063,  // skipped
          16'hDE06,   // SetMask 0x06 (0x20)     (r1 -> r9, r2 -> r10)
          16'h4011,   // AND  r1, r2             -> r9 = r9 & r10
          16'h1888,   // ADD  r0, r1, r2         -> r0 = r9 + r10
          16'hDF00};  // SWI  (end of Thumb part)
    foreach (hw[i]) hw[i] = 16'h0000;
    foreach (p[i]) hw[i] = p[i];
    // ARM part at 0x40: ADD r2, r10, r3 ; SWI
    hw[32] = 16'h2003; hw[33] = 16'hE08A;
    hw[34] = 16'h0000; hw[35] = 16'hEF00;
    // pipeline-diagram sequences: Thumb, AX, Thumb, AX, Thumb, Thumb at 0x60,
    // six plain Thumb instructions at 0x70; each followed by SWI
    hw[48] = 16'h1888; hw[49] = 16'hB802; hw[50] = 16'h1888; hw[51] = 16'hDE00;
    hw[52] = 16'h1888; hw[53] = 16'h1888; hw[54] = 16'hDF00; hw[55] = 16'h0000;
    for (int i = 56; i < 62; i++) hw[i] = 16'h1888;
    hw[62] = 16'hDF00; hw[63] = 16'h0000;
  endtask

  task automatic run(input bit rnd, input int expect_cycles);
    logic [31:0] init_v [16];
    logic [31:0] exp_log [10];
    use_random = 0; rand_stall = 0; rand_wait = 0;
    rst_n = 0; preload = 1; thumb_state = 1; stop = 0; fwd_v = 0; cycle = 0;
    exec_log.delete();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // preload: a = 100 in r0, c = 7 in r5, others distinct
    init_v = '{100, 1000, 32'h0F0F, 5, 0, 7, 0, 0, 0, 32'h33, 0, 0, 0, 0, 0, 0};
    for (int r = 0; r < 16; r++) begin
      pl_addr = 4'(r); pl_data = init_v[r];
      @(posedge clk); #1;
    end
    cycle = 0;
    preload = 0; use_random = rnd;
    wait (stop);
    @(posedge clk); #1;
    if (!rnd) check("cycle of SWI", stop_cycle, expect_cycles);
    exp_log = '{32'hE295A005, 32'hE090000A, 32'hE051110A, 32'hE1A08000, 32'hE3B0507F,
                32'hEA000005, 32'hE019900A, 32'hE099000A, 32'hEF000000, 32'h0};
    check("instructions executed", exec_log.size(), 9);
    for (int i = 0; i < 9 && i < exec_log.size(); i++)
      check($sformatf("exec %0d", i), exec_log[i], exp_log[i]);
    check("r9 = r9 & r10",      dut.u_rf.hi_q[1], 32'h33 & 12);
    check("r0 = r9 + r10",      dut.u_rf.lo_q[0], (32'h33 & 12) + 12);
    check("r1 = 1000 - 48",     dut.u_rf.lo_q[1], 1000 - 48);
    check("r5 = 0x7f",          dut.u_rf.lo_q[5], 32'h7F);
    check("r8 = a + c + 5",     dut.u_rf.hi_q[0], 100 + 7 + 5);
    check("r10 = c + 5",        dut.u_rf.hi_q[2], 12);
    check("r2 untouched",       dut.u_rf.lo_q[2], 32'h0F0F);
    check("mask at end",        {24'd0, mask}, 8'h06);
    // ARM state: the bitmask no longer applies, fields are full numbers
    stop = 0; thumb_state = 0;
    force redirect = 1; force redirect_pc = 32'h40;
    @(posedge clk); #1;
    release redirect; release redirect_pc;
    wait (stop);
    @(posedge clk); #1;
    check("ARM ADD r2, r10, r3", dut.u_rf.lo_q[2], 12 + 5);
    use_random = 0;
  endtask

  // Replays one of the diagram's sequences from address pc and compares the
  // cycles of word fetches and of instruction issues (relative to the first
  // fetch) with the diagram.
  task automatic diagram(input string name, input logic [31:0] pc,
                         input int exp_fetch [$], input int exp_issue [$]);
    int f [$], d [$];
    int t, t0;
    logic seen_swi;
    stop = 0; thumb_state = 1; use_random = 0;
    force redirect = 1; force redirect_pc = pc;
    @(posedge clk); #1;
    release redirect; release redirect_pc;
    #1;
    t = 0; t0 = -1; seen_swi = 0;
    while (!stop && t < 40) begin
      if (imem_req && imem_ready && !seen_swi) begin
        if (t0 < 0) t0 = t;
        f.push_back(t - t0);
      end
      if (dut.d_valid && !seen_swi) begin
        d.push_back(t - t0);
        seen_swi = dut.d_instr[27:24] == 4'hF;
      end
      @(posedge clk); #1;
      t++;
    end
    check({name, " fetches"}, f.size(), exp_fetch.size());
    foreach (exp_fetch[i]) if (i < f.size()) check($sformatf("%s fetch %0d", name, i), f[i], exp_fetch[i]);
    check({name, " issues"}, d.size(), exp_issue.size());
    foreach (exp_issue[i]) if (i < d.size()) check($sformatf("%s issue %0d", name, i), d[i], exp_issue[i]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_setmask = 0; n_coal = 0; n_drop = 0; n_pair = 0; n_hiread = 0;
    n_stall = 0; n_wait = 0; n_redirect = 0; n_arm = 0;
    pl_addr = 0; pl_data = 0; preload = 1; use_random = 0;
    load_program();
    run(0, 12);
    repeat (3) run(1, 0);
    // Thumb: a word every second cycle, one instruction per cycle.
    // AXThumb: the two AX instructions ride along; fetch keeps up.
    diagram("thumb",   32'h70, '{0, 2, 4, 6}, '{1, 2, 3, 4, 5, 6, 7});
    diagram("axthumb", 32'h60, '{0, 1, 2, 4}, '{1, 2, 3, 4, 5});
    $display("mechanisms: setmask=%0d merged_shift=%0d dropped_shift=%0d paired_decode=%0d hi_reads=%0d stalls=%0d mem_waits=%0d redirects=%0d arm_instrs=%0d",
             n_setmask, n_coal, n_drop, n_pair, n_hiread, n_stall, n_wait, n_redirect, n_arm);
    check("setmask seen",       {31'd0, n_setmask  > 0}, 1);
    check("shift merged",       {31'd0, n_coal     > 0}, 1);
    check("shift dropped",      {31'd0, n_drop     > 0}, 1);
    check("paired decode",      {31'd0, n_pair     > 0}, 1);
    check("high reg via mask",  {31'd0, n_hiread   > 0}, 1);
    check("stall",              {31'd0, n_stall    > 0}, 1);
    check("memory wait",        {31'd0, n_wait     > 0}, 1);
    check("redirect",           {31'd0, n_redirect > 0}, 1);
    check("ARM state",          {31'd0, n_arm      > 0}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
