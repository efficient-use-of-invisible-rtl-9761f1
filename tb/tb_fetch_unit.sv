// tb_fetch_unit: drives the fetch unit with a decoder model that takes at most
// one halfword per cycle (plain Thumb) and then at most two (every instruction
// paired with an AX instruction), and checks the fetch cadence of the pipeline
// diagram: one word fetch every second cycle in the first case, one every cycle
// in the second, with decode never finding the buffer empty after the first
// fetch. Also checks the buffer contents and PCs against the memory model,
// a retried fetch while memory is not ready, and a redirect into the upper
// halfword of a word.
module tb_fetch_unit;
  logic        clk = 0, rst_n = 0;
  logic        imem_req, imem_ready;
  logic [31:0] imem_addr, imem_rdata;
  logic        redirect;
  logic [31:0] redirect_pc;
  logic [1:0]  buf_count, consume;
  logic [31:0] buf_data, buf_pc;
  int checks = 0, failures = 0;
  int maxc;
  int cyc;

  fetch_unit #(.RESET_PC(32'h100)) dut (.*);

  always #5 clk = ~clk;

  // memory: each halfword holds its own address xor a5a5
  always_comb imem_rdata = {16'(imem_addr + 2) ^ 16'hA5A5, 16'(imem_addr) ^ 16'hA5A5};
  always_comb consume = (int'(buf_count) < maxc) ? buf_count : 2'(maxc);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // buffer contents always match the address of each halfword
  always @(negedge clk) if (rst_n && !redirect) begin
    if (buf_count != 0) check("head", {16'd0, buf_data[15:0]}, {16'd0, 16'(buf_pc) ^ 16'hA5A5});
    if (buf_count == 2) check("next", {16'd0, buf_data[31:16]}, {16'd0, 16'(buf_pc + 2) ^ 16'hA5A5});
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] next_addr;
    maxc = 1; imem_ready = 1; redirect = 0; redirect_pc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // plain Thumb: fetch in cycles 0, 2, 4, 6 ...
    next_addr = 32'h100;
    for (cyc = 0; cyc < 8; cyc++) begin
      check($sformatf("thumb c%0d req", cyc), {31'd0, imem_req}, {31'd0, (cyc % 2) == 0});
      if (imem_req) begin
        check($sformatf("thumb c%0d addr", cyc), imem_addr, next_addr);
        next_addr += 4;
      end
      if (cyc > 0) check($sformatf("thumb c%0d not empty", cyc), {31'd0, buf_count != 0}, 1);
      @(posedge clk); #1;
    end
    // paired: two halfwords per cycle, a fetch every cycle
    maxc = 2; #1;
    for (cyc = 0; cyc < 6; cyc++) begin
      check($sformatf("pair c%0d req", cyc), {31'd0, imem_req}, 1);
      check($sformatf("pair c%0d addr", cyc), imem_addr, next_addr);
      if (cyc > 0) check($sformatf("pair c%0d full", cyc), {30'd0, buf_count}, 2);
      next_addr += 4;
      @(posedge clk); #1;
    end
    // memory not ready: the same word is requested until it arrives
    imem_ready = 0;
    repeat (3) begin
      @(posedge clk); #1;
      check("wait empty", {30'd0, buf_count}, 0);
      check("wait addr", imem_addr, next_addr);
    end
    imem_ready = 1;
    @(posedge clk); #1;
    check("after wait", buf_pc, next_addr);
    check("after wait count", {30'd0, buf_count}, 2);
    // redirect to the upper halfword of word 0x208
    redirect = 1; redirect_pc = 32'h20A; #1;
    check("no fetch during redirect", {31'd0, imem_req}, 0);
    @(posedge clk); #1;
    redirect = 0; maxc = 0; #1;
    check("redirect fetch addr", imem_addr, 32'h208);
    @(posedge clk); #1;
    check("redirect count", {30'd0, buf_count}, 1);
    check("redirect pc", buf_pc, 32'h20A);
    check("redirect data", {16'd0, buf_data[15:0]}, {16'd0, 16'h020A ^ 16'hA5A5});
    maxc = 1; #1;
    check("refill in same cycle", {31'd0, imem_req}, 1);
    check("refill addr", imem_addr, 32'h20C);
    @(posedge clk); #1;
    check("refill pc", buf_pc, 32'h20C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
