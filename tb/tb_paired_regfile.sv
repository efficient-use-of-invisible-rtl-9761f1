// tb_paired_regfile: writes all sixteen registers through the write port with
// distinct values, then reads them through all three ports, by full number
// and through random bitmasks, against a flat 16-entry reference array. Also
// checks that a write to one member of a pair leaves its partner alone and
// that reset clears the file.
module tb_paired_regfile;
  import axthumb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [7:0]  mask;
  rd_req_t     rreq  [3];
  logic [31:0] rdata [3];
  logic [3:0]  rreg  [3];
  logic        we;
  logic [3:0]  waddr;
  logic [31:0] wdata;
  logic [31:0] ref_q [16];
  int checks = 0, failures = 0;

  paired_regfile dut (.clk, .rst_n, .mask, .rreq, .rdata, .rreg, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(input logic [3:0] a, input logic [31:0] d);
    we = 1; waddr = a; wdata = d;
    @(posedge clk); #1;
    we = 0;
    ref_q[a] = d;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; mask = 0;
    for (int p = 0; p < 3; p++) rreq[p] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // after reset every register reads zero
    for (int r = 0; r < 16; r++) begin
      rreq[0] = '{en: 1'b1, use_mask: 1'b0, spec: 4'(r)}; #1;
      check("reset", rdata[0], 32'd0);
    end
    for (int r = 0; r < 16; r++) write(4'(r), 32'hC0DE_0000 + r * 32'h111);
    // full-number reads on every port
    for (int r = 0; r < 16; r++)
      for (int p = 0; p < 3; p++) begin
        rreq[p] = '{en: 1'b1, use_mask: 1'b0, spec: 4'(r)}; #1;
        check("full", rdata[p], ref_q[r]);
        check("full reg", {28'd0, rreq[p].spec}, {28'd0, rreg[p]});
      end
    // bitmask reads: three ports at once, independent fields
    for (int t = 0; t < 200; t++) begin
      logic [2:0] f;
      mask = 8'($urandom);
      for (int p = 0; p < 3; p++) begin
        f = 3'($urandom);
        rreq[p] = '{en: 1'b1, use_mask: 1'b1, spec: {1'($urandom), f}};
      end
      #1;
      for (int p = 0; p < 3; p++) begin
        int r;
        r = mask[rreq[p].spec[2:0]] ? 8 + rreq[p].spec[2:0] : rreq[p].spec[2:0];
        check("masked", rdata[p], ref_q[r]);
        check("masked reg", {28'd0, rreg[p]}, r);
      end
    end
    // writing r9 must not disturb r1
    write(4'd9, 32'hDEAD_BEEF);
    mask = 8'h00; rreq[0] = '{en: 1'b1, use_mask: 1'b1, spec: 4'd1};
    mask = 8'h00; rreq[1] = '{en: 1'b1, use_mask: 1'b0, spec: 4'd9}; #1;
    check("partner kept", rdata[0], ref_q[1]);
    check("r9 written", rdata[1], 32'hDEAD_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
