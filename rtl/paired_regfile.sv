// paired_regfile: the 16 x 32-bit register file, stored as 8 rows of
// (low, high) register pairs: row i holds r(i) and r(i+8).
//
// Each of the NR read ports goes through a reg_operand_access unit, which
// indexes the row and the SetMask bitmask in parallel with the specifier's low
// three bits and then selects the low or high half of the row. Reads are
// combinational. One write port takes a full 4-bit register number (the
// write-back stage always knows the resolved register) and writes on the rising
// clock edge. All registers reset to zero. The row organisation follows the
// published scheme; the port count, reset and the single write port are this
// design's choices.
module paired_regfile
  import axthumb_pkg::*;
#(
  parameter int W  = XLEN,
  parameter int NR = NRPORTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPAIRS-1:0] mask,
  input  rd_req_t           rreq    [NR],
  output logic [W-1:0]      rdata   [NR],
  output logic [3:0]        rreg    [NR],
  input  logic              we,
  input  logic [3:0]        waddr,
  input  logic [W-1:0]      wdata
);
  logic [W-1:0] lo_q [NPAIRS];
  logic [W-1:0] hi_q [NPAIRS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAIRS; i++) begin
        lo_q[i] <= '0;
        hi_q[i] <= '0;
      end
    end else if (we) begin
      if (waddr[3]) hi_q[waddr[2:0]] <= wdata;
      else          lo_q[waddr[2:0]] <= wdata;
    end
  end

  for (genvar p = 0; p < NR; p++) begin : g_port
    logic [2:0] row;
    reg_operand_access #(.W(W)) u_acc (
      .req     (rreq[p]),
      .mask    (mask),
      .row_sel (row),
      .row_lo  (lo_q[row]),
      .row_hi  (hi_q[row]),
      .data    (rdata[p]),
      .reg_num (rreg[p])
    );
  end
endmodule
