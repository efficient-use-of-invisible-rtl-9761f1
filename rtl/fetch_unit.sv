// fetch_unit: instruction fetch for the AX Thumb core. It fetches one aligned
// 32-bit word, two Thumb halfwords, into a two-halfword decode buffer and
// fetches the next word in the same cycle in which decode takes the last
// halfword of the buffer, so the new word is ready for decode on the next
// cycle. With plain Thumb code (one halfword per cycle) a fetch happens every
// second cycle; when decode takes two halfwords per cycle (an AX instruction
// absorbed together with its neighbour) a fetch happens every cycle, so
// coalescing never runs ahead of fetch and adds no bubble.
//
// Interface: imem_addr / imem_req go out in a cycle and imem_rdata must come
// back in that same cycle when imem_ready is high (an instruction-cache hit);
// with imem_ready low the fetch is retried on the next cycle. The buffer shows
// buf_count valid halfwords, the head in buf_data[15:0], and the head's
// address in buf_pc; decode returns how many it takes in consume. A redirect
// (taken branch from execute) empties the buffer and restarts fetch at
// redirect_pc; a target in the upper halfword of a word loads only that half.
//
// The word-wide fetch and its timing follow the published pipeline diagram;
// the memory handshake, redirect and reset address are this design's choices.
module fetch_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_ready,
  input  logic [31:0] imem_rdata,
  // redirect from execute
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  // decode buffer
  output logic [1:0]  buf_count,
  output logic [31:0] buf_data,
  output logic [31:0] buf_pc,
  input  logic [1:0]  consume
);
  logic [31:0] fetch_pc_q;   // word address of the next fetch
  logic        skip_lo_q;    // next fetched word starts at its upper halfword
  logic [1:0]  cnt_q;
  logic [31:0] data_q, pc_q;
  logic [1:0]  left;

  always_comb begin
    left      = cnt_q - consume;
    imem_req  = !redirect && (left == 2'd0);
    imem_addr = fetch_pc_q;
    buf_count = cnt_q;
    buf_data  = data_q;
    buf_pc    = pc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc_q <= {RESET_PC[31:2], 2'b00};
      skip_lo_q  <= RESET_PC[1];
      cnt_q      <= '0;
      data_q     <= '0;
      pc_q       <= RESET_PC;
    end else if (redirect) begin
      fetch_pc_q <= {redirect_pc[31:2], 2'b00};
      skip_lo_q  <= redirect_pc[1];
      cnt_q      <= '0;
      pc_q       <= redirect_pc;
    end else if (imem_req && imem_ready) begin
      fetch_pc_q <= fetch_pc_q + 32'd4;
      skip_lo_q  <= 1'b0;
      if (skip_lo_q) begin
        cnt_q  <= 2'd1;
        data_q <= {16'd0, imem_rdata[31:16]};
        pc_q   <= fetch_pc_q + 32'd2;
      end else begin
        cnt_q  <= 2'd2;
        data_q <= imem_rdata;
        pc_q   <= fetch_pc_q;
      end
    end else begin
      cnt_q  <= left;
      pc_q   <= pc_q + {29'd0, consume, 1'b0};
      if (consume == 2'd1) data_q <= {16'd0, data_q[31:16]};
    end
  end

  // decode never takes more than the buffer holds
  a_consume_le_count: assert property (@(posedge clk) disable iff (!rst_n)
                                       consume <= cnt_q);
endmodule
