// link_fifo: input FIFO of one front-end link.
//
// Takes 32-bit words from an S-Link receiver (data, control flag, write strobe), derandomizes
// them and hands them to the subevent merger as 64-bit entries: the even word of a block in the
// low half, the odd word in the high half, so that four links share one 64-bit bus. A control
// word outside a block is header word 0 and opens a block; the next control word is the trailer
// and closes it. A block with an odd number of words ends with an entry whose high half is
// empty. Data words outside a block and words arriving while the FIFO is full are dropped and
// counted.
//
// Interface: the link side writes one word per cycle when link_wen is high and must stop within
// XOFF_MARGIN words after link_xoff rises (the S-Link "link full" return line). The read side is
// show-ahead: rd_entry is valid while !empty and is consumed by rd_en. blocks counts whole
// blocks held, so the merger can wait for a complete block.
//
// The document builds this stage from two interleaved 32-bit FIFOs; here one 64-bit-wide FIFO
// fed by a packing register does the same job. Depth, margin and drop behaviour are this
// design's choices.
module link_fifo
  import ru_pkg::*;
#(
  parameter int unsigned DEPTH       = 512, // 64-bit entries (4 KByte)
  parameter int unsigned XOFF_MARGIN = 8    // entries kept free once link_xoff is raised
) (
  input  logic        clk,
  input  logic        rst_n,
  // S-Link receiver side
  input  logic [31:0] link_data,
  input  logic        link_ctrl,
  input  logic        link_wen,
  output logic        link_xoff,
  // merger side
  input  logic        rd_en,
  output fifo_entry_t rd_entry,
  output logic        empty,
  output logic        full,
  output logic [15:0] blocks,
  output logic [15:0] dropped
);
  localparam int unsigned AW = $clog2(DEPTH);

  fifo_entry_t    mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    count;

  logic           in_block;
  logic           pend_valid;
  logic           pend_first;
  logic [31:0]    pend_lo;

  logic           push;
  fifo_entry_t    push_entry;
  logic           pop;

  assign empty     = (count == '0);
  assign full      = (count == (AW+1)'(DEPTH));
  assign link_xoff = (count >= (AW+1)'(DEPTH - XOFF_MARGIN));
  assign rd_entry  = mem[rd_ptr];
  assign pop       = rd_en && !empty;

  // packing of link words into entries
  always_comb begin
    push       = 1'b0;
    push_entry = '0;
    if (link_wen && in_block) begin
      if (pend_valid) begin
        push       = 1'b1;
        push_entry = '{first: pend_first, last: link_ctrl, hi_valid: 1'b1,
                       hi: link_data, lo: pend_lo};
      end else if (link_ctrl) begin
        push       = 1'b1;
        push_entry = '{first: 1'b0, last: 1'b1, hi_valid: 1'b0, hi: 32'h0, lo: link_data};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_block   <= 1'b0;
      pend_valid <= 1'b0;
      pend_first <= 1'b0;
      pend_lo    <= '0;
      dropped    <= '0;
    end else if (link_wen) begin
      if (full) begin
        dropped <= dropped + 16'd1;
      end else if (!in_block) begin
        if (link_ctrl) begin
          in_block   <= 1'b1;
          pend_valid <= 1'b1;
          pend_first <= 1'b1;
          pend_lo    <= link_data;
        end else begin
          dropped <= dropped + 16'd1;
        end
      end else if (pend_valid) begin
        pend_valid <= 1'b0;
        pend_first <= 1'b0;
        if (link_ctrl) in_block <= 1'b0;
      end else if (link_ctrl) begin
        in_block <= 1'b0;
      end else begin
        pend_valid <= 1'b1;
        pend_lo    <= link_data;
      end
    end
  end

  logic do_push;
  assign do_push = push && !full;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      blocks <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)     rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count  <= count + (AW+1)'(do_push) - (AW+1)'(pop);
      blocks <= blocks + 16'(do_push && push_entry.last) - 16'(pop && rd_entry.last);
    end
  end

endmodule
