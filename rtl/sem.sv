// sem: subevent merger, the input stage of the Readout Unit.
//
// Scans the input FIFOs round-robin. A FIFO is served when it holds a whole block (or is nearly
// full and has stopped its link, so that a block longer than the FIFO cannot lock it). The merger then copies that block, one
// 64-bit FIFO entry per cycle, to the next free words of the data region of the subevent buffer,
// and afterwards writes one directory entry for it: event number (from header word 0), link,
// status (from the trailer), length in 32-bit words and start address. The status gets
// STAT_SIZE_MISMATCH set when the trailer's size field differs from the words received.
//
// Both regions are circular buffers. The eventbuilder interface returns space by moving
// data_tail and dir_tail; no garbage collection is needed. A block is never started without a
// free directory slot, and a data word is never written without a free data word (the merger
// waits instead). link_xoff, the Xon/Xoff return signal to the links, rises when fewer than
// XOFF_FREE data words or XOFF_DIR directory slots are free and falls again only above
// XON_FREE data words, so that in normal running the buffer does not fill.
//
// Interface: one cycle per 64-bit word, 64 bits per clock (400 MByte/s at 50 MHz). dir_wr pulses
// in the cycle a directory entry is written, with the entry on dir_wr_entry.
//
// From the document: round-robin scan, block transfer to a dual-port buffer, directory entry
// after each block, circular buffers, Xon/Xoff. The thresholds, the directory format and the
// whole-block rule are this design's choices.
module sem
  import ru_pkg::*;
#(
  parameter int unsigned N_LINKS   = 4,
  parameter int unsigned SEB_WORDS = 131072,   // 64-bit words, 1 MByte
  parameter int unsigned DIR_WORDS = 4096,     // directory slots at the top of the buffer
  parameter int unsigned XOFF_FREE = 16384,    // data words
  parameter int unsigned XON_FREE  = 32768,    // data words
  parameter int unsigned XOFF_DIR  = 64,       // directory slots
  localparam int unsigned AW       = $clog2(SEB_WORDS),
  localparam int unsigned DIRAW    = $clog2(DIR_WORDS),
  localparam int unsigned DATA_WORDS = SEB_WORDS - DIR_WORDS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_LINKS-1:0]    link_enable,
  // input FIFOs
  input  fifo_entry_t           fifo_entry  [N_LINKS],
  input  logic [N_LINKS-1:0]    fifo_empty,
  input  logic [N_LINKS-1:0]    fifo_afull,
  input  logic [15:0]           fifo_blocks [N_LINKS],
  output logic [N_LINKS-1:0]    fifo_rd,
  // subevent buffer, write port
  output logic                  seb_we,
  output logic [AW-1:0]         seb_addr,
  output logic [63:0]           seb_data,
  // space returned by the eventbuilder interface
  input  logic [AW-1:0]         data_tail,
  input  logic [DIRAW-1:0]      dir_tail,
  // directory head and new entries
  output logic [DIRAW-1:0]      dir_head,
  output logic                  dir_wr,
  output dir_entry_t            dir_wr_entry,
  // flow control and status
  output logic                  link_xoff,
  output logic [AW-1:0]         data_used,
  output logic [DIRAW:0]        dir_used,
  output logic [31:0]           blocks_stored
);
  typedef enum logic [1:0] {S_SCAN, S_XFER, S_DIR} state_t;
  state_t state;

  localparam int unsigned LW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;

  logic [LW-1:0]     rr;       // next link to look at first
  logic [LW-1:0]     cur;      // link being transferred
  logic [AW-1:0]     wr;       // next data word
  logic [AW-1:0]     blk_addr; // first word of the current block
  logic [SIZE_W:0]   cnt32;    // 32-bit words received, saturating
  logic [EVT_W-1:0]  blk_evt;
  logic [31:0]       blk_trl;

  logic [AW-1:0]     data_free;
  logic [DIRAW-1:0]  dir_diff;
  logic              dir_full_n;
  logic              data_room;

  always_comb begin
    data_used = (wr >= data_tail) ? (wr - data_tail) : AW'(DATA_WORDS - 32'(data_tail) + 32'(wr));
    data_free = AW'(DATA_WORDS - 1) - data_used;
    dir_diff  = dir_head - dir_tail;
    dir_used  = {1'b0, dir_diff};
    dir_full_n = (dir_used < (DIRAW+1)'(DIR_WORDS - 1));
    data_room = (data_free != '0);
  end

  // round-robin choice of the next link holding a whole block
  logic          found;
  logic [LW-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = rr;
    for (int k = 0; k < N_LINKS; k++) begin
      automatic int unsigned idx = (32'(rr) + k) % N_LINKS;
      if (!found && link_enable[idx] && !fifo_empty[idx] &&
          (fifo_blocks[idx] != 16'd0 || fifo_afull[idx])) begin
        found = 1'b1;
        pick  = LW'(idx);
      end
    end
  end

  fifo_entry_t ent;
  logic        xfer_go;
  assign ent     = fifo_entry[cur];
  assign xfer_go = (state == S_XFER) && !fifo_empty[cur] && data_room;

  always_comb begin
    fifo_rd  = '0;
    seb_we   = 1'b0;
    seb_addr = wr;
    seb_data = {ent.hi, ent.lo};
    dir_wr   = 1'b0;
    dir_wr_entry = '0;
    if (xfer_go) begin
      fifo_rd[cur] = 1'b1;
      seb_we       = 1'b1;
    end
    if (state == S_DIR) begin
      seb_we   = 1'b1;
      seb_addr = AW'(DATA_WORDS) + AW'(dir_head);
      dir_wr   = 1'b1;
      dir_wr_entry.evt    = blk_evt;
      dir_wr_entry.link   = LINK_W'(cur);
      dir_wr_entry.status = trl_status(blk_trl);
      if (cnt32 != {1'b0, trl_size(blk_trl)})
        dir_wr_entry.status[STAT_SIZE_MISMATCH] = 1'b1;
      dir_wr_entry.len    = cnt32[SIZE_W] ? '1 : cnt32[SIZE_W-1:0];
      dir_wr_entry.addr   = 17'(blk_addr);
      seb_data = 64'(dir_wr_entry);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_SCAN;
      rr       <= '0;
      cur      <= '0;
      wr       <= '0;
      blk_addr <= '0;
      cnt32    <= '0;
      blk_evt  <= '0;
      blk_trl  <= '0;
      dir_head <= '0;
      blocks_stored <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (found && dir_full_n) begin
            cur      <= pick;
            blk_addr <= wr;
            cnt32    <= '0;
            state    <= S_XFER;
          end
        end
        S_XFER: begin
          if (xfer_go) begin
            wr <= (wr == AW'(DATA_WORDS - 1)) ? '0 : wr + 1'b1;
            if (!cnt32[SIZE_W])
              cnt32 <= cnt32 + (SIZE_W+1)'(ent.hi_valid ? 2 : 1);
            if (ent.first) blk_evt <= hdr_evt(ent.lo);
            if (ent.last) begin
              blk_trl <= ent.hi_valid ? ent.hi : ent.lo;
              state   <= S_DIR;
            end
          end
        end
        S_DIR: begin
          dir_head      <= (dir_head == DIRAW'(DIR_WORDS - 1)) ? '0 : dir_head + 1'b1;
          rr            <= (cur == LW'(N_LINKS - 1)) ? '0 : cur + 1'b1;
          blocks_stored <= blocks_stored + 32'd1;
          state         <= S_SCAN;
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  // Xon/Xoff with hysteresis
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link_xoff <= 1'b0;
    else if (32'(data_free) < XOFF_FREE || (32'(DIR_WORDS) - 32'(dir_used)) < XOFF_DIR)
      link_xoff <= 1'b1;
    else if (32'(data_free) >= XON_FREE && (32'(DIR_WORDS) - 32'(dir_used)) >= 2*XOFF_DIR)
      link_xoff <= 1'b0;
  end

endmodule
