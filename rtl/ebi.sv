// ebi: eventbuilder interface, the output stage of the Readout Unit.
//
// Builds subevents from the blocks in the subevent buffer. The oldest directory entry not yet
// used names the next event E. Once every enabled link has stored a block of a later event (or
// `flush` is high), all blocks of E are in the buffer and E is built, however the blocks were
// spread in time and however many blocks of E one link sent. The subevent is framed
// recursively, like an input block: header words 0 and 1 of the first block of E, then the data
// words of every block of E in directory order (each block's own header and trailer removed),
// then, only if any block has a nonzero status, an error block of one word per block
// ({link[31:30], status[29:18], size[17:6], 6'b0}), and finally a new trailer with the
// recalculated size (all words of the subevent) and the OR of the block statuses.
//
// Readout protocols:
//   full   (cfg_phased = 0): every event is sent as one subevent, then its blocks are released.
//   phased (cfg_phased = 1): first a subevent made of the blocks of the links in cfg_l2_mask is
//          sent for the level-2 decision; E then waits in the buffer for a decision message
//          (dec_valid, dec_accept). Accept sends a further subevent with the blocks of the other
//          links; reject sends nothing. Either way the blocks are then released.
// While waiting (for a complete event or for a decision) the buffer can be read like memory
// through host_req/host_addr; host_ack pulses with the word on host_data.
//
// Released blocks are marked in a bitmap; the directory tail, and with it the data tail, moves
// over marked entries in order, so both regions stay circular buffers.
//
// Timing: SEB port B reads take one cycle. Payload words leave at one 32-bit word per cycle
// (out_valid/out_ready handshake); a directory entry takes two cycles per scan. The scans stop
// early: the first scan ends as soon as every enabled link has shown a block of a later event
// (each link delivers its events in order, so no block of E can follow), and the later scans
// end at the same entry. The work per event thus depends on how far the links drift apart,
// not on how full the buffer is.
//
// From the document: subevents by event number, recursive framing with the same header, the
// recalculated size and status trailer, the error block only on errors, full and phased
// readout with accept/reject, memory-like access. The completion rule, the scan order, the
// error block layout and the decision interface are this design's choices.
module ebi
  import ru_pkg::*;
#(
  parameter int unsigned N_LINKS   = 4,
  parameter int unsigned SEB_WORDS = 131072,
  parameter int unsigned DIR_WORDS = 4096,
  localparam int unsigned AW       = $clog2(SEB_WORDS),
  localparam int unsigned DIRAW    = $clog2(DIR_WORDS),
  localparam int unsigned DATA_WORDS = SEB_WORDS - DIR_WORDS
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_phased,
  input  logic [N_LINKS-1:0]  cfg_l2_mask,
  input  logic [N_LINKS-1:0]  link_enable,
  input  logic                flush,
  // directory state from the merger
  input  logic [DIRAW-1:0]    dir_head,
  input  logic                dir_wr,
  input  dir_entry_t          dir_wr_entry,
  // subevent buffer, read port
  output logic                seb_en,
  output logic [AW-1:0]       seb_addr,
  input  logic [63:0]         seb_q,
  // space given back
  output logic [AW-1:0]       data_tail,
  output logic [DIRAW-1:0]    dir_tail,
  // subevent word stream
  output logic                out_valid,
  output sev_word_t           out_word,
  input  logic                out_ready,
  // level-2 decisions (phased readout)
  input  logic                dec_valid,
  input  logic                dec_accept,
  output logic                dec_ready,
  // memory-like access to the buffer
  input  logic                host_req,
  input  logic [AW-1:0]       host_addr,
  output logic                host_ack,
  output logic [63:0]         host_data,
  // status
  output logic [31:0]         sev_sent,
  output logic [31:0]         evt_accepted,
  output logic [31:0]         evt_rejected,
  output logic [31:0]         evt_flushed
);
  typedef enum logic [4:0] {
    S_IDLE, S_HOST, S_RECL, S_FIND, S_FIND_W, S_WAIT,
    S_SCAN1, S_SCAN1_W, S_HDR0, S_HDR1, S_HDR2,
    S_SCAN2, S_SCAN2_W, S_PAY, S_SCAN3, S_SCAN3_W, S_TRL,
    S_DEC, S_MARK, S_MARK_W
  } state_t;

  state_t state, ret_state;

  logic [DIR_WORDS-1:0]  consumed;
  logic [EVT_W-1:0]      last_evt [N_LINKS];
  logic [N_LINKS-1:0]    seen;

  logic [DIRAW-1:0]      ptr;       // scan pointer
  logic [DIRAW-1:0]      p0;        // first entry of the event
  logic [DIRAW-1:0]      scan_end;  // entry after the last one that can hold the event
  logic [N_LINKS-1:0]    passed;    // links met with a later event during the first scan
  logic [EVT_W-1:0]      cur_evt;
  logic [AW-1:0]         hdr_addr;
  logic [N_LINKS-1:0]    mask;
  logic                  release_ok;

  logic [15:0]           paysum;
  logic [STAT_W-1:0]     stat_or;
  logic [SIZE_W-1:0]     nfrag;

  // payload word reader
  logic [AW-1:0]         fbase;
  logic [SIZE_W-1:0]     cur, lastw;
  logic                  rd_pending, buf_ok;
  logic [63:0]           rbuf;

  dir_entry_t            q_ent;
  assign q_ent = dir_entry_t'(seb_q[62:0]);

  function automatic logic [AW-1:0] dir_addr(input logic [DIRAW-1:0] p);
    return AW'(DATA_WORDS) + AW'(p);
  endfunction

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] base, input logic [SIZE_W-1:0] off);
    logic [AW:0] s;
    s = {1'b0, base} + (AW+1)'(off);
    if (s >= (AW+1)'(DATA_WORDS)) s = s - (AW+1)'(DATA_WORDS);
    return s[AW-1:0];
  endfunction

  // an event is complete once every enabled link has moved past it
  logic complete;
  always_comb begin
    complete = 1'b1;
    for (int l = 0; l < N_LINKS; l++)
      if (link_enable[l] && !(seen[l] && evt_after(last_evt[l], cur_evt)))
        complete = 1'b0;
  end

  logic match;
  assign match = (q_ent.evt == cur_evt) && !consumed[ptr] && mask[q_ent.link];

  logic [15:0] sev_size;
  assign sev_size = 16'd3 + paysum + ((stat_or != '0) ? 16'(nfrag) : 16'd0);

  logic [31:0] err_word;
  assign err_word = {q_ent.link, q_ent.status, q_ent.len, 6'b0};

  logic [63:0] pay_data;
  logic        pay_have;
  assign pay_data = rd_pending ? seb_q : rbuf;
  assign pay_have = rd_pending || buf_ok;

  logic [SIZE_W-1:0] cur_n;
  assign cur_n = cur + 1'b1;

  // combinational outputs: buffer reads, stream words, handshakes
  always_comb begin
    seb_en    = 1'b0;
    seb_addr  = dir_addr(ptr);
    out_valid = 1'b0;
    out_word  = '0;
    dec_ready = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (host_req) begin
          seb_en = 1'b1; seb_addr = host_addr;
        end else if (dir_tail != dir_head && consumed[dir_tail]) begin
          seb_en = 1'b1; seb_addr = dir_addr(dir_tail);
        end
      end
      S_WAIT, S_DEC: begin
        if (host_req) begin
          seb_en = 1'b1; seb_addr = host_addr;
        end
        dec_ready = (state == S_DEC) && !host_req;
      end
      S_FIND, S_SCAN1, S_SCAN2, S_SCAN3, S_MARK: begin
        seb_en = (ptr != dir_head) && !consumed[ptr];
      end
      S_HDR0: begin
        seb_en = 1'b1; seb_addr = hdr_addr;
      end
      S_HDR1: begin
        out_valid = 1'b1;
        out_word  = '{sop: 1'b1, eop: 1'b0, data: seb_q[31:0]};
      end
      S_HDR2: begin
        out_valid = 1'b1;
        out_word  = '{sop: 1'b0, eop: 1'b0, data: seb_q[63:32]};
      end
      S_PAY: begin
        out_valid = pay_have;
        out_word  = '{sop: 1'b0, eop: 1'b0, data: cur[0] ? pay_data[63:32] : pay_data[31:0]};
        if (!pay_have) begin
          seb_en = 1'b1; seb_addr = wrap_add(fbase, cur >> 1);
        end else if (out_ready && cur[0] && cur != lastw) begin
          seb_en = 1'b1; seb_addr = wrap_add(fbase, cur_n >> 1);
        end
      end
      S_SCAN3_W: begin
        out_valid = match;
        out_word  = '{sop: 1'b0, eop: 1'b0, data: err_word};
      end
      S_TRL: begin
        out_valid = 1'b1;
        out_word  = '{sop: 1'b0, eop: 1'b1,
                      data: make_trailer((sev_size > 16'hFFF) ? '1 : sev_size[SIZE_W-1:0], stat_or)};
      end
      default: ;
    endcase
  end

  // link progress, seen by the completion rule
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen <= '0;
      for (int l = 0; l < N_LINKS; l++) last_evt[l] <= '0;
    end else if (dir_wr) begin
      seen[dir_wr_entry.link]     <= 1'b1;
      last_evt[dir_wr_entry.link] <= dir_wr_entry.evt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ret_state   <= S_IDLE;
      consumed    <= '0;
      ptr         <= '0;
      p0          <= '0;
      scan_end    <= '0;
      passed      <= '0;
      cur_evt     <= '0;
      hdr_addr    <= '0;
      mask        <= '0;
      release_ok  <= 1'b0;
      paysum      <= '0;
      stat_or     <= '0;
      nfrag       <= '0;
      fbase       <= '0;
      cur         <= '0;
      lastw       <= '0;
      rd_pending  <= 1'b0;
      buf_ok      <= 1'b0;
      rbuf        <= '0;
      data_tail   <= '0;
      dir_tail    <= '0;
      host_ack    <= 1'b0;
      host_data   <= '0;
      sev_sent    <= '0;
      evt_accepted <= '0;
      evt_rejected <= '0;
      evt_flushed <= '0;
    end else begin
      host_ack <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (host_req) begin
            ret_state <= S_IDLE;
            state     <= S_HOST;
          end else if (dir_tail != dir_head && consumed[dir_tail]) begin
            state <= S_RECL;
          end else if (dir_tail != dir_head) begin
            ptr   <= dir_tail;
            state <= S_FIND;
          end
        end
        S_HOST: begin
          host_ack  <= 1'b1;
          host_data <= seb_q;
          state     <= ret_state;
        end
        S_RECL: begin
          data_tail <= wrap_add(q_ent.addr[AW-1:0], (q_ent.len + 1'b1) >> 1);
          consumed[dir_tail] <= 1'b0;
          dir_tail  <= dir_tail + 1'b1;
          state     <= S_IDLE;
        end
        S_FIND: begin
          if (ptr == dir_head)       state <= S_IDLE;
          else if (consumed[ptr])    ptr   <= ptr + 1'b1;
          else                       state <= S_FIND_W;
        end
        S_FIND_W: begin
          cur_evt  <= q_ent.evt;
          p0       <= ptr;
          hdr_addr <= q_ent.addr[AW-1:0];
          state    <= S_WAIT;
        end
        S_WAIT: begin
          if (host_req) begin
            ret_state <= S_WAIT;
            state     <= S_HOST;
          end else if (complete || flush) begin
            if (!complete) evt_flushed <= evt_flushed + 32'd1;
            mask      <= cfg_phased ? cfg_l2_mask : '1;
            release_ok <= !cfg_phased;
            ptr       <= p0;
            passed    <= '0;
            paysum    <= '0;
            stat_or   <= '0;
            nfrag     <= '0;
            state     <= S_SCAN1;
          end
        end
        // first scan: size and status of the subevent
        S_SCAN1: begin
          if (ptr == dir_head || (ptr != p0 && (link_enable & ~passed) == '0)) begin
            scan_end <= ptr;
            state    <= S_HDR0;
          end
          else if (consumed[ptr])    ptr   <= ptr + 1'b1;
          else                       state <= S_SCAN1_W;
        end
        S_SCAN1_W: begin
          if (evt_after(q_ent.evt, cur_evt)) passed[q_ent.link] <= 1'b1;
          if (match) begin
            nfrag   <= nfrag + 1'b1;
            paysum  <= paysum + ((q_ent.len > 12'd3) ? 16'(q_ent.len - 12'd3) : 16'd0);
            stat_or <= stat_or | q_ent.status;
          end
          ptr   <= ptr + 1'b1;
          state <= S_SCAN1;
        end
        S_HDR0: state <= S_HDR1;
        S_HDR1: if (out_ready) state <= S_HDR2;
        S_HDR2: if (out_ready) begin
          ptr   <= p0;
          state <= S_SCAN2;
        end
        S_SCAN2: begin
          if (ptr == scan_end) begin
            ptr   <= p0;
            state <= (stat_or != '0) ? S_SCAN3 : S_TRL;
          end
          else if (consumed[ptr])    ptr   <= ptr + 1'b1;
          else                       state <= S_SCAN2_W;
        end
        S_SCAN2_W: begin
          if (match && q_ent.len > 12'd3) begin
            fbase      <= q_ent.addr[AW-1:0];
            cur        <= 12'd2;
            lastw      <= q_ent.len - 12'd2;
            rd_pending <= 1'b0;
            buf_ok     <= 1'b0;
            state      <= S_PAY;
          end else begin
            ptr   <= ptr + 1'b1;
            state <= S_SCAN2;
          end
        end
        S_PAY: begin
          rd_pending <= seb_en;
          if (rd_pending) begin
            rbuf   <= seb_q;
            buf_ok <= 1'b1;
          end
          if (pay_have && out_ready) begin
            cur <= cur_n;
            if (cur[0]) buf_ok <= 1'b0;
            if (cur == lastw) begin
              buf_ok <= 1'b0;
              ptr    <= ptr + 1'b1;
              state  <= S_SCAN2;
            end
          end
        end
        // third scan: error block
        S_SCAN3: begin
          if (ptr == scan_end)       state <= S_TRL;
          else if (consumed[ptr])    ptr   <= ptr + 1'b1;
          else                       state <= S_SCAN3_W;
        end
        S_SCAN3_W: begin
          if (!match || out_ready) begin
            ptr   <= ptr + 1'b1;
            state <= S_SCAN3;
          end
        end
        S_TRL: begin
          if (out_ready) begin
            sev_sent <= sev_sent + 32'd1;
            ptr      <= p0;
            state    <= release_ok ? S_MARK : S_DEC;
          end
        end
        S_DEC: begin
          if (host_req) begin
            ret_state <= S_DEC;
            state     <= S_HOST;
          end else if (dec_valid) begin
            if (dec_accept) begin
              evt_accepted <= evt_accepted + 32'd1;
              mask       <= ~cfg_l2_mask;
              release_ok <= 1'b1;
              ptr        <= p0;
              passed     <= '0;
              paysum     <= '0;
              stat_or    <= '0;
              nfrag      <= '0;
              state      <= S_SCAN1;
            end else begin
              evt_rejected <= evt_rejected + 32'd1;
              ptr          <= p0;
              state        <= S_MARK;
            end
          end
        end
        // release every block of the event
        S_MARK: begin
          if (ptr == scan_end)       state <= S_IDLE;
          else if (consumed[ptr])    ptr   <= ptr + 1'b1;
          else                       state <= S_MARK_W;
        end
        S_MARK_W: begin
          if (q_ent.evt == cur_evt) consumed[ptr] <= 1'b1;
          ptr   <= ptr + 1'b1;
          state <= S_MARK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
