// ru_pkg: types and constants shared by the Readout Unit blocks.
//
// Word formats (32-bit link words, S-Link style, one control flag per word):
//   header word 0 (flag = 1) : [31:12] event number, [11:4] free for the source, [3:0] S-Link bits
//   header word 1 (flag = 0) : carried through unchanged (source / format information)
//   data words    (flag = 0) : opaque payload, never interpreted
//   trailer word  (flag = 1) : [31:20] block size in 32-bit words, framing included,
//                              [19:8] error status, [7:4] zero, [3:0] S-Link bits
// Two header words and one trailer word, the event number in the header word and the size and
// status in the trailer with the four low bits left to S-Link follow the link format of the
// Readout Unit; the exact field positions and widths are this design's choice.
//
// A directory entry (one 64-bit word of the subevent buffer) points at one stored block.
package ru_pkg;

  localparam int unsigned EVT_W    = 20;   // event number width
  localparam int unsigned SIZE_W   = 12;   // size field width (32-bit words)
  localparam int unsigned STAT_W   = 12;   // status field width
  localparam int unsigned LINK_W   = 2;    // link index width (four links)

  // status bit set by the merger when a trailer's size does not match the words received
  localparam int unsigned STAT_SIZE_MISMATCH = 11;

  // one 64-bit entry of an input FIFO: two 32-bit link words
  typedef struct packed {
    logic        first;    // entry holds header word 0 of a block in its low half
    logic        last;     // entry holds the trailer of the block
    logic        hi_valid; // high half holds a word
    logic [31:0] hi;       // odd word of the block
    logic [31:0] lo;       // even word of the block
  } fifo_entry_t;

  // one directory entry, 63 bits used of the 64-bit buffer word
  typedef struct packed {
    logic [EVT_W-1:0]  evt;    // event number of the block
    logic [LINK_W-1:0] link;   // link the block came from
    logic [STAT_W-1:0] status; // status from the trailer, plus the merger's own checks
    logic [SIZE_W-1:0] len;    // number of 32-bit words of the block, framing included
    logic [16:0]       addr;   // 64-bit word address of header word 0 in the data region
  } dir_entry_t;

  // one word of the 32-bit subevent stream
  typedef struct packed {
    logic        sop;   // header word 0
    logic        eop;   // trailer word
    logic [31:0] data;
  } sev_word_t;

  function automatic logic [31:0] make_trailer(input logic [SIZE_W-1:0] size,
                                               input logic [STAT_W-1:0] status);
    return {size, status, 8'h00};
  endfunction

  function automatic logic [EVT_W-1:0] hdr_evt(input logic [31:0] w);
    return w[31:32-EVT_W];
  endfunction

  function automatic logic [SIZE_W-1:0] trl_size(input logic [31:0] w);
    return w[31:32-SIZE_W];
  endfunction

  function automatic logic [STAT_W-1:0] trl_status(input logic [31:0] w);
    return w[32-SIZE_W-1 -: STAT_W];
  endfunction

  // serial-number compare: a is later than b (event numbers wrap around)
  function automatic logic evt_after(input logic [EVT_W-1:0] a, input logic [EVT_W-1:0] b);
    logic [EVT_W-1:0] d;
    d = a - b;
    return (d != '0) && !d[EVT_W-1];
  endfunction

endpackage
