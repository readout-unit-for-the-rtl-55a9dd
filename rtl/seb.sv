// seb: subevent buffer, the dual-port memory between the merger and the eventbuilder interface.
//
// One 64-bit memory of WORDS words (1 MByte at the default). The low DATA_WORDS words hold the
// stored blocks as circular buffer; the top WORDS - DATA_WORDS words hold the pointer directory,
// also used circularly. Port A is written by the merger, port B is read by the eventbuilder
// interface (which also serves memory-like reads from the host and the network side).
//
// Timing: a write on port A takes effect at the clock edge; a read on port B returns the word in
// b_q one cycle after b_en, and b_q holds its value while b_en is low. A read and a write to the
// same address in one cycle return the old word.
//
// The 1 MByte size and the 64-bit width follow the document; the split between data and
// directory is set by the users of the buffer.
module seb #(
  parameter int unsigned WORDS = 131072,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: write
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [63:0]   a_data,
  // port B: read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [63:0]   b_q
);
  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_data;
  end

  always_ff @(posedge clk) begin
    if (b_en) b_q <= mem[b_addr];
  end

endmodule
