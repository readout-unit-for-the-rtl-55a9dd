// out_packer: 32-to-64-bit packer between the subevent stream and the 64-bit PCI master.
//
// The eventbuilder interface produces subevents as 32-bit words (sop on header word 0, eop on
// the trailer). The PCI output bus is 64 bits wide, so pairs of words are packed into one
// 64-bit beat: the earlier word in the low half. A subevent always starts in a new beat; when it
// has an odd number of words its last beat carries only a low half (hi_valid = 0).
//
// Interface: valid/ready on both sides. The output is a register: a beat is offered one cycle
// after its second word arrives. A first (low) word is always taken at once; a word that
// completes a beat waits only while the previous beat is still held, so one word per cycle
// passes as long as the output takes a beat at least every second cycle.
// The PCI bus width follows the document; the packing order and the handshake are this
// design's choices.
module out_packer
  import ru_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sev_word_t   in_word,
  output logic        in_ready,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_hi_valid,
  output logic        out_sop,
  output logic        out_eop,
  input  logic        out_ready,
  output logic [31:0] beats
);
  logic        lo_valid;
  logic        lo_sop;
  logic [31:0] lo_word;
  logic        fire;

  // a word that only fills the low half never waits for the output register
  assign in_ready = !out_valid || out_ready || (!lo_valid && !in_word.eop);
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_valid     <= 1'b0;
      lo_sop       <= 1'b0;
      lo_word      <= '0;
      out_valid    <= 1'b0;
      out_data     <= '0;
      out_hi_valid <= 1'b0;
      out_sop      <= 1'b0;
      out_eop      <= 1'b0;
      beats        <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (lo_valid) begin
          out_valid    <= 1'b1;
          out_data     <= {in_word.data, lo_word};
          out_hi_valid <= 1'b1;
          out_sop      <= lo_sop;
          out_eop      <= in_word.eop;
          lo_valid     <= 1'b0;
          beats        <= beats + 32'd1;
        end else if (in_word.eop) begin
          out_valid    <= 1'b1;
          out_data     <= {32'h0, in_word.data};
          out_hi_valid <= 1'b0;
          out_sop      <= in_word.sop;
          out_eop      <= 1'b1;
          beats        <= beats + 32'd1;
        end else begin
          lo_valid <= 1'b1;
          lo_sop   <= in_word.sop;
          lo_word  <= in_word.data;
        end
      end
    end
  end

  // a beat on the output is never dropped
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
