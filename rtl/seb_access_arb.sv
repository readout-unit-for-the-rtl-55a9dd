// seb_access_arb: shares the memory-like read port of the subevent buffer between the network
// side (PCI target, 64-bit words) and the monitoring and control processor (32-bit memory bus).
//
// Both requesters use the same protocol: raise req with an address and hold both until ack
// pulses for one cycle with the data. The network side addresses 64-bit words; the processor
// addresses 32-bit words (address bit 0 selects the high half), so the whole buffer appears in
// its local memory space. One request is forwarded at a time. When both wait, the one not
// served last goes first, so neither can starve the other. The forwarded request is removed in
// the cycle the answer arrives, so a requester that drops req on ack is never served twice.
//
// Timing: one cycle from a request to its forwarding, then the buffer port's own latency; the
// answer is passed through combinationally.
// That the processor's 32-bit bus reaches the buffer through the output FPGA follows the
// document; the shared port, the protocol and the alternating priority are this design's
// choices.
module seb_access_arb #(
  parameter int unsigned AW = 17   // 64-bit word address width of the buffer
) (
  input  logic          clk,
  input  logic          rst_n,
  // network side, 64-bit words
  input  logic          net_req,
  input  logic [AW-1:0] net_addr,
  output logic          net_ack,
  output logic [63:0]   net_data,
  // processor side, 32-bit words
  input  logic          mcu_req,
  input  logic [AW:0]   mcu_addr,
  output logic          mcu_ack,
  output logic [31:0]   mcu_data,
  // buffer read port (eventbuilder interface)
  output logic          host_req,
  output logic [AW-1:0] host_addr,
  input  logic          host_ack,
  input  logic [63:0]   host_data
);
  logic busy;
  logic owner;       // 0: network, 1: processor
  logic last_mcu;    // the processor was served last

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      owner    <= 1'b0;
      last_mcu <= 1'b0;
    end else if (!busy) begin
      if (net_req || mcu_req) begin
        busy  <= 1'b1;
        owner <= mcu_req && (!net_req || !last_mcu);
      end
    end else if (host_ack) begin
      busy     <= 1'b0;
      last_mcu <= owner;
    end
  end

  always_comb begin
    host_req  = busy && !host_ack && (owner ? mcu_req : net_req);
    host_addr = owner ? mcu_addr[AW:1] : net_addr;
    net_ack   = busy && host_ack && !owner;
    net_data  = host_data;
    mcu_ack   = busy && host_ack && owner;
    mcu_data  = mcu_addr[0] ? host_data[63:32] : host_data[31:0];
  end

endmodule
