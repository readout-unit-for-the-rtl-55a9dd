// slink_out_mux: output multiplexer of the Readout Unit.
//
// In normal operation complete subevents leave either through the PCI output (cfg_to_slink = 0)
// or, as one block, through the S-Link transmitter (cfg_to_slink = 1). On the S-Link the control
// flag marks header word 0 and the trailer, as on the inputs. With cfg_bypass = 1 the words of
// input link cfg_bypass_link are also copied unchanged, one cycle later, to the S-Link
// transmitter, and the transmitter's link-full flag is returned to that link as bypass_xoff;
// subevents then go to PCI.
//
// Interface: the subevent side is valid/ready; the PCI side is valid/ready; the S-Link side is a
// write strobe with a link-full return (slink_lff), which holds the subevent stream.
// The bypass path and the choice between PCI and S-Link follow the document; the selection by
// configuration bits and the registered bypass are this design's choices.
module slink_out_mux
  import ru_pkg::*;
#(
  parameter int unsigned N_LINKS = 4,
  localparam int unsigned LW     = (N_LINKS > 1) ? $clog2(N_LINKS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_to_slink,
  input  logic               cfg_bypass,
  input  logic [LW-1:0]      cfg_bypass_link,
  // subevents from the eventbuilder interface
  input  logic               sev_valid,
  input  sev_word_t          sev_word,
  output logic               sev_ready,
  // towards the PCI packer
  output logic               pci_valid,
  output sev_word_t          pci_word,
  input  logic               pci_ready,
  // raw input links, for the bypass
  input  logic [31:0]        link_data [N_LINKS],
  input  logic [N_LINKS-1:0] link_ctrl,
  input  logic [N_LINKS-1:0] link_wen,
  output logic [N_LINKS-1:0] bypass_xoff,
  // S-Link transmitter
  output logic [31:0]        slink_data,
  output logic               slink_ctrl,
  output logic               slink_wen,
  input  logic               slink_lff
);
  logic sev_to_slink;
  assign sev_to_slink = cfg_to_slink && !cfg_bypass;

  always_comb begin
    pci_valid = sev_valid && !sev_to_slink;
    pci_word  = sev_word;
    sev_ready = sev_to_slink ? !slink_lff : pci_ready;
    bypass_xoff = '0;
    if (cfg_bypass) bypass_xoff[cfg_bypass_link] = slink_lff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slink_data <= '0;
      slink_ctrl <= 1'b0;
      slink_wen  <= 1'b0;
    end else if (cfg_bypass) begin
      slink_data <= link_data[cfg_bypass_link];
      slink_ctrl <= link_ctrl[cfg_bypass_link];
      slink_wen  <= link_wen[cfg_bypass_link];
    end else begin
      slink_data <= sev_word.data;
      slink_ctrl <= sev_word.sop || sev_word.eop;
      slink_wen  <= sev_to_slink && sev_valid && !slink_lff;
    end
  end

endmodule
