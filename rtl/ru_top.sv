// ru_top: the Readout Unit, an event-builder interface between four front-end links and one
// readout-network node.
//
// Data flow: each link's 32-bit words enter a link_fifo, which packs them into 64-bit entries.
// The subevent merger (sem) takes whole blocks from the four FIFOs round-robin and stores them,
// with one directory entry each, in the subevent buffer (seb, 1 MByte). The eventbuilder
// interface (ebi) gathers all blocks of one event number from the buffer and sends them as one
// recursively framed subevent, either to the PCI output (through out_packer, 64-bit beats) or
// to the S-Link transmitter (slink_out_mux, which can also copy one input link straight to the
// transmitter). The control processor sets the operating mode and reads counters through
// ru_regs. Xon/Xoff: link_xoff[i] rises when link i's FIFO is nearly full, when the buffer is
// nearly full, or, in bypass, when the S-Link transmitter is full.
//
// Outside this module, and reached through its ports: the S-Link receiver cards (link_*), the
// PCI master/target core and network interface (pci_*, dec_*, host_*), the S-Link transmitter
// card (slink_*), the control processor's local bus (reg_*) and its 32-bit memory bus, through
// which it reads the buffer (mcu_*; seb_access_arb shares the buffer's read port).
//
// Timing: one clock for everything (50 MHz in the document's board); the merger moves 64 bits
// per cycle, the eventbuilder interface 32 bits per cycle.
module ru_top
  import ru_pkg::*;
#(
  parameter int unsigned SEB_WORDS  = 131072,  // 1 MByte of 64-bit words
  parameter int unsigned DIR_WORDS  = 4096,    // directory slots
  parameter int unsigned FIFO_DEPTH = 512,     // 64-bit entries per input FIFO
  parameter int unsigned XOFF_FREE  = 16384,
  parameter int unsigned XON_FREE   = 32768,
  parameter int unsigned XOFF_DIR   = 64,
  localparam int unsigned N_LINKS   = 4,
  localparam int unsigned AW        = $clog2(SEB_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // S-Link receivers
  input  logic [31:0]        link_data [N_LINKS],
  input  logic [N_LINKS-1:0] link_ctrl,
  input  logic [N_LINKS-1:0] link_wen,
  output logic [N_LINKS-1:0] link_xoff,
  // PCI master core (64-bit output beats)
  output logic               pci_valid,
  output logic [63:0]        pci_data,
  output logic               pci_hi_valid,
  output logic               pci_sop,
  output logic               pci_eop,
  input  logic               pci_ready,
  // level-2 decisions from the readout network (phased readout)
  input  logic               dec_valid,
  input  logic               dec_accept,
  output logic               dec_ready,
  // memory-like access to the subevent buffer: network side (PCI target, 64-bit words)
  input  logic               host_req,
  input  logic [AW-1:0]      host_addr,
  output logic               host_ack,
  output logic [63:0]        host_data,
  // memory-like access to the subevent buffer: processor memory bus (32-bit words)
  input  logic               mcu_req,
  input  logic [AW:0]        mcu_addr,
  output logic               mcu_ack,
  output logic [31:0]        mcu_data,
  // S-Link transmitter
  output logic [31:0]        slink_data,
  output logic               slink_ctrl,
  output logic               slink_wen,
  input  logic               slink_lff,
  // control processor local bus
  input  logic [7:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  input  logic               reg_we,
  input  logic               reg_re,
  output logic [31:0]        reg_rdata
);
  localparam int unsigned DIRAW = $clog2(DIR_WORDS);

  // configuration
  logic       cfg_phased, cfg_to_slink, cfg_bypass, cfg_flush;
  logic [1:0] cfg_bypass_link;
  logic [3:0] cfg_link_enable, cfg_l2_mask;

  // input FIFOs
  fifo_entry_t          f_entry  [N_LINKS];
  logic [N_LINKS-1:0]   f_empty, f_full, f_xoff, f_rd;
  logic [15:0]          f_blocks [N_LINKS];
  logic [15:0]          f_dropped [N_LINKS];

  for (genvar i = 0; i < N_LINKS; i++) begin : g_fifo
    link_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .link_data (link_data[i]),
      .link_ctrl (link_ctrl[i]),
      .link_wen  (link_wen[i]),
      .link_xoff (f_xoff[i]),
      .rd_en     (f_rd[i]),
      .rd_entry  (f_entry[i]),
      .empty     (f_empty[i]),
      .full      (f_full[i]),
      .blocks    (f_blocks[i]),
      .dropped   (f_dropped[i])
    );
  end

  // merger
  logic                 a_we;
  logic [AW-1:0]        a_addr;
  logic [63:0]          a_data;
  logic [AW-1:0]        data_tail, data_used;
  logic [DIRAW-1:0]     dir_tail, dir_head;
  logic [DIRAW:0]       dir_used;
  logic                 dir_wr;
  dir_entry_t           dir_wr_entry;
  logic                 sem_xoff;
  logic [31:0]          blocks_stored;

  sem #(
    .N_LINKS(N_LINKS), .SEB_WORDS(SEB_WORDS), .DIR_WORDS(DIR_WORDS),
    .XOFF_FREE(XOFF_FREE), .XON_FREE(XON_FREE), .XOFF_DIR(XOFF_DIR)
  ) u_sem (
    .clk, .rst_n,
    .link_enable  (cfg_link_enable),
    .fifo_entry   (f_entry),
    .fifo_empty   (f_empty),
    .fifo_afull   (f_xoff),
    .fifo_blocks  (f_blocks),
    .fifo_rd      (f_rd),
    .seb_we       (a_we),
    .seb_addr     (a_addr),
    .seb_data     (a_data),
    .data_tail, .dir_tail, .dir_head,
    .dir_wr, .dir_wr_entry,
    .link_xoff    (sem_xoff),
    .data_used, .dir_used, .blocks_stored
  );

  // subevent buffer
  logic          b_en;
  logic [AW-1:0] b_addr;
  logic [63:0]   b_q;

  seb #(.WORDS(SEB_WORDS)) u_seb (
    .clk,
    .a_we, .a_addr, .a_data,
    .b_en, .b_addr, .b_q
  );

  // eventbuilder interface
  logic        sev_valid, sev_ready;
  sev_word_t   sev_word;
  logic [31:0] sev_sent, evt_accepted, evt_rejected, evt_flushed;

  // the network side and the processor share the buffer's memory-like read port
  logic          m_req, m_ack;
  logic [AW-1:0] m_addr;
  logic [63:0]   m_data;
  seb_access_arb #(.AW(AW)) u_arb (
    .clk, .rst_n,
    .net_req (host_req), .net_addr (host_addr), .net_ack (host_ack), .net_data (host_data),
    .mcu_req, .mcu_addr, .mcu_ack, .mcu_data,
    .host_req (m_req), .host_addr (m_addr), .host_ack (m_ack), .host_data (m_data)
  );

  ebi #(.N_LINKS(N_LINKS), .SEB_WORDS(SEB_WORDS), .DIR_WORDS(DIR_WORDS)) u_ebi (
    .clk, .rst_n,
    .cfg_phased, .cfg_l2_mask,
    .link_enable (cfg_link_enable),
    .flush       (cfg_flush),
    .dir_head, .dir_wr, .dir_wr_entry,
    .seb_en      (b_en),
    .seb_addr    (b_addr),
    .seb_q       (b_q),
    .data_tail, .dir_tail,
    .out_valid   (sev_valid),
    .out_word    (sev_word),
    .out_ready   (sev_ready),
    .dec_valid, .dec_accept, .dec_ready,
    .host_req (m_req), .host_addr (m_addr), .host_ack (m_ack), .host_data (m_data),
    .sev_sent, .evt_accepted, .evt_rejected, .evt_flushed
  );

  // output selection and S-Link transmitter
  logic               p_valid, p_ready;
  sev_word_t          p_word;
  logic [N_LINKS-1:0] bypass_xoff;

  slink_out_mux #(.N_LINKS(N_LINKS)) u_mux (
    .clk, .rst_n,
    .cfg_to_slink, .cfg_bypass, .cfg_bypass_link,
    .sev_valid, .sev_word, .sev_ready,
    .pci_valid (p_valid), .pci_word (p_word), .pci_ready (p_ready),
    .link_data, .link_ctrl, .link_wen,
    .bypass_xoff,
    .slink_data, .slink_ctrl, .slink_wen, .slink_lff
  );

  logic [31:0] pci_beats;

  out_packer u_pack (
    .clk, .rst_n,
    .in_valid  (p_valid), .in_word (p_word), .in_ready (p_ready),
    .out_valid (pci_valid), .out_data (pci_data), .out_hi_valid (pci_hi_valid),
    .out_sop   (pci_sop), .out_eop (pci_eop), .out_ready (pci_ready),
    .beats     (pci_beats)
  );

  assign link_xoff = f_xoff | {N_LINKS{sem_xoff}} | bypass_xoff;

  // control and status
  logic [31:0] stat [12];
  always_comb begin
    stat[0]  = {23'h0, f_full, link_xoff, sem_xoff};
    stat[1]  = 32'(data_used);
    stat[2]  = 32'(dir_used);
    stat[3]  = blocks_stored;
    stat[4]  = sev_sent;
    stat[5]  = evt_accepted;
    stat[6]  = evt_rejected;
    stat[7]  = evt_flushed;
    stat[8]  = {f_dropped[1], f_dropped[0]};
    stat[9]  = {f_dropped[3], f_dropped[2]};
    stat[10] = pci_beats;
    stat[11] = (32'(dir_head) << 16) | 32'(dir_tail);
  end

  ru_regs #(.NSTAT(12)) u_regs (
    .clk, .rst_n,
    .bus_addr (reg_addr), .bus_wdata (reg_wdata), .bus_we (reg_we), .bus_re (reg_re),
    .bus_rdata (reg_rdata),
    .stat_in  (stat),
    .cfg_phased, .cfg_to_slink, .cfg_bypass, .cfg_bypass_link, .cfg_flush,
    .cfg_link_enable, .cfg_l2_mask
  );

endmodule
