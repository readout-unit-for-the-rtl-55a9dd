// ru_regs: control and status registers of the Readout Unit, reached by the monitoring and
// control processor over its local bus.
//
// Word address 0 is the control register (read/write):
//   [0] phased readout   [1] subevents to S-Link   [2] bypass   [5:4] bypass link
//   [8] flush            [15:12] link enable       [19:16] links sent for the level-2 decision
// Addresses 1 to NSTAT are read-only status words taken from stat_in[0..NSTAT-1]; other
// addresses read zero. After reset all links are enabled and everything else is off.
//
// Timing: a write takes effect at the clock edge of bus_we; read data appear on bus_rdata one
// cycle after bus_re and stay until the next read.
// The document has the processor set operating parameters and read status registers inside the
// FPGAs; the register map, the 32-bit register view and this simple bus are this design's
// choices.
module ru_regs #(
  parameter int unsigned NSTAT = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  input  logic        bus_re,
  output logic [31:0] bus_rdata,
  input  logic [31:0] stat_in [NSTAT],
  output logic        cfg_phased,
  output logic        cfg_to_slink,
  output logic        cfg_bypass,
  output logic [1:0]  cfg_bypass_link,
  output logic        cfg_flush,
  output logic [3:0]  cfg_link_enable,
  output logic [3:0]  cfg_l2_mask
);
  localparam logic [31:0] CTRL_MASK  = 32'h000F_F137;
  localparam logic [31:0] CTRL_RESET = 32'h0000_F000;

  logic [31:0] ctrl;

  assign cfg_phased      = ctrl[0];
  assign cfg_to_slink    = ctrl[1];
  assign cfg_bypass      = ctrl[2];
  assign cfg_bypass_link = ctrl[5:4];
  assign cfg_flush       = ctrl[8];
  assign cfg_link_enable = ctrl[15:12];
  assign cfg_l2_mask     = ctrl[19:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl      <= CTRL_RESET;
      bus_rdata <= '0;
    end else begin
      if (bus_we && bus_addr == 8'd0) ctrl <= bus_wdata & CTRL_MASK;
      if (bus_re) begin
        bus_rdata <= (bus_addr == 8'd0) ? ctrl : 32'h0;
        for (int k = 0; k < NSTAT; k++)
          if (32'(bus_addr) == k + 1) bus_rdata <= stat_in[k];
      end
    end
  end

endmodule
