// tb_ru_regs: self-checking test of the control and status registers.
// Checks the reset value of the control register, that writes land in the defined bits only and
// drive the configuration outputs, the one-cycle read latency, every status word, and that
// undefined addresses read zero and ignore writes.
module tb_ru_regs;
  localparam int NSTAT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        bus_we, bus_re;
  logic [31:0] stat_in [NSTAT];
  logic        cfg_phased, cfg_to_slink, cfg_bypass, cfg_flush;
  logic [1:0]  cfg_bypass_link;
  logic [3:0]  cfg_link_enable, cfg_l2_mask;

  ru_regs #(.NSTAT(NSTAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(posedge clk); #1;
    bus_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(posedge clk); #1;
    bus_re = 0;
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    bus_addr = 0; bus_wdata = 0; bus_we = 0; bus_re = 0;
    for (int k = 0; k < NSTAT; k++) stat_in[k] = $urandom;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    rd(0, d);
    check(d == 32'h0000_F000, "reset value");
    check(cfg_link_enable == 4'hF && !cfg_phased && !cfg_to_slink && !cfg_bypass && !cfg_flush,
          "reset configuration");
    for (int t = 0; t < 50; t++) begin
      logic [31:0] v;
      v = $urandom;
      wr(0, v);
      check(cfg_phased == v[0] && cfg_to_slink == v[1] && cfg_bypass == v[2] &&
            cfg_bypass_link == v[5:4] && cfg_flush == v[8] && cfg_link_enable == v[15:12] &&
            cfg_l2_mask == v[19:16], "configuration outputs follow the write");
      rd(0, d);
      check(d == (v & 32'h000F_F137), "control read-back");
    end
    for (int k = 0; k < NSTAT; k++) begin
      rd(8'(k + 1), d);
      check(d == stat_in[k], $sformatf("status word %0d", k));
    end
    wr(0, 32'h0000_3001);
    wr(8'd20, 32'hFFFF_FFFF);
    rd(8'd20, d);
    check(d == 0, "undefined address reads zero");
    rd(0, d);
    check(d == 32'h0000_3001, "write elsewhere leaves control alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
