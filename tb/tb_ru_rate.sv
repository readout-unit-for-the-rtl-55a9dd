// tb_ru_rate: the nominal load of the Readout Unit, at its default sizes.
//
// Four links each send one 1000-byte block (250 words: two header words, 247 data words, one
// trailer) per event at a 40 kHz event rate, i.e. 160 MByte/s in all. The clock is 50 MHz, so
// an event starts every 1250 cycles; each link writes one word every 5 cycles (40 MByte/s, the
// peak rate of one link) and starts each event with its own random delay of up to 300 cycles,
// so blocks of neighbouring events overlap in time. The PCI side takes a beat in two cycles out
// of three, the rate of a 64-bit 33 MHz PCI bus (264 MByte/s) seen from the 50 MHz clock.
//
// Checked: every event comes out once, in order, as one subevent of 3 + 4*247 words with all
// four blocks whole; Xoff is never raised; the buffer and directory occupancy stay small, i.e.
// the output keeps up with the input; the achieved output rate is reported in MByte/s.
module tb_ru_rate;
  import ru_pkg::*;
  localparam int N       = 4;
  localparam int NEV     = 300;
  localparam int PAY     = 247;
  localparam int PERIOD  = 1250;   // cycles per event at 40 kHz and 50 MHz
  localparam int AW      = $clog2(131072);

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;           // 50 MHz

  logic [31:0]  link_data [N];
  logic [N-1:0] link_ctrl, link_wen, link_xoff;
  logic         pci_valid, pci_hi_valid, pci_sop, pci_eop, pci_ready;
  logic [63:0]  pci_data;
  logic         dec_valid, dec_accept, dec_ready;
  logic         host_req, host_ack;
  logic [AW-1:0] host_addr;
  logic [63:0]  host_data;
  logic         mcu_req, mcu_ack;
  logic [AW:0]  mcu_addr;
  logic [31:0]  mcu_data;
  logic [31:0]  slink_data;
  logic         slink_ctrl, slink_wen, slink_lff;
  logic [7:0]   reg_addr;
  logic [31:0]  reg_wdata, reg_rdata;
  logic         reg_we, reg_re;

  ru_top dut (.*);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] word(input int l, input int e, input int k);
    if (k == 0)       return {20'(e), 8'(l), 4'h0};
    if (k == 1)       return {16'(l), 16'hFFFF};
    if (k == PAY + 2) return {12'(PAY + 3), 12'h0, 8'h0};
    return {4'(l), 12'(e), 16'(k - 2)};
  endfunction

  // link drivers: event e starts at e*PERIOD plus a random delay, one word every 5 cycles
  int start_cyc = 0;
  for (genvar l = 0; l < N; l++) begin : g_drv
    initial begin
      link_wen[l] = 0; link_ctrl[l] = 0; link_data[l] = 0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int e = 0; e < NEV; e++) begin
        int t0;
        t0 = start_cyc + e * PERIOD + $urandom_range(0, 300);
        while (cyc < t0) begin @(posedge clk); #1; end
        for (int k = 0; k < PAY + 3; k++) begin
          while (link_xoff[l]) begin @(posedge clk); #1; end
          link_data[l] = word(l, e, k);
          link_ctrl[l] = (k == 0 || k == PAY + 2);
          link_wen[l]  = 1;
          @(posedge clk); #1;
          link_wen[l]  = 0;
          repeat (4) @(posedge clk);
          #1;
        end
      end
    end
  end

  // PCI sink at two beats in three cycles
  logic [31:0] w [$];
  int n_sev = 0, next_evt = 0;
  int out_cyc [NEV];
  int pci_phase = 0;
  always @(negedge clk) begin
    pci_phase = (pci_phase + 1) % 3;
    pci_ready = (pci_phase != 0);
    if (rst_n && pci_valid && pci_ready) begin
      if (pci_sop) w = {};
      w.push_back(pci_data[31:0]);
      if (pci_hi_valid) w.push_back(pci_data[63:32]);
      if (pci_eop) begin
        check_sev();
        if (next_evt - 1 < NEV) out_cyc[next_evt - 1] = cyc;
        n_sev++;
      end
    end
  end

  function automatic void check_sev();
    int e;
    bit [N-1:0] got;
    e = int'(hdr_evt(w[0]));
    check(e == next_evt, $sformatf("event %0d out of order (expected %0d)", e, next_evt));
    next_evt = e + 1;
    check(w.size() == 3 + N * PAY, $sformatf("event %0d: %0d words", e, w.size()));
    if (w.size() != 3 + N * PAY) return;
    check(w[w.size() - 1] == {12'(3 + N * PAY), 12'h0, 8'h0}, $sformatf("event %0d trailer", e));
    got = '0;
    for (int b = 0; b < N; b++) begin
      int l;
      l = int'(w[2 + b * PAY][31:28]);
      check(l < N && !got[l], $sformatf("event %0d: block of link %0d", e, l));
      if (l < N) got[l] = 1'b1;
      for (int k = 0; k < PAY; k++)
        check(w[2 + b * PAY + k] == word(l, e, k + 2), $sformatf("event %0d link %0d word %0d", e, l, k));
    end
  endfunction

  // occupancy and Xoff monitors
  int max_dir = 0, max_data = 0, n_xoff_cyc = 0;
  always @(negedge clk) if (rst_n) begin
    if (int'(dut.dir_used) > max_dir) max_dir = int'(dut.dir_used);
    if (int'(dut.data_used) > max_data) max_data = int'(dut.data_used);
    if (link_xoff != '0) n_xoff_cyc++;
  end

  initial begin
    real mbs;
    host_req = 0; host_addr = '0; mcu_req = 0; mcu_addr = '0; slink_lff = 0; dec_valid = 0; dec_accept = 0;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; reg_re = 0;
    repeat (5) @(posedge clk); #1 rst_n = 1;
    // the last event stays until a later one completes it; flush it at the end
    while (n_sev < NEV - 1 && cyc < NEV * PERIOD + 20000) @(posedge clk);
    #1;
    reg_addr = 8'd0; reg_wdata = 32'h0000_F100; reg_we = 1;
    @(posedge clk); #1 reg_we = 0;
    repeat (3000) @(posedge clk);
    check(n_sev == NEV, $sformatf("%0d of %0d subevents", n_sev, NEV));
    check(n_xoff_cyc == 0, $sformatf("Xoff raised for %0d cycles", n_xoff_cyc));
    check(max_dir <= 16, $sformatf("directory held up to %0d entries", max_dir));
    check(max_data <= 4096, $sformatf("buffer held up to %0d words", max_data));
    // rate from event 10 to the last event completed by a later one (the flushed one excluded)
    mbs = real'((NEV - 12) * (3 + N * PAY)) * 4.0 /
          (real'(out_cyc[NEV - 2] - out_cyc[10]) * 20.0e-9) / 1.0e6;
    $display("output %0d subevents, %.1f MByte/s; peak directory %0d entries, buffer %0d words",
             n_sev, mbs, max_dir, max_data);
    check(mbs >= 157.0, "output keeps the input rate (158.6 MByte/s of subevent words)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NEV * PERIOD + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
