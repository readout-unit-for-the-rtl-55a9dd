// tb_ru_top: end-to-end test of the Readout Unit at its default sizes (1 MByte buffer).
// Four link drivers send blocks (one or two per link and event, links drifting apart, some with
// error status, some with a wrong size field) and obey link_xoff word by word. Every payload
// word names its block and position ({block id, index}), so each subevent can be taken apart
// and checked without knowing the merge order: all blocks of the event present once and whole,
// blocks of one link in sending order, header taken from the first block, error block and
// trailer (size, ORed status) as the framing rules require. Phases:
//   A full readout to PCI with a stalling PCI side
//   B PCI stopped until the buffer fills and Xoff is raised, then drained
//   C full readout to the S-Link transmitter, which is randomly full
//   D bypass of link 1 to the randomly full S-Link transmitter while subevents go to PCI
//   E phased readout: level-2 subset (link 0), then accept (remainder sent) or reject
//   F memory-like read of the directory and of a stored header while the last event waits,
//     by the network side (64-bit words) and by the processor (32-bit words) at once,
//     status registers, then flush
// Each mechanism is counted and must have happened at least once.
module tb_ru_top;
  import ru_pkg::*;
  localparam int N = 4;
  localparam int SEB_WORDS = 131072;
  localparam int DIR_WORDS = 4096;
  localparam int DATA_WORDS = SEB_WORDS - DIR_WORDS;
  localparam int AW = $clog2(SEB_WORDS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  // ---------------- block records ----------------
  int          b_evt [$], b_link [$], b_n [$], b_st [$];
  bit          b_bad [$];
  int          ev_blocks [int][$];
  int          link_q [N][$];        // block ids waiting to be sent, per link
  int          sent_evts = 0;

  // mechanism counters
  int n_multi = 0, n_errblk = 0, n_mismatch = 0, n_xoff = 0, n_pci_stall = 0;
  int n_accept = 0, n_reject = 0, n_slink_sev = 0, n_bypass = 0, n_host = 0, n_flush = 0;
  int n_mcu = 0, n_lff = 0;
  int n_half_beat = 0, n_pci_sev = 0, n_regs = 0, n_interleave = 0;

  function automatic logic [31:0] blk_word(input int b, input int k);
    int len;
    len = b_n[b] + 3;
    if (k == 0)       return {20'(b_evt[b]), 8'(b_link[b]), 4'h0};
    if (k == 1)       return {16'(b), 16'hFFFF};
    if (k == len - 1) return {12'(b_bad[b] ? len + 2 : len), 12'(b_st[b]), 8'h0};
    return {16'(b), 16'(k - 2)};
  endfunction

  // events first..first+nev-1, 1 or 2 blocks per link, payload 1..maxpay words
  task automatic make_events(input int first, input int nev, input int maxpay, input int minpay);
    for (int e = first; e < first + nev; e++)
      for (int l = 0; l < N; l++) begin
        int nb;
        nb = ($urandom_range(0, 3) == 0) ? 2 : 1;
        if (nb == 2) n_multi++;
        for (int j = 0; j < nb; j++) begin
          int b;
          b = b_evt.size();
          b_evt.push_back(e); b_link.push_back(l);
          b_n.push_back($urandom_range(minpay, maxpay));
          b_st.push_back(($urandom_range(0, 9) == 0) ? $urandom_range(1, 2047) : 0);
          b_bad.push_back($urandom_range(0, 19) == 0);
          ev_blocks[e].push_back(b);
          link_q[l].push_back(b);
        end
      end
    sent_evts += nev;
  endtask

  // link drivers
  for (genvar l = 0; l < N; l++) begin : g_drv
    initial begin
      link_wen[l] = 0; link_ctrl[l] = 0; link_data[l] = 0;
      wait (rst_n);
      forever begin
        if (link_q[l].size() == 0) begin @(posedge clk); #1; end
        else begin
          int b, len;
          b = link_q[l].pop_front();
          len = b_n[b] + 3;
          for (int k = 0; k < len; k++) begin
            while (link_xoff[l]) begin @(posedge clk); #1; end
            link_data[l] = blk_word(b, k);
            link_ctrl[l] = (k == 0 || k == len - 1);
            link_wen[l]  = 1;
            @(posedge clk); #1;
            link_wen[l]  = 0;
          end
          if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 30)) @(posedge clk);
          #1;
        end
      end
    end
  end

  // ---------------- subevent checker ----------------
  bit  phased = 0;
  int  l2_mask = 1;
  int  expect_rem = -1;
  int  seen [int];
  int  n_sev = 0;
  bit  dec_pending = 0;
  bit  dec_accept_next = 0;

  function automatic void check_sev(ref logic [31:0] w [$]);
    int e, pos, hb, nw;
    int bl [$];
    int order [$];
    int last_per_link [N];
    logic [11:0] st_or;
    int want [$];
    bit rem;
    int m;
    n_sev++;
    e = int'(hdr_evt(w[0]));
    if (!ev_blocks.exists(e)) begin check(0, $sformatf("unknown event %0d", e)); return; end
    bl = ev_blocks[e];
    rem = phased && (expect_rem == e);
    m = !phased ? 32'hF : (rem ? (~l2_mask & 32'hF) : l2_mask);
    foreach (bl[i]) if (m[b_link[bl[i]]]) want.push_back(bl[i]);
    // header: first stored block of the event
    hb = int'(w[1][31:16]);
    check(w[1][15:0] == 16'hFFFF && hb < b_evt.size() && b_evt[hb] == e, $sformatf("event %0d header word 1", e));
    if (hb < b_evt.size()) check(w[0] == blk_word(hb, 0), $sformatf("event %0d header word 0", e));
    // data blocks
    pos = 2;
    st_or = 0;
    for (int l = 0; l < N; l++) last_per_link[l] = -1;
    for (int i = 0; i < want.size(); i++) begin
      int b;
      if (pos >= w.size()) begin check(0, $sformatf("event %0d too short", e)); return; end
      b = int'(w[pos][31:16]);
      if (!(b < b_evt.size() && b_evt[b] == e && m[b_link[b]])) begin
        check(0, $sformatf("event %0d: foreign word %h at %0d", e, w[pos], pos)); return;
      end
      foreach (order[j]) if (order[j] == b) check(0, $sformatf("block %0d twice", b));
      order.push_back(b);
      check(b > last_per_link[b_link[b]], "blocks of one link in order");
      last_per_link[b_link[b]] = b;
      for (int k = 0; k < b_n[b]; k++)
        check(pos + k < w.size() && w[pos + k] == {16'(b), 16'(k)}, $sformatf("block %0d word %0d", b, k));
      pos += b_n[b];
      st_or |= 12'(b_st[b]) | (b_bad[b] ? 12'h800 : 12'h0);
    end
    if (!phased) check(order.size() > 0 && order[0] == hb, "header from the first block");
    if (order.size() > 1 && b_link[order[0]] != b_link[order[1]]) n_interleave++;
    if (st_or != 0) begin
      n_errblk++;
      foreach (order[i]) begin
        int b = order[i];
        logic [11:0] sb;
        sb = 12'(b_st[b]) | (b_bad[b] ? 12'h800 : 12'h0);
        if (b_bad[b]) n_mismatch++;
        check(pos < w.size() && w[pos] == {2'(b_link[b]), sb, 12'(b_n[b] + 3), 6'b0},
              $sformatf("event %0d error word %0d", e, i));
        pos++;
      end
    end
    nw = pos + 1;
    check(w.size() == nw, $sformatf("event %0d length %0d vs %0d", e, w.size(), nw));
    check(w[w.size() - 1] == {12'(nw), st_or, 8'h0}, $sformatf("event %0d trailer %h", e, w[w.size()-1]));
    // bookkeeping of the protocol
    if (phased && !rem) begin
      check(!seen.exists(e), $sformatf("event %0d twice", e));
      seen[e] = 1;
      dec_accept_next = (e % 2 == 0);
      expect_rem = dec_accept_next ? e : -1;
      dec_pending = 1;
    end else if (phased) begin
      expect_rem = -1;
    end else begin
      check(!seen.exists(e), $sformatf("event %0d twice", e));
      seen[e] = 1;
    end
  endfunction

  // PCI sink
  logic [31:0] pci_w [$];
  bit pci_stop = 0;
  always @(negedge clk) begin
    pci_ready = !pci_stop && ($urandom_range(0, 3) != 0);
    if (rst_n && pci_valid && !pci_ready) n_pci_stall++;
    if (rst_n && pci_valid && pci_ready) begin
      if (pci_sop) begin
        check(pci_w.size() == 0, "PCI sop inside a subevent");
        pci_w = {};
      end
      pci_w.push_back(pci_data[31:0]);
      if (pci_hi_valid) pci_w.push_back(pci_data[63:32]);
      else n_half_beat++;
      if (pci_eop) begin
        check_sev(pci_w);
        n_pci_sev++;
        pci_w = {};
      end
    end
  end

  // S-Link sink: subevents, or bypassed link words
  logic [31:0] sl_w [$];
  logic [32:0] byp_q [$];
  bit bypass_on = 0;
  always @(negedge clk) if (rst_n && slink_wen) begin
    if (bypass_on) begin
      logic [32:0] e;
      check(byp_q.size() > 0, "unexpected bypass word");
      e = byp_q.pop_front();
      check({slink_ctrl, slink_data} == e, "bypass word unchanged");
      n_bypass++;
    end else begin
      if (slink_ctrl && sl_w.size() == 0) sl_w = {};
      sl_w.push_back(slink_data);
      if (slink_ctrl && sl_w.size() > 1) begin
        check_sev(sl_w);
        n_slink_sev++;
        sl_w = {};
      end
    end
  end
  // S-Link transmitter full flag, random while lff_on
  bit lff_on = 0;
  always @(posedge clk) begin
    #1 slink_lff = lff_on && ($urandom_range(0, 3) == 0);
  end
  always @(negedge clk) if (rst_n && slink_lff && (sl_w.size() > 0 || (bypass_on && link_xoff[1]))) n_lff++;

  // what link 1 sends while bypassed
  always @(posedge clk) if (bypass_on && link_wen[1]) byp_q.push_back({link_ctrl[1], link_data[1]});

  // decisions
  initial begin
    dec_valid = 0; dec_accept = 0;
    forever begin
      @(posedge clk); #1;
      if (dec_pending) begin
        repeat ($urandom_range(0, 8)) @(posedge clk);
        #1;
        dec_valid = 1; dec_accept = dec_accept_next;
        do @(posedge clk); while (!dec_ready);
        #1;
        dec_valid = 0;
        if (dec_accept_next) n_accept++; else n_reject++;
        dec_pending = 0;
      end
    end
  end

  // xoff monitor
  logic xoff_d = 0;
  always @(negedge clk) begin
    if (dut.sem_xoff && !xoff_d) n_xoff++;
    xoff_d = dut.sem_xoff;
  end

  // register bus
  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(posedge clk); #1;
    reg_we = 0;
  endtask
  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    reg_addr = a; reg_re = 1;
    @(posedge clk); #1;
    reg_re = 0;
    d = reg_rdata;
    n_regs++;
  endtask

  task automatic host_read(input int a, output logic [63:0] d);
    host_req = 1; host_addr = AW'(a);
    do @(negedge clk); while (!host_ack);
    d = host_data;
    host_req = 0;
    @(posedge clk); #1;
    n_host++;
  endtask

  // processor reads through its 32-bit memory bus
  task automatic mcu_read(input int a, output logic [31:0] d);
    mcu_req = 1; mcu_addr = (AW+1)'(a);
    do @(negedge clk); while (!mcu_ack);
    d = mcu_data;
    mcu_req = 0;
    @(posedge clk); #1;
    n_mcu++;
  endtask

  // wait until every sent event has left (all but the newest, which waits for its links)
  task automatic wait_out(input int nsev, input int limit);
    int n = 0;
    while (n_sev < nsev && n < limit) begin @(posedge clk); n++; end
    #1;
  endtask

  task automatic wait_links_idle();
    for (int l = 0; l < N; l++) while (link_q[l].size() > 0) @(posedge clk);
    repeat (100) @(posedge clk);
    #1;
  endtask

  localparam logic [31:0] CTRL_BASE = 32'h0000_F000;  // all links enabled

  initial begin
    logic [31:0] d;
    logic [63:0] q;
    int t;
    host_req = 0; host_addr = '0; mcu_req = 0; mcu_addr = '0;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; reg_re = 0;
    repeat (5) @(posedge clk); #1 rst_n = 1;

    // A: full readout to PCI
    make_events(0, 40, 60, 1);
    wait_out(39, 200000);
    check(n_sev == 39, $sformatf("A: subevents %0d", n_sev));

    // B: stop PCI until the buffer fills
    pci_stop = 1;
    make_events(40, 200, 250, 200);
    t = 0;
    while (n_xoff == 0 && t < 400000) begin @(posedge clk); t++; end
    #1;
    check(n_xoff > 0, "B: xoff raised when the buffer filled");
    reg_read(8'd1, d);
    check(d[0] == 1'b1, "B: xoff visible in the status register");
    reg_read(8'd2, d);
    check(int'(d) > DATA_WORDS - 16384 - 1024, $sformatf("B: buffer nearly full (%0d words)", d));
    pci_stop = 0;
    wait_out(239, 2000000);
    check(n_sev == 239, $sformatf("B: subevents %0d", n_sev));
    check(!dut.sem_xoff, "B: xon after draining");

    // C: to the S-Link transmitter
    reg_write(8'd0, CTRL_BASE | 32'h2);
    lff_on = 1;
    make_events(240, 20, 40, 1);
    wait_out(259, 200000);
    check(n_slink_sev >= 19, $sformatf("C: subevents on S-Link %0d", n_slink_sev));

    // D: bypass link 1, subevents to PCI
    wait_links_idle();
    bypass_on = 1;
    reg_write(8'd0, CTRL_BASE | 32'h4 | (32'd1 << 4));
    make_events(260, 20, 40, 1);
    wait_out(279, 200000);
    wait_links_idle();
    bypass_on = 0;
    lff_on = 0;
    check(byp_q.size() == 0, "D: every bypassed word transmitted");
    reg_write(8'd0, CTRL_BASE);

    // E: phased readout, link 0 for the level-2 decision
    phased = 1; l2_mask = 1;
    reg_write(8'd0, CTRL_BASE | 32'h1 | (32'd1 << 16));
    make_events(280, 30, 40, 1);
    t = 0;
    while (seen.size() < 309 && t < 400000) begin @(posedge clk); t++; end
    repeat (2000) @(posedge clk); #1;

    // F: the newest event waits for its links: read it like memory
    reg_read(8'd12, d);
    host_read(DATA_WORDS + int'(d[15:0]), q);
    begin
      dir_entry_t de;
      de = dir_entry_t'(q[62:0]);
      check(de.evt == 20'd309, $sformatf("F: oldest directory entry is event %0d", de.evt));
      host_read(int'(de.addr), q);
      check(q[31:0] == blk_word(int'(q[63:48]), 0) && q[31:12] == 20'd309, "F: stored header word");
      // the processor reads the same two words while the network side reads the directory
      begin
        logic [31:0] m0, m1;
        logic [63:0] q2;
        fork
          begin mcu_read(2 * int'(de.addr), m0); mcu_read(2 * int'(de.addr) + 1, m1); end
          host_read(DATA_WORDS + int'(d[15:0]), q2);
        join
        check({m1, m0} == q, "F: processor 32-bit reads of the stored header");
        check(q2[62:0] == 63'(de), "F: network read while the processor reads");
      end
    end
    reg_write(8'd0, CTRL_BASE | 32'h1 | (32'd1 << 16) | 32'h100);
    t = 0;
    while (seen.size() < 310 && t < 100000) begin @(posedge clk); t++; end
    repeat (200) @(posedge clk); #1;
    reg_read(8'd8, d);
    n_flush = int'(d);
    reg_write(8'd0, CTRL_BASE);
    check(seen.size() == 310, $sformatf("all events sent once (%0d)", seen.size()));
    reg_read(8'd5, d);
    check(int'(d) == n_sev, $sformatf("subevent counter %0d vs %0d", d, n_sev));
    reg_read(8'd6, d);
    check(int'(d) == n_accept, "accept counter");
    reg_read(8'd7, d);
    check(int'(d) == n_reject, "reject counter");
    reg_read(8'd3, d);
    check(d == 0, "directory empty at the end");
    reg_read(8'd4, d);
    check(int'(d) == b_evt.size(), $sformatf("blocks stored %0d vs %0d", d, b_evt.size()));

    $display("mechanisms: interleave=%0d multi=%0d errblock=%0d mismatch=%0d xoff=%0d pci_stall=%0d",
             n_interleave, n_multi, n_errblk, n_mismatch, n_xoff, n_pci_stall);
    $display("            slink=%0d bypass=%0d accept=%0d reject=%0d host=%0d mcu=%0d flush=%0d half_beat=%0d regs=%0d lff=%0d",
             n_slink_sev, n_bypass, n_accept, n_reject, n_host, n_mcu, n_flush, n_half_beat, n_regs, n_lff);
    check(n_interleave > 0, "blocks of several links merged");
    check(n_multi > 0, "several blocks of one event on one link");
    check(n_errblk > 0, "error block inserted");
    check(n_mismatch > 0, "size mismatch detected");
    check(n_xoff > 0, "xoff");
    check(n_pci_stall > 0, "PCI back-pressure");
    check(n_slink_sev > 0, "subevents on S-Link");
    check(n_bypass > 0, "bypass");
    check(n_lff > 0, "S-Link transmitter full");
    check(n_accept > 0 && n_reject > 0, "phased accept and reject");
    check(n_host > 0, "memory-like access");
    check(n_mcu > 0, "processor access to the buffer");
    check(n_flush > 0, "flush");
    check(n_half_beat > 0, "odd-length subevent packing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired: subevents %0d", n_sev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
