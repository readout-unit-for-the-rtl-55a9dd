// tb_ebi: self-checking test of the eventbuilder interface.
// The testbench plays the merger: it stores blocks (random sizes, some with error status, one
// or two blocks per link and event, links drifting apart in time) in a subevent buffer and
// announces each directory entry. A reference model rebuilds every subevent: header of the first
// block, data words of all blocks of the event in directory order, error block only on errors,
// trailer with recalculated size and ORed status. Checked: every subevent word, that every event
// is sent once, memory-like reads while the interface waits, that all space is given back, and
// one payload word per cycle. Then the phased protocol: a level-2 subset first, then, after an
// accept, the remaining links; nothing more after a reject. The output is stalled at random.
module tb_ebi;
  import ru_pkg::*;
  localparam int N = 4;
  localparam int SEB_WORDS = 2048;
  localparam int DIR_WORDS = 64;
  localparam int DATA_WORDS = SEB_WORDS - DIR_WORDS;
  localparam int AW = $clog2(SEB_WORDS);
  localparam int DIRAW = $clog2(DIR_WORDS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             cfg_phased, flush, dir_wr, seb_en, out_valid, out_ready;
  logic             dec_valid, dec_accept, dec_ready, host_req, host_ack;
  logic [N-1:0]     cfg_l2_mask, link_enable;
  logic [DIRAW-1:0] dir_head, dir_tail;
  dir_entry_t       dir_wr_entry;
  logic [AW-1:0]    seb_addr, data_tail, host_addr;
  logic [63:0]      seb_q, host_data;
  sev_word_t        out_word;
  logic [31:0]      sev_sent, evt_accepted, evt_rejected, evt_flushed;

  logic          a_we;
  logic [AW-1:0] a_addr;
  logic [63:0]   a_data;

  seb #(.WORDS(SEB_WORDS)) u_seb (.clk, .a_we, .a_addr, .a_data,
                                  .b_en(seb_en), .b_addr(seb_addr), .b_q(seb_q));

  ebi #(.N_LINKS(N), .SEB_WORDS(SEB_WORDS), .DIR_WORDS(DIR_WORDS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- reference model ----------------
  logic [63:0] mirror [SEB_WORDS];
  int          blk_link [$];
  int          blk_stat [$];
  int          blk_off [$];
  int          blk_len [$];
  logic [31:0] allw [$];
  int          evt_blocks [int][$];  // event -> block indices in directory order
  int          evt_order [$];        // events in order of their first block
  int          wr = 0;

  function automatic void expected(input int e, input logic [N-1:0] m, ref logic [31:0] q [$]);
    int nb = 0, pay = 0;
    logic [11:0] st = 0;
    int b0;
    int bl [$];
    bl = evt_blocks[e];
    q = {};
    b0 = bl[0];
    q.push_back(allw[blk_off[b0]]);
    q.push_back(allw[blk_off[b0] + 1]);
    for (int i = 0; i < bl.size(); i++) begin
      int b = bl[i];
      if (m[blk_link[b]]) begin
        nb++;
        st |= 12'(blk_stat[b]);
        for (int k = 2; k < blk_len[b] - 1; k++) begin q.push_back(allw[blk_off[b] + k]); pay++; end
      end
    end
    if (st != 0)
      for (int i = 0; i < bl.size(); i++) begin
        int b = bl[i];
        if (m[blk_link[b]]) q.push_back({2'(blk_link[b]), 12'(blk_stat[b]), 12'(blk_len[b]), 6'b0});
      end
    q.push_back({12'(3 + pay + ((st != 0) ? nb : 0)), st, 8'h0});
  endfunction

  // store one block as the merger would
  task automatic store(input int l, input int e, input int n, input int st);
    logic [31:0] w [$];
    int len, nw, used, b;
    dir_entry_t de;
    w.push_back({20'(e), 8'(l), 4'h0});
    w.push_back($urandom);
    for (int k = 0; k < n; k++) w.push_back($urandom);
    len = n + 3;
    w.push_back({12'(len), 12'(st), 8'h0});
    nw = (len + 1) / 2;
    // wait for space
    forever begin
      used = (wr - int'(data_tail) + DATA_WORDS) % DATA_WORDS;
      if (DATA_WORDS - 1 - used >= nw && int'(DIRAW'(dir_head - dir_tail)) < DIR_WORDS - 1) break;
      @(posedge clk); #1;
    end
    de = '{evt: EVT_W'(e), link: LINK_W'(l), status: STAT_W'(st), len: SIZE_W'(len), addr: 17'(wr)};
    for (int k = 0; k < nw; k++) begin
      logic [63:0] d;
      d = {(2*k+1 < len) ? w[2*k+1] : 32'h0, w[2*k]};
      a_we = 1; a_addr = AW'(wr); a_data = d; mirror[wr] = d;
      wr = (wr + 1) % DATA_WORDS;
      @(posedge clk); #1;
    end
    a_we = 1; a_addr = AW'(DATA_WORDS + int'(dir_head)); a_data = 64'(de);
    dir_wr = 1; dir_wr_entry = de;
    @(posedge clk); #1;
    a_we = 0; dir_wr = 0;
    dir_head = dir_head + 1'b1;
    b = blk_link.size();
    blk_link.push_back(l); blk_stat.push_back(st);
    blk_off.push_back(allw.size()); blk_len.push_back(len);
    foreach (w[k]) allw.push_back(w[k]);
    if (!evt_blocks.exists(e)) evt_order.push_back(e);
    evt_blocks[e].push_back(b);
  endtask

  // generate events first..first+nev-1: per link one or two blocks per event, links drifting
  task automatic traffic(input int first, input int nev, input int maxlen);
    int next_e [N];
    int left [N];
    int done_links;
    for (int l = 0; l < N; l++) begin next_e[l] = first; left[l] = $urandom_range(1, 2); end
    done_links = 0;
    while (done_links < N) begin
      int l = $urandom_range(0, N - 1);
      int lowest = first + nev;
      for (int k = 0; k < N; k++) if (next_e[k] < lowest) lowest = next_e[k];
      // links drift apart by at most two events
      if (next_e[l] < first + nev && next_e[l] < lowest + 2) begin
        store(l, next_e[l], $urandom_range(0, maxlen),
              ($urandom_range(0, 7) == 0) ? $urandom_range(1, 4095) : 0);
        left[l]--;
        if (left[l] == 0) begin
          next_e[l]++;
          left[l] = $urandom_range(1, 2);
          if (next_e[l] == first + nev) done_links++;
        end
      end
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(posedge clk);
      #1;
    end
  endtask

  // ---------------- output side ----------------
  logic [31:0] got [$];
  int          sev_rx = 0, seen_evt [int];
  int          expect_rem = -1;   // phased: event whose remainder must come next
  bit          stall_en = 1;
  bit          decide_accept [int];

  always @(negedge clk) out_ready = !stall_en || ($urandom_range(0, 3) != 0);

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_word.sop) begin
      check(got.size() == 0, "sop inside a subevent");
      got = {};
    end
    got.push_back(out_word.data);
    if (out_word.eop) begin
      logic [31:0] q [$];
      int e;
      logic [N-1:0] m;
      e = int'(hdr_evt(got[0]));
      sev_rx++;
      if (!cfg_phased) m = '1;
      else if (expect_rem == e) m = ~cfg_l2_mask;
      else m = cfg_l2_mask;
      check(evt_blocks.exists(e), $sformatf("subevent for unknown event %0d", e));
      if (evt_blocks.exists(e)) begin
        expected(e, m, q);
        check(got.size() == q.size(), $sformatf("event %0d size %0d vs %0d", e, got.size(), q.size()));
        foreach (q[i]) if (i < got.size())
          check(got[i] == q[i], $sformatf("event %0d word %0d: %h vs %h", e, i, got[i], q[i]));
      end
      if (cfg_phased && expect_rem != e) begin
        decide_accept[e] = (e % 2 == 0);
        check(!seen_evt.exists(e), $sformatf("event %0d sent twice", e));
        seen_evt[e] = 1;
        expect_rem = decide_accept[e] ? e : -1;
        dec_pending = 1;
      end else if (cfg_phased) begin
        expect_rem = -1;
      end else begin
        check(!seen_evt.exists(e), $sformatf("event %0d sent twice", e));
        seen_evt[e] = 1;
      end
      got = {};
    end
  end

  // decisions, a few cycles after the level-2 subset arrives
  bit dec_pending = 0;
  initial begin
    dec_valid = 0; dec_accept = 0;
    forever begin
      @(posedge clk); #1;
      if (dec_pending) begin
        repeat ($urandom_range(0, 5)) @(posedge clk);
        #1;
        dec_valid = 1; dec_accept = (expect_rem >= 0);
        do @(posedge clk); while (!dec_ready);
        #1;
        dec_valid = 0;
        dec_pending = 0;
      end
    end
  end

  // payload rate: words leaving in the payload state against cycles spent there
  int pay_cycles = 0, pay_words = 0;
  bit measure = 0;
  always @(negedge clk) if (measure && int'(dut.state) == 13) begin
    pay_cycles++;
    if (out_valid && out_ready) pay_words++;
  end

  task automatic host_read_check(input int nreads);
    for (int k = 0; k < nreads; k++) begin
      int a;
      int lat;
      a = $urandom_range(0, DATA_WORDS - 1);
      host_req = 1; host_addr = AW'(a);
      lat = 0;
      do begin @(negedge clk); lat++; end while (!host_ack && lat < 5000);
      check(host_ack && host_data == mirror[a], $sformatf("memory read %0d ack %b %h vs %h", a, host_ack, host_data, mirror[a]));
      host_req = 0;
      @(posedge clk); #1;
    end
  endtask

  task automatic drain_and_flush();
    int n = 0;
    flush = 1;
    while ((dir_tail != dir_head || int'(dut.state) != 0) && n < 100000) begin @(posedge clk); n++; end
    repeat (10) @(posedge clk);
    #1;
    flush = 0;
  endtask

  initial begin
    cfg_phased = 0; cfg_l2_mask = 4'b0011; link_enable = '1; flush = 0;
    dir_head = '0; dir_wr = 0; dir_wr_entry = '0; a_we = 0; a_addr = '0; a_data = '0;
    host_req = 0; host_addr = '0;
    for (int i = 0; i < SEB_WORDS; i++) mirror[i] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // full readout
    traffic(0, 40, 40);
    begin
      automatic int n = 0;
      while (int'(dut.state) != 5 || dut.cur_evt != 39) begin @(posedge clk); n++; end
      #1;
    end
    // the last event waits for its links to move on: read the buffer like memory meanwhile
    check(int'(dut.state) == 5, $sformatf("waiting for the last event, state %0d ptr %0d head %0d tail %0d", dut.state, dut.ptr, dir_head, dir_tail));
    host_read_check(10);
    drain_and_flush();
    check(seen_evt.size() == 40, $sformatf("events sent %0d", seen_evt.size()));
    check(sev_sent == 40, "sev_sent counter");
    check(evt_flushed >= 1, "last event sent on flush");
    check(dir_tail == dir_head, "directory fully given back");
    check(int'(data_tail) == wr, "data region fully given back");

    // payload rate with the output never stalled
    stall_en = 0;
    measure = 1;
    for (int l = 0; l < N; l++) store(l, 100, 200, 0);
    for (int l = 0; l < N; l++) store(l, 101, 0, 0);
    repeat (1500) @(posedge clk); #1;
    measure = 0;
    check(pay_words == 800, $sformatf("payload words %0d", pay_words));
    check(pay_cycles <= pay_words + 2 * 4, $sformatf("payload cycles %0d for %0d words", pay_cycles, pay_words));
    drain_and_flush();
    stall_en = 1;

    // phased readout
    seen_evt.delete();
    cfg_phased = 1;
    traffic(200, 30, 30);
    drain_and_flush();
    check(seen_evt.size() == 30, $sformatf("phased events %0d", seen_evt.size()));
    check(evt_accepted == 15 && evt_rejected == 15, $sformatf("decisions %0d/%0d", evt_accepted, evt_rejected));
    check(dir_tail == dir_head, "directory given back after phased readout");
    check(int'(data_tail) == wr, "data given back after phased readout");
    check(sev_rx == 40 + 2 + 30 + 15, $sformatf("subevents received %0d", sev_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
