// tb_sem: self-checking test of the subevent merger, fed by four input FIFOs.
// The testbench plays the eventbuilder side: it keeps a copy of every word written to the
// buffer, checks each directory entry (event, link, length, status, address) and the stored
// words against the blocks it sent, and gives space back in directory order.
// Phases: (1) round-robin order with all four FIFOs preloaded; (2) random traffic on four links
// with space given back; (3) no space given back: link_xoff must rise and no stored block may be
// overwritten; (4) space given back again: link_xoff must fall and all blocks arrive.
// Also checks one 64-bit word per cycle during a block transfer and the size-mismatch status bit.
module tb_sem;
  import ru_pkg::*;
  localparam int N = 4;
  localparam int SEB_WORDS = 1024;
  localparam int DIR_WORDS = 64;
  localparam int DATA_WORDS = SEB_WORDS - DIR_WORDS;
  localparam int AW = $clog2(SEB_WORDS);
  localparam int DIRAW = $clog2(DIR_WORDS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]  ldata [N];
  logic [N-1:0] lctrl, lwen, fxoff, fempty, ffull, frd;
  fifo_entry_t  fentry [N];
  logic [15:0]  fblocks [N], fdrop [N];
  logic [N-1:0] link_enable;

  for (genvar i = 0; i < N; i++) begin : g_f
    link_fifo #(.DEPTH(64)) u_f (
      .clk, .rst_n, .link_data(ldata[i]), .link_ctrl(lctrl[i]), .link_wen(lwen[i]),
      .link_xoff(fxoff[i]), .rd_en(frd[i]), .rd_entry(fentry[i]), .empty(fempty[i]),
      .full(ffull[i]), .blocks(fblocks[i]), .dropped(fdrop[i]));
  end

  logic             seb_we, dir_wr, xoff;
  logic [AW-1:0]    seb_addr, data_tail, data_used;
  logic [63:0]      seb_data;
  logic [DIRAW-1:0] dir_tail, dir_head;
  logic [DIRAW:0]   dir_used;
  dir_entry_t       dir_wr_entry;
  logic [31:0]      blocks_stored;

  sem #(.N_LINKS(N), .SEB_WORDS(SEB_WORDS), .DIR_WORDS(DIR_WORDS),
        .XOFF_FREE(300), .XON_FREE(500), .XOFF_DIR(8)) dut (
    .clk, .rst_n, .link_enable,
    .fifo_entry(fentry), .fifo_empty(fempty), .fifo_afull(fxoff), .fifo_blocks(fblocks),
    .fifo_rd(frd), .seb_we, .seb_addr, .seb_data, .data_tail, .dir_tail, .dir_head,
    .dir_wr, .dir_wr_entry, .link_xoff(xoff), .data_used, .dir_used, .blocks_stored);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // expected blocks per link
  logic [31:0] exp_words [N][$];
  int          exp_len   [N][$];
  logic [11:0] exp_stat  [N][$];
  logic [63:0] mem [SEB_WORDS];
  dir_entry_t  held [$];       // stored entries not yet given back
  int          link_order [$];
  bit          give_back = 1;
  int          xoff_rises = 0, entries_seen = 0;

  function automatic logic [31:0] word_at(input dir_entry_t e, input int k);
    logic [63:0] w;
    w = mem[(int'(e.addr) + k / 2) % DATA_WORDS];
    return (k % 2 != 0) ? w[63:32] : w[31:0];
  endfunction

  // monitor, sampled half a cycle before the edge
  logic xoff_d = 0;
  always @(negedge clk) if (rst_n) begin
    if (xoff && !xoff_d) xoff_rises++;
    xoff_d = xoff;
    if (seb_we && !dir_wr) begin
      check(int'(seb_addr) < DATA_WORDS, "data write outside data region");
      mem[seb_addr] = seb_data;
    end
    if (dir_wr) begin
      dir_entry_t e;
      int l, n;
      e = dir_wr_entry;
      l = int'(e.link);
      entries_seen++;
      link_order.push_back(l);
      check(int'(seb_addr) == DATA_WORDS + int'(dir_head), "directory slot address");
      check(exp_len[l].size() > 0, "entry for a block that was sent");
      if (exp_len[l].size() > 0) begin
        n = exp_len[l].pop_front();
        check(int'(e.len) == n, $sformatf("length %0d vs %0d", e.len, n));
        check(e.status == exp_stat[l].pop_front(), "status");
        check(e.evt == hdr_evt(exp_words[l][0]), "event number");
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          w = exp_words[l].pop_front();
          check(word_at(e, k) == w, $sformatf("link %0d word %0d", l, k));
        end
      end
      held.push_back(e);
    end
  end

  // give space back in directory order, checking that stored data were not overwritten
  logic [31:0] keep [$];
  always @(posedge clk) if (rst_n && give_back && held.size() > 0 && $urandom_range(0, 3) == 0) begin
    dir_entry_t e;
    e = held.pop_front();
    data_tail <= AW'((int'(e.addr) + (int'(e.len) + 1) / 2) % DATA_WORDS);
    dir_tail  <= dir_tail + 1'b1;
  end

  // link drivers
  int evt_no [N];
  task automatic send_block(input int l, input int n, input bit bad_size, input logic [11:0] st);
    logic [31:0] w;
    int words;
    words = n + 3;
    #1;
    for (int k = 0; k < words; k++) begin
      while (fxoff[l] || xoff) begin @(posedge clk); #1; end
      if (k == 0)              begin w = {20'(evt_no[l]), 8'(l), 4'h0}; lctrl[l] = 1; end
      else if (k == words - 1) begin w = {12'(bad_size ? words + 1 : words), st, 8'h0}; lctrl[l] = 1; end
      else                     begin w = $urandom; lctrl[l] = 0; end
      ldata[l] = w; lwen[l] = 1;
      exp_words[l].push_back(w);
      @(posedge clk); #1;
      lwen[l] = 0;
    end
    exp_len[l].push_back(words);
    exp_stat[l].push_back(bad_size ? (st | 12'h800) : st);
    evt_no[l]++;
  endtask

  task automatic link_traffic(input int l, input int nblk);
    for (int b = 0; b < nblk; b++) begin
      logic [11:0] st;
      st = ($urandom_range(0, 9) == 0) ? 12'($urandom_range(1, 255)) : 12'h0;
      send_block(l, $urandom_range(0, 60), ($urandom_range(0, 15) == 0), st);
      repeat ($urandom_range(0, 10)) @(posedge clk);
      #1;
    end
  endtask

  // throughput: cycles with a FIFO read during one long block
  int busy_cycles = 0, rd_cycles = 0;

  initial begin
    lwen = 0; lctrl = 0; link_enable = '0; data_tail = '0; dir_tail = '0;
    for (int i = 0; i < N; i++) begin ldata[i] = 0; evt_no[i] = 0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // phase 1: round robin
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < N; l++) send_block(l, 10, 0, 12'h0);
    link_enable = '1;
    // measure transfer rate: count FIFO reads while the merger is in its transfer state
    repeat (200) begin
      @(negedge clk);
      if (dut.state == 2'd1) begin busy_cycles++; if (|frd) rd_cycles++; end
    end
    check(link_order.size() == 8, "eight blocks stored");
    for (int k = 0; k < link_order.size(); k++)
      check(link_order[k] == k % N, $sformatf("round robin position %0d got link %0d", k, link_order[k]));
    check(busy_cycles == rd_cycles, $sformatf("one word per cycle during transfer (%0d/%0d)", rd_cycles, busy_cycles));
    check(busy_cycles == 8 * 7, $sformatf("transfer cycles %0d", busy_cycles));
    // phase 2: random traffic
    fork
      link_traffic(0, 30);
      link_traffic(1, 30);
      link_traffic(2, 30);
      link_traffic(3, 30);
    join
    repeat (500) @(posedge clk);
    check(xoff_rises == 0, "no xoff with space given back quickly");
    // phase 3: nothing given back
    give_back = 0;
    fork
      link_traffic(0, 20);
      link_traffic(1, 20);
      link_traffic(2, 20);
      link_traffic(3, 20);
      begin
        repeat (4000) @(posedge clk);
        check(xoff, "xoff raised with the buffer filling");
        check(int'(data_used) <= DATA_WORDS - 1, "no overfill");
        // every held block still intact is checked when given back below
        give_back = 1;
      end
    join
    repeat (3000) @(posedge clk);
    check(xoff_rises >= 1, "xoff rose");
    check(!xoff, "xon after space is given back");
    for (int l = 0; l < N; l++) check(exp_len[l].size() == 0, $sformatf("link %0d all blocks stored", l));
    check(entries_seen == 8 + 4 * 50, $sformatf("entry count %0d", entries_seen));
    check(blocks_stored == 32'(entries_seen), "blocks_stored counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
