// tb_slink_out_mux: self-checking test of the output multiplexer.
// Checks the three modes: subevents to PCI (S-Link idle), subevents to the S-Link transmitter
// (control flag on header word 0 and trailer, held by the link-full flag), and bypass of one
// input link to the transmitter one cycle later, with the link-full flag returned to that link.
module tb_slink_out_mux;
  import ru_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             cfg_to_slink, cfg_bypass, sev_valid, sev_ready, pci_valid, pci_ready;
  logic [1:0]       cfg_bypass_link;
  sev_word_t        sev_word, pci_word;
  logic [31:0]      link_data [N];
  logic [N-1:0]     link_ctrl, link_wen, bypass_xoff;
  logic [31:0]      slink_data;
  logic             slink_ctrl, slink_wen, slink_lff;

  slink_out_mux #(.N_LINKS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int pci_words = 0, sl_words = 0, stalls = 0;
  logic [32:0] exp_q [$];   // {ctrl, data} expected on the S-Link

  always @(negedge clk) if (rst_n) begin
    if (slink_wen) begin
      logic [32:0] e;
      check(exp_q.size() > 0, "unexpected S-Link word");
      e = exp_q.pop_front();
      check({slink_ctrl, slink_data} == e, $sformatf("S-Link word %h vs %h", {slink_ctrl, slink_data}, e));
      sl_words++;
    end
  end

  task automatic offer(input sev_word_t w);
    sev_valid = 1; sev_word = w;
    @(negedge clk);
    while (!sev_ready) begin stalls++; @(negedge clk); end
    @(posedge clk); #1;
    sev_valid = 0;
  endtask

  initial begin
    cfg_to_slink = 0; cfg_bypass = 0; cfg_bypass_link = 0; sev_valid = 0; sev_word = '0;
    pci_ready = 1; slink_lff = 0; link_ctrl = 0; link_wen = 0;
    for (int i = 0; i < N; i++) link_data[i] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // to PCI
    for (int k = 0; k < 20; k++) begin
      sev_word_t w;
      w = '{sop: k == 0, eop: k == 19, data: $urandom};
      sev_valid = 1; sev_word = w; pci_ready = (k % 3 != 0);
      #1;
      check(pci_valid && pci_word == w, "word passed to PCI");
      check(sev_ready == pci_ready, "PCI back-pressure");
      @(posedge clk); #1;
    end
    sev_valid = 0; pci_ready = 1;
    check(sl_words == 0, "S-Link idle in PCI mode");
    // to S-Link, with link-full
    cfg_to_slink = 1;
    for (int k = 0; k < 20; k++) begin
      sev_word_t w;
      w = '{sop: k == 0, eop: k == 19, data: $urandom};
      exp_q.push_back({w.sop || w.eop, w.data});
      slink_lff = (k % 4 == 1);
      fork
        begin repeat (2) @(posedge clk); #1 slink_lff = 0; end
        offer(w);
      join
      #1;
      check(!pci_valid, "nothing to PCI in S-Link mode");
    end
    repeat (3) @(posedge clk);
    check(sl_words == 20, $sformatf("20 words on S-Link, got %0d", sl_words));
    check(stalls > 0, "link-full held the stream");
    // bypass of link 2
    cfg_bypass = 1; cfg_bypass_link = 2;
    @(posedge clk); #1;
    for (int k = 0; k < 30; k++) begin
      for (int i = 0; i < N; i++) link_data[i] = $urandom;
      link_wen = 4'($urandom); link_ctrl = 4'($urandom);
      if (link_wen[2]) exp_q.push_back({link_ctrl[2], link_data[2]});
      slink_lff = (k % 5 == 0);
      #1;
      check(bypass_xoff == {1'b0, slink_lff, 2'b0}, "link-full returned to the bypassed link");
      @(posedge clk); #1;
    end
    link_wen = 0; slink_lff = 0;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "all bypass words transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
