// tb_link_fifo: self-checking test of the input FIFO.
// Sends random blocks (header word 0 flagged, trailer flagged, 1..20 words between) with idle
// gaps, reads the 64-bit entries back with random stalls, and checks that the words come back in
// order with the right first/last/hi_valid flags and that the block count follows. Then checks
// that a stray data word is dropped, that link_xoff rises XOFF_MARGIN entries before full, and
// that words written into a full FIFO are dropped and counted.
module tb_link_fifo;
  import ru_pkg::*;
  localparam int DEPTH = 16;
  localparam int MARGIN = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] link_data;
  logic        link_ctrl, link_wen, link_xoff, rd_en, empty, full;
  fifo_entry_t rd_entry;
  logic [15:0] blocks, dropped;

  link_fifo #(.DEPTH(DEPTH), .XOFF_MARGIN(MARGIN)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected word stream: {first_of_block, last_of_block, word}
  logic [33:0] exp_q [$];
  bit reading = 1;

  // reader
  always @(negedge clk) begin
    rd_en = reading && rst_n && ($urandom_range(0, 3) != 0);
    if (rd_en && !empty) begin
      logic [33:0] e;
      e = exp_q.pop_front();
      check(rd_entry.lo == e[31:0], $sformatf("lo word %h vs %h", rd_entry.lo, e[31:0]));
      check(rd_entry.first == e[33], "first flag");
      if (e[32]) check(rd_entry.last && !rd_entry.hi_valid, "odd block end");
      else begin
        e = exp_q.pop_front();
        check(rd_entry.hi_valid && rd_entry.hi == e[31:0], $sformatf("hi word %h vs %h", rd_entry.hi, e[31:0]));
        check(rd_entry.last == e[32], "last flag");
      end
    end
  end

  task automatic send(input logic [31:0] d, input logic c);
    while (link_xoff && reading) @(posedge clk);
    #1;
    link_data = d; link_ctrl = c; link_wen = 1;
    @(posedge clk); #1;
    link_wen = 0;
  endtask

  int nblk;
  initial begin
    link_wen = 0; link_ctrl = 0; link_data = 0; rd_en = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (nblk = 0; nblk < 60; nblk++) begin
      automatic int n = $urandom_range(1, 20);
      logic [31:0] w;
      w = {20'(nblk), 12'h5A0};
      exp_q.push_back({1'b1, 1'b0, w});  send(w, 1);
      for (int k = 0; k < n; k++) begin
        w = $urandom;
        exp_q.push_back({2'b00, w}); send(w, 0);
        if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      w = {12'(n + 2), 12'h0, 8'h00};
      exp_q.push_back({1'b0, 1'b1, w}); send(w, 1);
      while (link_xoff) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "all words read back");
    check(blocks == 0, "block count back to zero");
    check(dropped == 0, "nothing dropped");
    // stray data word outside a block
    send(32'hDEAD_BEEF, 0);
    @(posedge clk);
    check(dropped == 1, "stray word dropped");
    // fill without reading
    reading = 0; rd_en = 0;
    send(32'h0000_1000, 1);
    for (int k = 0; k < 2*DEPTH + 4; k++) begin
      if (k == 2*(DEPTH - MARGIN) - 3) begin
        @(posedge clk);
        check(!link_xoff, "no xoff below the margin");
      end
      if (k == 2*(DEPTH - MARGIN) - 1) begin
        @(posedge clk);
        check(link_xoff, "xoff at the margin");
      end
      send($urandom, 0);
    end
    @(posedge clk);
    check(full, "full after overfilling");
    check(link_xoff, "xoff while full");
    check(dropped > 1, "words into a full FIFO are dropped");
    check(blocks == 0, "no whole block held");
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
