// tb_out_packer: self-checking test of the 32-to-64-bit output packer.
// Sends subevents of random odd and even lengths with random gaps, stalls the output at random,
// and checks every 64-bit beat (halves, hi_valid, sop, eop) against a model, the beat count,
// and one beat per two input words when nothing stalls.
module tb_out_packer;
  import ru_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_hi_valid, out_sop, out_eop, out_ready;
  sev_word_t   in_word;
  logic [63:0] out_data;
  logic [31:0] beats;

  out_packer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // expected beats: {hi_valid, sop, eop, data}
  logic [66:0] exp_q [$];
  int nbeats = 0;
  bit stall = 1;

  always @(negedge clk) begin
    out_ready = !stall || ($urandom_range(0, 2) != 0);
    if (rst_n && out_valid && out_ready) begin
      logic [66:0] e;
      check(exp_q.size() > 0, "unexpected beat");
      e = exp_q.pop_front();
      check(out_hi_valid == e[66] && out_sop == e[65] && out_eop == e[64], "beat flags");
      check(out_data[31:0] == e[31:0], "low half");
      if (e[66]) check(out_data[63:32] == e[63:32], "high half");
      nbeats++;
    end
  end

  task automatic send_sev(input int n);
    logic [31:0] w [$];
    for (int k = 0; k < n; k++) w.push_back($urandom);
    for (int k = 0; k < n; k += 2) begin
      if (k + 1 < n) exp_q.push_back({1'b1, k == 0, k + 1 == n - 1, w[k+1], w[k]});
      else           exp_q.push_back({1'b0, k == 0, 1'b1, 32'h0, w[k]});
    end
    for (int k = 0; k < n; k++) begin
      in_valid = 1; in_word = '{sop: k == 0, eop: k == n - 1, data: w[k]};
      do @(posedge clk); while (!in_ready);
      #1;
      in_valid = 0;
      if (stall && $urandom_range(0, 4) == 0) begin @(posedge clk); #1; end
    end
  endtask

  int t0;
  initial begin
    in_valid = 0; in_word = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < 200; s++) send_sev($urandom_range(3, 40));
    repeat (50) @(posedge clk);
    check(exp_q.size() == 0, "all beats delivered");
    check(beats == 32'(nbeats), "beat counter");
    // full rate
    stall = 0;
    @(negedge clk);
    t0 = nbeats;
    begin
      int c0;
      c0 = 0;
      fork
        send_sev(200);
        repeat (205) begin @(posedge clk); c0++; end
      join
      check(nbeats - t0 == 100, $sformatf("100 beats in 205 cycles, got %0d", nbeats - t0));
    end
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all beats delivered at full rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
