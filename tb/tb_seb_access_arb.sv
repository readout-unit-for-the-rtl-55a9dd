// tb_seb_access_arb: test of the shared memory-like read port.
//
// A responder stands in for the buffer port: it takes a request at a clock edge only when it is
// free (it looks at host_req half a cycle before the edge), answers after a random 1 to 6
// cycles with a word computed from the address, and counts every request it takes. Two requesters (network side, 64-bit words; processor, 32-bit words)
// issue random reads, each holding req until its ack and dropping it at the next clock edge. Checked: every
// answer carries the right word or half word; the number of reads taken equals the number of
// acks (nothing lost, nothing served twice); an ack only reaches a requester that is waiting;
// while both request without pause they are served alternately; the test ends in time.
module tb_seb_access_arb;
  localparam int AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          net_req, net_ack, mcu_req, mcu_ack, host_req, host_ack;
  logic [AW-1:0] net_addr, host_addr;
  logic [AW:0]   mcu_addr;
  logic [63:0]   net_data, host_data;
  logic [31:0]   mcu_data;

  seb_access_arb #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endfunction

  function automatic logic [63:0] mem_word(input logic [AW-1:0] a);
    return {22'h2A5A5A ^ 22'(a), 10'(a), 22'h135AC3 ^ 22'(a), 10'(~a)};
  endfunction

  // responder: one read at a time
  int taken = 0, acks = 0;
  logic [AW-1:0] resp_addr;
  initial begin
    host_ack = 0; host_data = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (host_req) begin
        // the request is taken at the next rising edge
        resp_addr = host_addr;
        taken++;
        @(posedge clk); #1;
        repeat ($urandom_range(0, 5)) @(posedge clk);
        #1;
        host_ack = 1; host_data = mem_word(resp_addr);
        @(posedge clk); #1;
        host_ack = 0; host_data = {$urandom(), $urandom()};
      end
    end
  end

  // requesters
  int net_done = 0, mcu_done = 0;
  bit continuous = 0;
  int order [$];
  task automatic net_read();
    logic [AW-1:0] a;
    a = AW'($urandom());
    net_req = 1; net_addr = a;
    do @(negedge clk); while (!net_ack);
    check(net_data == mem_word(a), $sformatf("network read of %0d", a));
    net_done++;
    if (continuous) order.push_back(0);
    @(posedge clk); #1;
    net_req = 0;
  endtask
  task automatic mcu_read();
    logic [AW:0] a;
    logic [63:0] w;
    a = (AW+1)'($urandom());
    mcu_req = 1; mcu_addr = a;
    do @(negedge clk); while (!mcu_ack);
    w = mem_word(a[AW:1]);
    check(mcu_data == (a[0] ? w[63:32] : w[31:0]), $sformatf("processor read of %0d", a));
    mcu_done++;
    if (continuous) order.push_back(1);
    @(posedge clk); #1;
    mcu_req = 0;
  endtask

  // acks go only to a waiting requester
  always @(negedge clk) if (rst_n) begin
    if (net_ack) begin check(net_req, "network ack without request"); acks++; end
    if (mcu_ack) begin check(mcu_req, "processor ack without request"); acks++; end
    check(!(net_ack && mcu_ack), "one ack at a time");
  end

  initial begin
    net_req = 0; net_addr = '0; mcu_req = 0; mcu_addr = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // random traffic
    fork
      repeat (300) begin repeat ($urandom_range(0, 8)) @(posedge clk); #1; net_read(); end
      repeat (300) begin repeat ($urandom_range(0, 8)) @(posedge clk); #1; mcu_read(); end
    join
    // both without pause: alternate service
    continuous = 1;
    fork
      repeat (50) net_read();
      repeat (50) mcu_read();
    join
    continuous = 0;
    repeat (10) @(posedge clk);
    check(net_done == 350 && mcu_done == 350, "all reads answered");
    check(taken == acks && acks == 700, $sformatf("reads taken %0d, acks %0d", taken, acks));
    begin
      automatic int alt = 0;
      for (int i = 1; i < 80; i++) if (order[i] != order[i-1]) alt++;
      check(alt >= 75, $sformatf("alternating service while both wait (%0d of 79 changes)", alt));
    end
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
