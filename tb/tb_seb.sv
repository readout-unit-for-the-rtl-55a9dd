// tb_seb: self-checking test of the subevent buffer.
// Writes random words through port A while reading random addresses through port B, against a
// reference array kept in the testbench. Checks the one-cycle read latency, that b_q holds while
// b_en is low, and that a read of the address being written returns the old word.
module tb_seb;
  localparam int WORDS = 4096;
  localparam int AW = $clog2(WORDS);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [63:0]   a_data, b_q;

  seb #(.WORDS(WORDS)) dut (.*);

  logic [63:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    a_we = 0; b_en = 0; a_addr = 0; b_addr = 0; a_data = 0;
    // fill
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      a_we = 1; a_addr = AW'(i); a_data = ref_mem[i];
      @(posedge clk); #1;
    end
    a_we = 0;
    // random traffic
    for (int t = 0; t < 5000; t++) begin
      logic [63:0] expect_q;
      logic        do_rd;
      int          ra;
      do_rd = ($urandom_range(0, 3) != 0);
      ra = $urandom_range(0, WORDS - 1);
      a_we = ($urandom_range(0, 1) == 1);
      a_addr = (t % 7 == 0) ? AW'(ra) : AW'($urandom_range(0, WORDS - 1));
      a_data = {$urandom, $urandom};
      b_en = do_rd; b_addr = AW'(ra);
      expect_q = do_rd ? ref_mem[ra] : b_q;
      @(posedge clk); #1;
      if (a_we) ref_mem[a_addr] = a_data;
      check(b_q == expect_q, $sformatf("read %0d: %h vs %h", ra, b_q, expect_q));
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
