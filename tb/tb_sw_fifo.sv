// tb_sw_fifo: random push/pop traffic on a 16-deep FIFO, including
// simultaneous push and pop when full (recirculation), compared with a
// queue model; checks the head word, count, empty and full every cycle.
module tb_sw_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [4:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0, n_full_pp = 0;
  always #5 clk = ~clk;

  sw_fifo #(.WIDTH(5), .DEPTH(16)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] q[$];
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = $urandom_range(9);
      push = 0; pop = 0;
      if (n % 400 < 200) begin
        if (r < 6 && q.size() < 16) push = 1;
        if (r > 6 && q.size() > 0) pop = 1;
        if (q.size() == 16 && r > 3) begin push = 1; pop = 1; end
      end else begin
        if (r < 3 && q.size() < 16) push = 1;
        if (r > 3 && q.size() > 0) pop = 1;
      end
      wr_data = 5'($urandom);
      if (push && pop && q.size() == 16) n_full_pp++;
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
      checks++;
      if (32'(count) != q.size() || empty !== (q.size() == 0) || full !== (q.size() == 16) ||
          (q.size() > 0 && rd_data !== q[0])) begin
        failures++;
        $display("FAIL n=%0d size %0d count %0d head %h/%h", n, q.size(), count, rd_data,
                 (q.size() > 0) ? q[0] : 5'h0);
      end
    end
    checks++;
    if (n_full_pp == 0) begin failures++; $display("FAIL: no push+pop when full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
