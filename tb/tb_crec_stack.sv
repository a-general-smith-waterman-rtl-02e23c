// tb_crec_stack: random push/pop/replace sequences on an 8-deep stack,
// compared with a queue model; checks top, empty and full every cycle.
module tb_crec_stack;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [15:0] din = '0, top;
  logic empty, full;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crec_stack #(.WIDTH(16), .DEPTH(8)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q[$];
    int n_full = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int r;
      r = $urandom_range(9);
      push = 0; pop = 0;
      if (r < 5 && q.size() < 8) push = 1;
      else if (r < 8 && q.size() > 0) pop = 1;
      else if (q.size() > 0) begin push = 1; pop = 1; end
      din = 16'($urandom);
      @(negedge clk);
      if (push && pop) q[$] = din;
      else if (push) q.push_back(din);
      else if (pop) void'(q.pop_back());
      if (q.size() == 8) n_full++;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 8) ||
          (q.size() > 0 && top !== q[$])) begin
        failures++;
        $display("FAIL n=%0d size %0d top %h empty %b full %b", n, q.size(), top, empty, full);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
