// tb_crec_param_eu: loads random values into a parameter EU and checks that
// it holds each one until the next load.
module tb_crec_param_eu;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [15:0] din = '0, acc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crec_param_eu dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_v;
    @(negedge clk); rst_n = 1;
    exp_v = 0;
    for (int n = 0; n < 200; n++) begin
      ld  = ($urandom_range(2) == 0);
      din = 16'($urandom);
      @(negedge clk);
      if (ld) exp_v = din;
      checks++;
      if (acc !== exp_v) begin failures++; $display("FAIL n=%0d %h/%h", n, acc, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
