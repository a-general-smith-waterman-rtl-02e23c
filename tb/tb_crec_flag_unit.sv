// tb_crec_flag_unit: drives the flag unit with random results and carries,
// with and without the update and enable strobes, and checks the stored
// flags and all six condition-bus lines one cycle later.
module tb_crec_flag_unit;
  logic clk = 0, rst_n = 0, en = 0, upd = 0, cin = 0;
  logic [15:0] res = '0;
  logic zf, cf;
  logic [5:0] cond_bus;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crec_flag_unit dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ez, ec;
    logic [5:0] eb;
    @(negedge clk); rst_n = 1;
    checks++; if (zf || cf) begin failures++; $display("FAIL reset"); end
    ez = 0; ec = 0;
    for (int n = 0; n < 400; n++) begin
      en  = ($urandom_range(3) != 0);
      upd = ($urandom_range(3) != 0);
      res = ($urandom_range(2) == 0) ? 16'h0 : 16'($urandom);
      cin = $urandom_range(1);
      @(negedge clk);
      if (en && upd) begin ez = (res == 0); ec = cin; end
      eb = {ec | ez, !ec & !ez, !ec, ec, !ez, ez};
      checks++;
      if (zf !== ez || cf !== ec || cond_bus !== eb) begin
        failures++;
        $display("FAIL n=%0d zf %b/%b cf %b/%b bus %b/%b", n, zf, ez, cf, ec, cond_bus, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
