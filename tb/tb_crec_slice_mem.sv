// tb_crec_slice_mem: slice memory with word k = k*k + 3; checks the
// one-cycle read latency and that `en` low holds the output.
module tb_crec_slice_mem;
  localparam int unsigned D = 10;
  function automatic logic [D*20-1:0] init_v();
    logic [D*20-1:0] v;
    for (int k = 0; k < D; k++) v[k*20 +: 20] = 20'(k * k + 3);
    return v;
  endfunction
  logic clk = 0, en = 0;
  logic [3:0]  addr = '0;
  logic [19:0] data, prev;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crec_slice_mem #(.WIDTH(20), .DEPTH(D), .INIT(init_v())) dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom_range(D - 1);
      en = ($urandom_range(3) != 0);
      addr = 4'(a);
      prev = data;
      @(negedge clk);
      checks++;
      if (en ? (data !== 20'(a * a + 3)) : (n > 0 && data !== prev)) begin
        failures++; $display("FAIL n=%0d en %b addr %0d data %h", n, en, a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
