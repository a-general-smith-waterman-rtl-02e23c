// tb_crec_rom: a ROM whose contents are word k = k*37 + 5 (mod 2^12);
// reads every address and two beyond the end (which must read 0).
module tb_crec_rom;
  localparam int unsigned D = 13;
  function automatic logic [D*12-1:0] init_v();
    logic [D*12-1:0] v;
    for (int k = 0; k < D; k++) v[k*12 +: 12] = 12'(k * 37 + 5);
    return v;
  endfunction
  logic [3:0]  addr;
  logic [11:0] data;
  int checks = 0, failures = 0;

  crec_rom #(.WIDTH(12), .DEPTH(D), .INIT(init_v())) dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      addr = 4'(k);
      #1;
      checks++;
      if (data !== ((k < D) ? 12'(k * 37 + 5) : 12'h0)) begin
        failures++; $display("FAIL addr %0d data %h", k, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
