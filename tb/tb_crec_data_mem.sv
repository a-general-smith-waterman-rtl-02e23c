// tb_crec_data_mem: random LOAD and STORE traffic against a model memory,
// including loads right after a store to the same address (store-buffer
// forwarding). The load buffer is checked one cycle after each load.
module tb_crec_data_mem;
  logic clk = 0, rst_n = 0, load = 0, store = 0;
  logic [15:0] load_addr = '0, store_addr = '0, store_data = '0, lbuf;
  int checks = 0, failures = 0, n_fwd = 0;
  always #5 clk = ~clk;

  crec_data_mem #(.WIDTH(16), .DEPTH(16)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model [16];
    logic [15:0] exp_v;
    int last_store;
    @(negedge clk); rst_n = 1;
    // initialise every word
    for (int a = 0; a < 16; a++) begin
      store = 1; store_addr = 16'(a); store_data = 16'($urandom); model[a] = store_data;
      @(negedge clk);
    end
    store = 0; @(negedge clk);
    last_store = -1;
    for (int n = 0; n < 600; n++) begin
      store = $urandom_range(1);
      load  = $urandom_range(1);
      store_addr = 16'($urandom_range(15));
      store_data = 16'($urandom);
      load_addr  = (last_store >= 0 && $urandom_range(1)) ? 16'(last_store) : 16'($urandom_range(15));
      if (load && last_store == int'(load_addr)) n_fwd++;
      exp_v = model[load_addr[3:0]];
      @(negedge clk);
      if (load) begin
        checks++;
        if (lbuf !== exp_v) begin failures++; $display("FAIL n=%0d addr %0d %h/%h", n, load_addr, lbuf, exp_v); end
      end
      if (store) begin model[store_addr[3:0]] = store_data; last_store = int'(store_addr); end
      else last_store = -1;
    end
    checks++;
    if (n_fwd == 0) begin failures++; $display("FAIL: no forwarding case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
