// tb_crec_slice_counter: start, sequential counting, jump, call with the
// returned slice, return, halting jump-to-self and restart, compared with
// a model of the counter.
module tb_crec_slice_counter;
  logic clk = 0, rst_n = 0, start = 0, jmp = 0, call = 0, ret = 0;
  logic [5:0] target = '0, ret_target = '0, sc, nxt, ret_slice;
  logic running, done;
  int checks = 0, failures = 0, n_halt = 0;
  always #5 clk = ~clk;

  crec_slice_counter #(.SW(6)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [5:0] e_sc;
    logic e_run, e_done;
    @(negedge clk); rst_n = 1;
    chk(!running && !done && sc == 0, "reset");
    e_sc = 0; e_run = 0; e_done = 0;
    for (int n = 0; n < 800; n++) begin
      int r;
      r = $urandom_range(19);
      start = 0; jmp = 0; call = 0; ret = 0;
      target = 6'($urandom); ret_target = 6'($urandom);
      if (!e_run) start = (r < 5);
      else if (r == 0) begin jmp = 1; target = e_sc; end
      else if (r < 3) jmp = 1;
      else if (r < 5) call = 1;
      else if (r < 7) ret = 1;
      #1;
      chk(ret_slice == 6'(e_sc + 1), "ret_slice");
      @(negedge clk);
      if (start) begin e_sc = 0; e_run = 1; e_done = 0; end
      else if (e_run) begin
        if (jmp && target == e_sc) begin e_run = 0; e_done = 1; n_halt++; end
        if (jmp || call) e_sc = target;
        else if (ret) e_sc = ret_target;
        else e_sc = e_sc + 1;
      end
      chk(sc == e_sc && running == e_run && done == e_done,
          $sformatf("n=%0d sc %0d/%0d run %b/%b done %b/%b", n, sc, e_sc, running, e_run, done, e_done));
    end
    chk(n_halt > 0, "no halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
