// tb_sw_crec_full: one complete job on the array at its default size
// (7 PEs, 4096-word FIFOs): a 4096-character T against a 4095-character S
// (585 passes of 7 columns, the largest multiple of 7 the S FIFO holds),
// random characters over the full 32-letter alphabet and random costs.
// About 21.6 million clock cycles. All 4096 words of the last column are compared with a
// software edit-distance computation, and the run time with
// sw_prog_pkg::cycles().
module tb_sw_crec_full;
  import crec_pkg::*;

  localparam int unsigned NPE    = 7;
  localparam int unsigned L      = 4096;
  localparam int unsigned PASSES = 585;
  localparam int unsigned M      = NPE * PASSES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         s_push = 0, t_push = 0, d_push = 0, d_pop = 0, start = 0;
  logic [4:0]   s_data = '0, t_data = '0;
  logic [W-1:0] d_data = '0, d_rdata, par_din = '0;
  logic [4:0]   par_ld = '0;
  logic [12:0]  s_count, t_count, d_count;
  logic busy, done;

  sw_crec_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int S[M + 1], T[L + 1], row[M + 1], last[L + 1];
    int ins, del, sub, diag, tmp;
    longint t0;
    ins = 1 + $urandom_range(14); del = 1 + $urandom_range(14); sub = $urandom_range(15);
    for (int j = 1; j <= M; j++) S[j] = $urandom_range(31);
    for (int i = 1; i <= L; i++) T[i] = (i % 5 == 0) ? S[1 + (i % M)] : $urandom_range(31);
    // reference, one row at a time
    for (int j = 0; j <= M; j++) row[j] = j * del;
    for (int i = 1; i <= L; i++) begin
      diag = row[0];
      row[0] = i * ins;
      for (int j = 1; j <= M; j++) begin
        int d;
        d = diag + ((T[i] == S[j]) ? 0 : sub);
        if (row[j] + ins < d) d = row[j] + ins;
        if (row[j-1] + del < d) d = row[j-1] + del;
        diag = row[j];
        row[j] = d;
      end
      last[i] = row[M];
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 1; j <= M; j++) begin s_push = 1; s_data = 5'(S[j]); @(negedge clk); end
    s_push = 0;
    for (int i = 1; i <= L; i++) begin
      t_push = 1; t_data = 5'(T[i]); d_push = 1; d_data = W'(i * ins); @(negedge clk);
    end
    t_push = 0; d_push = 0;
    for (int p = 0; p < 5; p++) begin
      par_ld = 5'(1 << p);
      par_din = W'((p == 0) ? ins : (p == 1) ? del : (p == 2) ? sub : (p == 3) ? L : PASSES);
      @(negedge clk);
    end
    par_ld = '0;
    start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    check(cyc - t0 == longint'(sw_prog_pkg::cycles(NPE, L, PASSES)),
          $sformatf("cycle count %0d expected %0d", cyc - t0, sw_prog_pkg::cycles(NPE, L, PASSES)));
    check(32'(d_count) == L, "d FIFO level");
    for (int i = 1; i <= L; i++) begin
      check(int'(d_rdata) == last[i], $sformatf("row %0d: got %0d expected %0d", i, d_rdata, last[i]));
      d_pop = 1; @(negedge clk); d_pop = 0;
    end
    $display("edit distance %0d after %0d cycles (ins=%0d del=%0d sub=%0d)", last[L], cyc - t0, ins, del, sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
