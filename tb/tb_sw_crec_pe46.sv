// tb_sw_crec_pe46: the Smith-Waterman array at the largest size of the
// device table, 46 PEs (276 sequence EUs plus loop, pass and top-row EUs),
// on short strings with 128-word FIFOs so that it simulates in seconds.
// Same procedure as tb_sw_crec_top: the host loads S, T, the boundary column
// H[i][0] = i*ins and the costs, starts the program and reads back the last
// column of H, which is compared word by word with a software edit-distance
// table; the run time is compared with sw_prog_pkg::cycles(). Jobs run one
// and two passes over S. The test counts the cell cases (match, mismatch,
// minimum from the diagonal, above, left) and the multi-pass jobs and fails
// if one never occurred. Only the array size differs from the default
// configuration; the program is generated for it by the same functions.
module tb_sw_crec_pe46;
  import crec_pkg::*;

  localparam int unsigned NPE = 46;
  localparam int unsigned CW  = 5;
  localparam int unsigned FD  = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          s_push = 0, t_push = 0, d_push = 0, d_pop = 0, start = 0;
  logic [CW-1:0] s_data = '0, t_data = '0;
  logic [W-1:0]  d_data = '0, d_rdata, par_din = '0;
  logic [4:0]    par_ld = '0;
  logic [$clog2(FD+1)-1:0] s_count, t_count, d_count;
  logic busy, done;

  sw_crec_top #(.NPE(NPE), .CW(CW), .FIFO_DEPTH(FD)) dut (.*);

  int checks = 0, failures = 0;
  int n_match = 0, n_mismatch = 0, n_min_a = 0, n_min_b = 0, n_min_c = 0, n_multi = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_job(int L, int passes, int ins, int del, int sub, int alpha);
    int m;
    int S[], T[];
    int H[][];
    int got;
    longint t0, t1;
    int unsigned exp_cyc;
    m = passes * NPE;
    S = new[m + 1];
    T = new[L + 1];
    H = new[L + 1];
    for (int i = 0; i <= L; i++) H[i] = new[m + 1];
    for (int j = 1; j <= m; j++) S[j] = $urandom_range(alpha - 1);
    for (int i = 1; i <= L; i++) T[i] = $urandom_range(alpha - 1);
    // reference table
    for (int j = 0; j <= m; j++) H[0][j] = j * del;
    for (int i = 1; i <= L; i++) begin
      H[i][0] = i * ins;
      for (int j = 1; j <= m; j++) begin
        int va, vb, vc, d;
        va = H[i-1][j-1] + ((T[i] == S[j]) ? 0 : sub);
        vb = H[i-1][j] + ins;
        vc = H[i][j-1] + del;
        if (T[i] == S[j]) n_match++; else n_mismatch++;
        d = va;
        if (vb < d) d = vb;
        if (vc < d) d = vc;
        if (d == va) n_min_a++;
        if (d == vb && vb < va) n_min_b++;
        if (d == vc && vc < va && vc < vb) n_min_c++;
        H[i][j] = d;
      end
    end
    // load the FIFOs and the parameter EUs
    @(negedge clk);
    for (int j = 1; j <= m; j++) begin s_push = 1; s_data = CW'(S[j]); @(negedge clk); end
    s_push = 0;
    for (int i = 1; i <= L; i++) begin
      t_push = 1; t_data = CW'(T[i]);
      d_push = 1; d_data = W'(H[i][0]);
      @(negedge clk);
    end
    t_push = 0; d_push = 0;
    foreach (par_ld[p]) begin
      par_ld = 5'(1 << p);
      case (p)
        0: par_din = W'(ins);
        1: par_din = W'(del);
        2: par_din = W'(sub);
        3: par_din = W'(L);
        default: par_din = W'(passes);
      endcase
      @(negedge clk);
    end
    par_ld = '0;
    check(32'(s_count) == m && 32'(t_count) == L && 32'(d_count) == L, "FIFO fill levels");
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    t1 = cyc;
    exp_cyc = sw_prog_pkg::cycles(NPE, L, passes);
    check(t1 - t0 == longint'(exp_cyc), $sformatf("cycle count %0d, expected %0d", t1 - t0, exp_cyc));
    check(32'(d_count) == L && s_count == 0 && 32'(t_count) == L, "FIFO levels after run");
    for (int i = 1; i <= L; i++) begin
      got = int'(d_rdata);
      check(got == H[i][m], $sformatf("L=%0d m=%0d row %0d: got %0d expected %0d", L, m, i, got, H[i][m]));
      d_pop = 1; @(negedge clk); d_pop = 0;
    end
    // empty T for the next job
    while (t_count != 0) begin
      // the host has no T pop; reset the array between jobs instead
      rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    end
    if (passes > 1) n_multi++;
    $display("job L=%0d m=%0d ins=%0d del=%0d sub=%0d: distance %0d, %0d cycles",
             L, m, ins, del, sub, H[L][m], t1 - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_job(60, 1, 1, 1, 1, 4);
    run_job(100, 2, 3, 5, 7, 4);
    run_job(50, 2, 15, 15, 15, 32);
    check(n_match > 0,    "match case never occurred");
    check(n_mismatch > 0, "mismatch case never occurred");
    check(n_min_a > 0,    "diagonal minimum never occurred");
    check(n_min_b > 0,    "minimum from above never occurred");
    check(n_min_c > 0,    "minimum from the left never occurred");
    check(n_multi > 0,    "multi-pass run never occurred");
    $display("cases: match %0d mismatch %0d diag %0d above %0d left %0d multipass jobs %0d",
             n_match, n_mismatch, n_min_a, n_min_b, n_min_c, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
