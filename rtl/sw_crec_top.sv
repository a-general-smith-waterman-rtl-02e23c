// sw_crec_top: Smith-Waterman edit-distance array built on the CREC processor.
//
// The design computes the edit-distance table H of a pattern S (m
// characters) against a text T (L characters) for any costs ins, del,
// sub in 0..15 and a 32-letter alphabet (5-bit characters). NPE processing
// elements, each made of six 16-bit EUs, form a linear systolic array: PE k
// holds one character of S and computes one column of H, while T streams
// through the PEs one position per step (nine clock cycles). Columns are
// handled NPE at a time: each pass reads the left boundary column from the
// d FIFO and writes the pass's last column back into it, so after
// ceil(m/NPE) passes the d FIFO holds the last column H[1..L][m], whose final
// word is the edit distance of S and T.
//
// Parts: one crec_core with 6*NPE + 3 EUs (the PEs plus loop counter, pass
// counter and top-row EUs) and five parameter EUs (ins, del, sub, L, number
// of passes), running the program of sw_prog_pkg; three sw_fifo instances
// for S, T and d. The FIFOs sit on EU ports: S enters the last PE's EU 1
// (R1) and is shifted down to PE 0, T enters PE 0's EU 2 (R2), the left
// boundary enters PE 0's EU 5 (R5), and the last PE's EU 1 writes its
// neighbour R3 (d) to the d FIFO. Each T character read is pushed back into
// the T FIFO, so T is replayed on every pass.
//
// Host protocol (all while `busy` is low): push S (m = passes*NPE
// characters), T (L characters) and the boundary column H[1..L][0] into the
// FIFOs; load the five parameter EUs with `par_ld[p]`/`par_din` (p = 0 ins,
// 1 del, 2 sub, 3 L, 4 passes); pulse `start`. `busy` is high while the
// program runs and `done` rises when it halts; then pop the L results from
// the d FIFO with `d_pop` (`d_rdata` shows the oldest). Requires L > NPE and
// L <= FIFO_DEPTH. The top row is taken as H[0][j] = j*del. Distances must
// stay below 16'hF000 (the sentinel of sw_prog_pkg).
//
// Timing: sw_prog_pkg::cycles(NPE, L, passes) cycles from the cycle after
// `start` to `done`, about 9 cycles per T character and pass.
//
// Sizes follow the document's main implementation (7 PEs, 4096-word FIFOs,
// 5-bit characters, 16-bit words). The loop control, S loading, top-row
// handling and FIFO recirculation are this design's own choices.
module sw_crec_top
  import crec_pkg::*;
#(
  parameter int unsigned NPE        = 7,
  parameter int unsigned CW         = 5,
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side of the FIFOs
  input  logic             s_push,
  input  logic [CW-1:0]    s_data,
  input  logic             t_push,
  input  logic [CW-1:0]    t_data,
  input  logic             d_push,
  input  logic [W-1:0]     d_data,
  input  logic             d_pop,
  output logic [W-1:0]     d_rdata,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] s_count,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] t_count,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] d_count,
  // parameter EUs
  input  logic [sw_prog_pkg::N_PAR-1:0] par_ld,
  input  logic [W-1:0]     par_din,
  // run control
  input  logic             start,
  output logic             busy,
  output logic             done
);
  localparam int unsigned N_EU  = sw_prog_pkg::n_eu(NPE);
  localparam int unsigned N_PAR = sw_prog_pkg::N_PAR;
  localparam int unsigned NS    = sw_prog_pkg::NSLICE;

  // ------------------------------------------------- program tables
  // Instruction memory of EU e: entry 0 is NOP, then each distinct
  // instruction of that EU in order of first use. Operand memory of EU e:
  // entry 0 is 0, then each distinct direct operand.
  function automatic int unsigned count_distinct(bit operands);
    int unsigned best, n, e, s, j;
    logic [NS:0][IW-1:0] li;
    logic [NS:0][15:0]   lv;
    sw_prog_pkg::op_word_t w;
    bit          found;
    best = 1;
    for (e = 0; e < N_EU; e++) begin
      n = 1; li = '0; lv = '0;
      for (s = 0; s < NS; s++) begin
        w = sw_prog_pkg::sw_op(NPE, e, s);
        found = 0;
        for (j = 0; j < n; j++)
          if (operands ? (lv[j] == w[15:0]) : (li[j] == w[IW+15:16])) found = 1;
        if (!found) begin li[n] = w[IW+15:16]; lv[n] = w[15:0]; n++; end
      end
      if (n > best) best = n;
    end
    return best;
  endfunction

  localparam int unsigned IMD = count_distinct(1'b0);
  localparam int unsigned OPD = count_distinct(1'b1);
  localparam int unsigned IPW = (IMD > 1) ? $clog2(IMD) : 1;
  localparam int unsigned OPW = (OPD > 1) ? $clog2(OPD) : 1;
  localparam int unsigned SWW = N_EU * (IPW + OPW);

  typedef logic [NS*SWW-1:0]      slice_bits_t;
  typedef logic [N_EU*IMD*IW-1:0] imem_bits_t;
  typedef logic [N_EU*OPD*W-1:0]  opmem_bits_t;

  // Slice words: per EU, its instruction and operand pointers.
  function automatic slice_bits_t build_sb();
    int unsigned e, s, j, ni, nv, pi, pv;
    logic [IMD-1:0][IW-1:0] li;
    logic [OPD-1:0][15:0]   lv;
    sw_prog_pkg::op_word_t w;
    slice_bits_t sb;
    for (s = 0; s < NS; s++) sb[s*SWW +: SWW] = '0;
    for (e = 0; e < N_EU; e++) begin
      ni = 1; nv = 1; li = '0; lv = '0;
      for (s = 0; s < NS; s++) begin
        w = sw_prog_pkg::sw_op(NPE, e, s);
        pi = ni;
        for (j = 0; j < ni; j++) if (li[j] == w[IW+15:16]) pi = j;
        if (pi == ni) begin li[ni] = w[IW+15:16]; ni++; end
        pv = nv;
        for (j = 0; j < nv; j++) if (lv[j] == w[15:0]) pv = j;
        if (pv == nv) begin lv[nv] = w[15:0]; nv++; end
        sb[s*SWW + e*(IPW+OPW) +: IPW]       = IPW'(pi);
        sb[s*SWW + e*(IPW+OPW) + IPW +: OPW] = OPW'(pv);
      end
    end
    return sb;
  endfunction

  function automatic imem_bits_t build_ib();
    int unsigned e, s, j, ni, pi;
    logic [IMD-1:0][IW-1:0] li;
    sw_prog_pkg::op_word_t w;
    imem_bits_t ib;
    for (e = 0; e < N_EU; e++) begin
      ni = 1; li = '0;
      for (s = 0; s < NS; s++) begin
        w = sw_prog_pkg::sw_op(NPE, e, s);
        pi = ni;
        for (j = 0; j < ni; j++) if (li[j] == w[IW+15:16]) pi = j;
        if (pi == ni) begin li[ni] = w[IW+15:16]; ni++; end
      end
      ib[e*IMD*IW +: IMD*IW] = li;
    end
    return ib;
  endfunction

  function automatic opmem_bits_t build_ob();
    int unsigned e, s, j, nv, pv;
    logic [OPD-1:0][15:0] lv;
    sw_prog_pkg::op_word_t w;
    opmem_bits_t ob;
    for (e = 0; e < N_EU; e++) begin
      nv = 1; lv = '0;
      for (s = 0; s < NS; s++) begin
        w = sw_prog_pkg::sw_op(NPE, e, s);
        pv = nv;
        for (j = 0; j < nv; j++) if (lv[j] == w[15:0]) pv = j;
        if (pv == nv) begin lv[nv] = w[15:0]; nv++; end
      end
      ob[e*OPD*W +: OPD*W] = lv;
    end
    return ob;
  endfunction

  localparam slice_bits_t SLICE_INIT = build_sb();
  localparam imem_bits_t  IMEM_INIT  = build_ib();
  localparam opmem_bits_t OPMEM_INIT = build_ob();

  // ------------------------------------------------- EU port map
  localparam int unsigned EU_T_IN  = 1;                 // PE 0, R2
  localparam int unsigned EU_C_IN  = 4;                 // PE 0, R5
  localparam int unsigned EU_S_IN  = 6 * (NPE - 1);     // last PE, R1
  localparam int unsigned EU_D_OUT = 6 * (NPE - 1);     // last PE, R1 (writes R3)

  logic [W-1:0]    in_port  [N_EU];
  logic [N_EU-1:0] in_stb, out_stb;
  logic [W-1:0]    out_data [N_EU];
  logic [W-1:0]    regs     [N_EU + N_PAR];
  logic            running;
  logic [$clog2(NS)-1:0] slice;

  // ------------------------------------------------- FIFOs
  logic [CW-1:0] s_head, t_head;
  logic [W-1:0]  d_head;
  logic s_empty, s_full, t_empty, t_full, d_empty, d_full;
  logic t_rd, s_rd, c_rd, d_wr;

  assign t_rd = in_stb[EU_T_IN];
  assign c_rd = in_stb[EU_C_IN];
  assign s_rd = in_stb[EU_S_IN];
  assign d_wr = out_stb[EU_D_OUT];

  sw_fifo #(.WIDTH(CW), .DEPTH(FIFO_DEPTH)) u_fifo_s (
    .clk(clk), .rst_n(rst_n),
    .push(s_push && !running), .wr_data(s_data),
    .pop(s_rd), .rd_data(s_head),
    .empty(s_empty), .full(s_full), .count(s_count)
  );

  // T is recirculated: every character the array reads goes back in.
  sw_fifo #(.WIDTH(CW), .DEPTH(FIFO_DEPTH)) u_fifo_t (
    .clk(clk), .rst_n(rst_n),
    .push(running ? t_rd : t_push), .wr_data(running ? t_head : t_data),
    .pop(t_rd), .rd_data(t_head),
    .empty(t_empty), .full(t_full), .count(t_count)
  );

  sw_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_fifo_d (
    .clk(clk), .rst_n(rst_n),
    .push(running ? d_wr : d_push), .wr_data(running ? out_data[EU_D_OUT] : d_data),
    .pop(running ? c_rd : d_pop), .rd_data(d_head),
    .empty(d_empty), .full(d_full), .count(d_count)
  );

  assign d_rdata = d_head;

  always_comb begin
    for (int e = 0; e < N_EU; e++) in_port[e] = '0;
    in_port[EU_T_IN] = W'(t_head);
    in_port[EU_C_IN] = d_head;
    in_port[EU_S_IN] = W'(s_head);
  end

  // ------------------------------------------------- processor
  crec_core #(
    .WIDTH(W), .N_EU(N_EU), .N_PAR(N_PAR), .NSLICE(NS),
    .IMD(IMD), .OPD(OPD), .DSTACK_D(2), .SSTACK_D(2), .DMEM_D(2),
    .SLICE_INIT(SLICE_INIT), .IMEM_INIT(IMEM_INIT), .OPMEM_INIT(OPMEM_INIT)
  ) u_core (
    .clk(clk), .rst_n(rst_n), .start(start),
    .running(running), .done(done), .slice(slice),
    .par_ld(running ? '0 : par_ld), .par_din(par_din),
    .in_port(in_port), .in_stb(in_stb),
    .out_data(out_data), .out_stb(out_stb), .regs_out(regs)
  );

  assign busy = running;

endmodule
