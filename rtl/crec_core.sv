// crec_core: the general CREC processor, sized by its parameters.
//
// N_EU execution units run one program slice per clock. The slice counter
// addresses the slice memory; the slice word read from it holds, for each
// EU, a pointer into that EU's instruction memory and a pointer into its
// direct-operand memory. The EUs then execute their instructions side by
// side, each reading any register of the machine through its register MUX.
// N_PAR parameter EUs (accumulator only, loaded by the host through
// `par_ld`/`par_din`) follow the EU registers in the register numbering:
// register k < N_EU is the accumulator of EU k, register N_EU + p is
// parameter EU p.
//
// Shared resources are reached over busses driven by the EUs' strobes:
//   * slice counter  - JMP/CALL take the target from the operand bus, RET
//                      from the slice stack; a JMP to its own slice halts;
//   * slice stack    - return slices of CALL;
//   * data stack     - PUSH writes the EU's accumulator, a MOV from the stack
//                      source (POP) reads the top and removes it;
//   * data memory    - LOAD/STORE through the load and store buffers;
//   * ports          - each EU has its own input port (`in_port`, read strobe
//                      `in_stb`) and output port (`out_data`, `out_stb`).
// The program must not let two EUs use the same shared resource in one
// slice; assertions check it, and the lowest-numbered EU wins otherwise.
//
// Timing: `start` (one cycle, while not running) begins execution at slice 0
// on the next cycle. `running` stays high until the halting jump; `done`
// then stays high. Port strobes are combinational in the cycle of the
// executing slice; the EU's accumulator takes an input-port word at the end
// of that cycle.
//
// The component list, the bus structure and the per-EU memories follow the
// processor description. Pointer widths are uniform here (the description
// sizes them per EU), the EUs are not trimmed to their instruction subset,
// and the memory sizes are parameters of this design. N_EU + N_PAR may not
// exceed the 2**RSELW registers the instruction word can select; elaboration
// stops with an error otherwise.
module crec_core
  import crec_pkg::*;
#(
  parameter int unsigned WIDTH    = crec_pkg::W,
  parameter int unsigned N_EU     = 2,
  parameter int unsigned N_PAR    = 1,
  parameter int unsigned NSLICE   = 2,
  parameter int unsigned IMD      = 2,   // instruction-memory words per EU
  parameter int unsigned OPD      = 2,   // operand-memory words per EU
  parameter int unsigned DSTACK_D = 16,
  parameter int unsigned SSTACK_D = 8,
  parameter int unsigned DMEM_D   = 256,
  parameter int unsigned SPW      = (NSLICE > 1) ? $clog2(NSLICE) : 1,
  parameter int unsigned IPW      = (IMD > 1) ? $clog2(IMD) : 1,
  parameter int unsigned OPW      = (OPD > 1) ? $clog2(OPD) : 1,
  parameter int unsigned SWW      = N_EU * (IPW + OPW),
  parameter logic [NSLICE*SWW-1:0]       SLICE_INIT = '0,
  parameter logic [N_EU*IMD*IW-1:0]      IMEM_INIT  = '0,
  parameter logic [N_EU*OPD*WIDTH-1:0]   OPMEM_INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             running,
  output logic             done,
  output logic [SPW-1:0]   slice,
  input  logic [N_PAR-1:0] par_ld,
  input  logic [WIDTH-1:0] par_din,
  input  logic [WIDTH-1:0] in_port  [N_EU],
  output logic [N_EU-1:0]  in_stb,
  output logic [WIDTH-1:0] out_data [N_EU],
  output logic [N_EU-1:0]  out_stb,
  output logic [WIDTH-1:0] regs_out [N_EU + N_PAR]
);
  localparam int unsigned NREG = N_EU + N_PAR;

  // Every register must be reachable through the register-select field.
  if (NREG > 2 ** RSELW) begin : g_nreg_check
    $error("crec_core: %0d registers exceed the %0d-bit register select", NREG, RSELW);
  end

  // ---------------------------------------------------------------- slices
  logic [SPW-1:0] nxt, ret_slice, ss_top_s;
  logic [SWW-1:0] sword;
  logic           jmp_any, call_any, ret_any;
  logic [WIDTH-1:0] target_w;
  logic [WIDTH-1:0] ss_top;

  crec_slice_mem #(.WIDTH(SWW), .DEPTH(NSLICE), .AW(SPW), .INIT(SLICE_INIT)) u_smem (
    .clk(clk), .en(1'b1), .addr(nxt), .data(sword)
  );

  assign ss_top_s = SPW'(ss_top);

  crec_slice_counter #(.SW(SPW)) u_sc (
    .clk(clk), .rst_n(rst_n), .start(start && !running),
    .jmp(jmp_any), .call(call_any), .ret(ret_any),
    .target(SPW'(target_w)), .ret_target(ss_top_s),
    .sc(slice), .nxt(nxt), .ret_slice(ret_slice),
    .running(running), .done(done)
  );

  logic ss_empty, ss_full;
  crec_stack #(.WIDTH(WIDTH), .DEPTH(SSTACK_D)) u_slice_stack (
    .clk(clk), .rst_n(rst_n), .push(call_any), .pop(ret_any),
    .din(WIDTH'(ret_slice)), .top(ss_top), .empty(ss_empty), .full(ss_full)
  );

  // ------------------------------------------------------------- EUs
  logic [WIDTH-1:0] regs [NREG];
  logic [WIDTH-1:0] acc  [N_EU];
  logic [WIDTH-1:0] opb  [N_EU];
  ctrl_t            ctl  [N_EU];
  logic [WIDTH-1:0] lbuf, ds_top;

  for (genvar e = 0; e < N_EU; e++) begin : g_eu
    logic [IPW-1:0]   iptr;
    logic [OPW-1:0]   optr;
    logic [IW-1:0]    iword;
    logic [WIDTH-1:0] imm;
    logic [5:0]       cb;

    assign iptr = sword[e*(IPW+OPW) +: IPW];
    assign optr = sword[e*(IPW+OPW) + IPW +: OPW];

    crec_rom #(.WIDTH(IW), .DEPTH(IMD), .AW(IPW),
               .INIT(IMEM_INIT[e*IMD*IW +: IMD*IW])) u_imem (
      .addr(iptr), .data(iword)
    );
    crec_rom #(.WIDTH(WIDTH), .DEPTH(OPD), .AW(OPW),
               .INIT(OPMEM_INIT[e*OPD*WIDTH +: OPD*WIDTH])) u_opmem (
      .addr(optr), .data(imm)
    );

    crec_eu #(.WIDTH(WIDTH), .NREG(NREG)) u_eu (
      .clk(clk), .rst_n(rst_n), .en(running),
      .instr(instr_t'(iword)), .imm(imm), .regs(regs),
      .lbuf(lbuf), .in_port(in_port[e]), .stk_top(ds_top),
      .acc(acc[e]), .opbus(opb[e]), .ctrl(ctl[e]), .cond_bus(cb)
    );

    assign regs[e]     = acc[e];
    assign in_stb[e]   = ctl[e].stb;
    assign out_stb[e]  = ctl[e].out;
    assign out_data[e] = opb[e];
  end

  for (genvar p = 0; p < N_PAR; p++) begin : g_par
    crec_param_eu #(.WIDTH(WIDTH)) u_par (
      .clk(clk), .rst_n(rst_n), .ld(par_ld[p]), .din(par_din), .acc(regs[N_EU + p])
    );
  end

  assign regs_out = regs;

  // ------------------------------------------------------------ busses
  logic push_any, pop_any, load_any, store_any;
  logic [WIDTH-1:0] push_w, load_a, store_a, store_d;
  logic [N_EU-1:0] v_jmp, v_call, v_ret, v_push, v_pop, v_load, v_store;

  always_comb begin
    jmp_any = 1'b0; call_any = 1'b0; ret_any = 1'b0;
    push_any = 1'b0; pop_any = 1'b0; load_any = 1'b0; store_any = 1'b0;
    target_w = '0; push_w = '0; load_a = '0; store_a = '0; store_d = '0;
    for (int e = N_EU - 1; e >= 0; e--) begin
      v_jmp[e]   = ctl[e].jmp;
      v_call[e]  = ctl[e].call;
      v_ret[e]   = ctl[e].ret;
      v_push[e]  = ctl[e].push;
      v_pop[e]   = ctl[e].pop;
      v_load[e]  = ctl[e].load;
      v_store[e] = ctl[e].store;
      if (ctl[e].jmp || ctl[e].call) target_w = opb[e];
      if (ctl[e].jmp)   jmp_any  = 1'b1;
      if (ctl[e].call)  call_any = 1'b1;
      if (ctl[e].ret)   ret_any  = 1'b1;
      if (ctl[e].push) begin push_any = 1'b1; push_w = opb[e]; end
      if (ctl[e].pop)   pop_any  = 1'b1;
      if (ctl[e].load) begin load_any = 1'b1; load_a = opb[e]; end
      if (ctl[e].store) begin store_any = 1'b1; store_a = opb[e]; store_d = acc[e]; end
    end
  end

  logic ds_empty, ds_full;
  crec_stack #(.WIDTH(WIDTH), .DEPTH(DSTACK_D)) u_data_stack (
    .clk(clk), .rst_n(rst_n), .push(push_any), .pop(pop_any),
    .din(push_w), .top(ds_top), .empty(ds_empty), .full(ds_full)
  );

  crec_data_mem #(.WIDTH(WIDTH), .DEPTH(DMEM_D)) u_dmem (
    .clk(clk), .rst_n(rst_n),
    .load(load_any), .load_addr(load_a),
    .store(store_any), .store_addr(store_a), .store_data(store_d),
    .lbuf(lbuf)
  );

  // One user per shared resource and slice.
  a_one_sc:    assert property (@(posedge clk) disable iff (!rst_n)
                 $onehot0({v_jmp, v_call, v_ret}));
  a_one_stack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v_push | v_pop));
  a_one_load:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v_load));
  a_one_store: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v_store));

endmodule
