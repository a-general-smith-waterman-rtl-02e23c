// tb_crec_core: a small two-EU CREC program that uses every shared resource
// of the processor: parameter EU read, PUSH, CALL into a subroutine that
// PUSHes again and RETurns, POP, STORE then LOAD of the same word through
// the store and load buffers, output-port writes, input-port reads, a
// counted loop closed by a conditional jump, and the halting jump to self.
// Checks the output-port words, the register values at fixed points, the
// slice trace and the number of cycles; repeated with random values.
//
// Program (slice: EU0 | EU1):
//   0: mov 3          | mov P (parameter EU)
//   1: push           | add 1
//   2: call 8         | store [7]
//   3: pop            | load [7]
//   4: out R0         | mov LB
//   5: dec            | mov port
//   6: jnz 4          | -
//   7: jmp 7 (halt)   | -
//   8: mov 2          | -
//   9: push           | -
//  10: ret            | -
module tb_crec_core;
  import crec_pkg::*;

  localparam int unsigned NS = 11, IMD = NS + 1, OPD = NS + 1;
  localparam int unsigned IPW = 4, OPW = 4, SWW = 2 * (IPW + OPW);

  typedef struct packed { instr_t i; logic [15:0] v; } slot_t;

  function automatic slot_t prog(int e, int s);
    slot_t r;
    r.i = '0; r.v = '0;
    if (e == 0)
      case (s)
        0:  begin r.i = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); r.v = 3; end
        1:  r.i = mk(OP_PUSH, C_ALWAYS, SRC_REG, 0);
        2:  begin r.i = mk(OP_CALL, C_ALWAYS, SRC_IMM, 0); r.v = 8; end
        3:  r.i = mk(OP_MOV, C_ALWAYS, SRC_STACK, 0);
        4:  r.i = mk(OP_OUT, C_ALWAYS, SRC_REG, 0);
        5:  r.i = mk(OP_DEC, C_ALWAYS, SRC_REG, 0);
        6:  begin r.i = mk(OP_JMP, C_NZ, SRC_IMM, 0); r.v = 4; end
        7:  begin r.i = mk(OP_JMP, C_ALWAYS, SRC_IMM, 0); r.v = 7; end
        8:  begin r.i = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); r.v = 2; end
        9:  r.i = mk(OP_PUSH, C_ALWAYS, SRC_REG, 0);
        10: r.i = mk(OP_RET, C_ALWAYS, SRC_REG, 0);
        default: ;
      endcase
    else
      case (s)
        0: r.i = mk(OP_MOV, C_ALWAYS, SRC_REG, 2);
        1: begin r.i = mk(OP_ADD, C_ALWAYS, SRC_IMM, 0); r.v = 1; end
        2: begin r.i = mk(OP_STORE, C_ALWAYS, SRC_IMM, 0); r.v = 7; end
        3: begin r.i = mk(OP_LOAD, C_ALWAYS, SRC_IMM, 0); r.v = 7; end
        4: r.i = mk(OP_MOV, C_ALWAYS, SRC_LBUF, 0);
        5: r.i = mk(OP_MOV, C_ALWAYS, SRC_PORT, 0);
        default: ;
      endcase
    return r;
  endfunction

  // Instruction/operand memory entry s+1 holds slice s; entry 0 is NOP / 0.
  function automatic logic [NS*SWW-1:0] slice_init();
    logic [NS*SWW-1:0] v = '0;
    for (int s = 0; s < NS; s++)
      for (int e = 0; e < 2; e++) begin
        v[s*SWW + e*(IPW+OPW) +: IPW]       = IPW'(s + 1);
        v[s*SWW + e*(IPW+OPW) + IPW +: OPW] = OPW'(s + 1);
      end
    return v;
  endfunction
  function automatic logic [2*IMD*IW-1:0] imem_init();
    logic [2*IMD*IW-1:0] v = '0;
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < NS; s++) v[(e*IMD + s + 1)*IW +: IW] = prog(e, s).i;
    return v;
  endfunction
  function automatic logic [2*OPD*16-1:0] opmem_init();
    logic [2*OPD*16-1:0] v = '0;
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < NS; s++) v[(e*OPD + s + 1)*16 +: 16] = prog(e, s).v;
    return v;
  endfunction

  logic clk = 0, rst_n = 0, start = 0;
  logic running, done;
  logic [3:0] slice;
  logic [0:0] par_ld = '0;
  logic [15:0] par_din = '0;
  logic [15:0] in_port [2];
  logic [1:0] in_stb, out_stb;
  logic [15:0] out_data [2];
  logic [15:0] regs_out [3];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crec_core #(.WIDTH(16), .N_EU(2), .N_PAR(1), .NSLICE(NS), .IMD(IMD), .OPD(OPD),
              .DSTACK_D(4), .SSTACK_D(4), .DMEM_D(16), .SPW(4), .IPW(IPW), .OPW(OPW),
              .SLICE_INIT(slice_init()), .IMEM_INIT(imem_init()), .OPMEM_INIT(opmem_init()))
    dut (.*);

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
    int trace[$], outs[$], n_cyc, n_in;
    static int exp_trace[] = '{0, 1, 2, 8, 9, 10, 3, 4, 5, 6, 4, 5, 6, 7};
    logic [15:0] p, q;
    in_port[0] = '0; in_port[1] = '0;
    @(negedge clk); rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      p = 16'($urandom); q = 16'($urandom);
      par_ld = 1'b1; par_din = p; @(negedge clk); par_ld = 1'b0;
      chk(regs_out[2] == p, "parameter EU load");
      in_port[1] = q;
      start = 1; @(negedge clk); start = 0;
      trace.delete(); outs.delete(); n_cyc = 0; n_in = 0;
      while (running && n_cyc < 100) begin
        trace.push_back(int'(slice));
        if (out_stb[0]) outs.push_back(int'(out_data[0]));
        if (slice == 5 && n_in == 0) chk(regs_out[1] == p + 16'd1, "store/load round trip");
        if (in_stb[1]) n_in++;
        if (slice == 3) chk(regs_out[0] == 16'd2, "subroutine value before pop");
        if (slice == 4 && outs.size() == 0) chk(regs_out[0] == 16'd2, "pop returns last push");
        n_cyc++;
        @(negedge clk);
      end
      chk(done, "done after halt");
      chk(n_cyc == exp_trace.size(), $sformatf("cycles %0d", n_cyc));
      chk(trace.size() == exp_trace.size(), "trace length");
      for (int k = 0; k < trace.size() && k < exp_trace.size(); k++)
        chk(trace[k] == exp_trace[k], $sformatf("slice %0d: %0d expected %0d", k, trace[k], exp_trace[k]));
      chk(outs.size() == 2 && outs[0] == 2 && outs[1] == 1, "output port words");
      chk(n_in == 2 && regs_out[1] == q, "input port reads");
      chk(regs_out[0] == 0, "loop counter at end");
      // one word (3) is left on the data stack: reset clears it
      rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
