// tb_crec_eu: random instruction streams into one execution unit with four
// visible registers, against a cycle model written here. Checks the
// accumulator, the condition bus, the operand bus and every control strobe.
// Covers all operand sources (registers, out-of-range select, load buffer,
// input port, stk_top, immediate), all conditions and the enable input, and
// counts taken and skipped conditioned instructions.
module tb_crec_eu;
  import crec_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr = '0;
  logic [15:0] imm = '0, lbuf = '0, in_port = '0, stk_top = '0;
  logic [15:0] regs [4];
  logic [15:0] acc, opbus;
  ctrl_t ctrl;
  logic [5:0] cond_bus;
  int checks = 0, failures = 0, n_taken = 0, n_skipped = 0;
  always #5 clk = ~clk;

  crec_eu #(.WIDTH(16), .NREG(4)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void alu(op_e o, logic [15:0] a, logic [15:0] b, logic c,
                              output logic [15:0] r, output logic co,
                              output logic wa, output logic wf);
    int unsigned t;
    r = a; co = 0; wa = 1; wf = 1;
    case (o)
      OP_ADD:  begin t = a + b;     r = t[15:0]; co = t[16]; end
      OP_ADC:  begin t = a + b + c; r = t[15:0]; co = t[16]; end
      OP_SUB:  begin r = a - b;     co = (b > a); end
      OP_SBB:  begin r = a - b - c; co = (int'(b) + int'(c) > int'(a)); end
      OP_CMP:  begin r = a - b;     co = (b > a); wa = 0; end
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_TEST: begin r = a & b; wa = 0; end
      OP_NOT:  r = ~a;
      OP_SHL:  begin r = a << 1; co = a[15]; end
      OP_SHR:  begin r = a >> 1; co = a[0]; end
      OP_ROL:  begin r = {a[14:0], a[15]}; co = a[15]; end
      OP_RCR:  begin r = {c, a[15:1]}; co = a[0]; end
      OP_INC:  begin r = a + 1; co = (a == 16'hFFFF); end
      OP_DEC:  begin r = a - 1; co = (a == 0); end
      OP_NEG:  begin r = -a; co = (a != 0); end
      default: begin wa = 0; wf = 0; end
    endcase
  endfunction

  op_e ops[] = '{OP_NOP, OP_ADD, OP_ADC, OP_SUB, OP_SBB, OP_CMP, OP_AND, OP_OR, OP_XOR,
                 OP_TEST, OP_NOT, OP_SHL, OP_SHR, OP_ROL, OP_RCR, OP_INC, OP_DEC, OP_NEG,
                 OP_MOV, OP_MOV, OP_MOV, OP_OUT, OP_PUSH, OP_LOAD, OP_STORE, OP_JMP,
                 OP_CALL, OP_RET};

  initial begin
    logic [15:0] m_acc, opnd, r;
    logic m_z, m_c, co, wa, wf, ok;
    logic [5:0] m_bus;
    ctrl_t e_ctrl;
    logic [15:0] e_opbus;
    @(negedge clk); rst_n = 1;
    m_acc = 0; m_z = 0; m_c = 0;
    for (int n = 0; n < 5000; n++) begin
      en = ($urandom_range(7) != 0);
      instr.op   = ops[$urandom_range(ops.size() - 1)];
      instr.cond = cond_e'($urandom_range(6));
      instr.src  = src_e'($urandom_range(4));
      instr.rsel = RSELW'($urandom_range(5));
      imm = 16'($urandom); lbuf = 16'($urandom); in_port = 16'($urandom); stk_top = 16'($urandom);
      for (int k = 0; k < 4; k++) regs[k] = ($urandom_range(3) == 0) ? 16'h0 : 16'($urandom);
      // model
      case (instr.src)
        SRC_LBUF:  opnd = lbuf;
        SRC_PORT:  opnd = in_port;
        SRC_STACK: opnd = stk_top;
        SRC_IMM:   opnd = imm;
        default:   opnd = (instr.rsel < 4) ? regs[instr.rsel] : 16'h0;
      endcase
      m_bus = {m_c | m_z, !m_c & !m_z, !m_c, m_c, !m_z, m_z};
      case (instr.cond)
        C_Z: ok = m_z;  C_NZ: ok = !m_z;  C_C: ok = m_c;  C_NC: ok = !m_c;
        C_A: ok = !m_c && !m_z;  C_BE: ok = m_c || m_z;  default: ok = 1;
      endcase
      ok = ok && en && instr.op[5];
      if (en && instr.op[5]) begin if (ok) n_taken++; else n_skipped++; end
      e_ctrl = '0;
      e_ctrl.mov   = ok && instr.op == OP_MOV;
      e_ctrl.stb   = ok && instr.op == OP_MOV && instr.src == SRC_PORT;
      e_ctrl.pop   = ok && instr.op == OP_MOV && instr.src == SRC_STACK;
      e_ctrl.out   = ok && instr.op == OP_OUT;
      e_ctrl.push  = ok && instr.op == OP_PUSH;
      e_ctrl.load  = ok && instr.op == OP_LOAD;
      e_ctrl.store = ok && instr.op == OP_STORE;
      e_ctrl.jmp   = ok && instr.op == OP_JMP;
      e_ctrl.call  = ok && instr.op == OP_CALL;
      e_ctrl.ret   = ok && instr.op == OP_RET;
      e_opbus = (instr.op == OP_PUSH) ? m_acc : opnd;
      #1;
      checks++;
      if (ctrl !== e_ctrl || opbus !== e_opbus || cond_bus !== m_bus) begin
        failures++;
        $display("FAIL n=%0d %s: ctrl %b/%b opbus %h/%h bus %b/%b", n, instr.op.name(),
                 ctrl, e_ctrl, opbus, e_opbus, cond_bus, m_bus);
      end
      alu(instr.op, m_acc, opnd, m_c, r, co, wa, wf);
      if (en && wa) m_acc = r;
      else if (e_ctrl.mov) m_acc = opnd;
      if (en && wf) begin m_z = (r == 0); m_c = co; end
      @(negedge clk);
      checks++;
      if (acc !== m_acc) begin
        failures++;
        $display("FAIL n=%0d %s acc %h/%h", n, instr.op.name(), acc, m_acc);
      end
    end
    checks++;
    if (n_taken == 0 || n_skipped == 0) begin failures++; $display("FAIL: conditions not both seen"); end
    $display("conditioned instructions: %0d taken, %0d skipped", n_taken, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
