// tb_crec_op_unit: checks every opcode of the operating unit against an
// independent model written here, for random and corner-case operands and
// both values of the Carry flag. Also checks which ops write the
// accumulator and the flags.
module tb_crec_op_unit;
  import crec_pkg::*;

  op_e         op;
  logic [15:0] acc, opnd, res;
  logic        cf, cout, wr_acc, wr_flags;
  int checks = 0, failures = 0;

  crec_op_unit dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(op_e o, logic [15:0] a, logic [15:0] b, logic c,
                                output logic [15:0] r, output logic co,
                                output logic wa, output logic wf);
    int unsigned t;
    r = a; co = 0; wa = 1; wf = 1;
    case (o)
      OP_ADD:  begin t = a + b;         r = t[15:0]; co = t[16]; end
      OP_ADC:  begin t = a + b + c;     r = t[15:0]; co = t[16]; end
      OP_SUB:  begin r = a - b;         co = (b > a); end
      OP_SBB:  begin r = a - b - c;     co = (int'(b) + int'(c) > int'(a)); end
      OP_CMP:  begin r = a - b;         co = (b > a); wa = 0; end
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_TEST: begin r = a & b; wa = 0; end
      OP_NOT:  r = ~a;
      OP_SHL, OP_SAL: begin r = a << 1; co = a[15]; end
      OP_SHR:  begin r = a >> 1; co = a[0]; end
      OP_SAR:  begin r = 16'($signed(a) >>> 1); co = a[0]; end
      OP_ROL:  begin r = {a[14:0], a[15]}; co = a[15]; end
      OP_ROR:  begin r = {a[0], a[15:1]}; co = a[0]; end
      OP_RCL:  begin r = {a[14:0], c}; co = a[15]; end
      OP_RCR:  begin r = {c, a[15:1]}; co = a[0]; end
      OP_INC:  begin r = a + 1; co = (a == 16'hFFFF); end
      OP_DEC:  begin r = a - 1; co = (a == 0); end
      OP_NEG:  begin r = -a; co = (a != 0); end
      default: begin wa = 0; wf = 0; r = a; end
    endcase
  endfunction

  op_e ops[] = '{OP_NOP, OP_ADD, OP_ADC, OP_SUB, OP_SBB, OP_CMP, OP_AND, OP_OR, OP_XOR,
                 OP_TEST, OP_NOT, OP_SHL, OP_SAL, OP_SHR, OP_SAR, OP_ROL, OP_ROR, OP_RCL,
                 OP_RCR, OP_INC, OP_DEC, OP_NEG, OP_MOV, OP_OUT, OP_JMP};
  logic [15:0] corner[] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'hF000};

  initial begin
    logic [15:0] er; logic ec, ewa, ewf;
    foreach (ops[i]) begin
      for (int n = 0; n < 80; n++) begin
        op   = ops[i];
        acc  = (n < 36) ? corner[n % 6] : 16'($urandom);
        opnd = (n < 36) ? corner[n / 6] : 16'($urandom);
        cf   = n[0] ^ n[3];
        #1;
        model(op, acc, opnd, cf, er, ec, ewa, ewf);
        checks++;
        if (res !== er || cout !== ec || wr_acc !== ewa || wr_flags !== ewf) begin
          failures++;
          $display("FAIL %s a=%h b=%h c=%b: res %h/%h cout %b/%b wa %b/%b wf %b/%b",
                   op.name(), acc, opnd, cf, res, er, cout, ec, wr_acc, ewa, wr_flags, ewf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
