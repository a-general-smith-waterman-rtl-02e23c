// crec_eu: one CREC execution unit (EU).
//
// Each EU owns one accumulator register and executes one instruction per
// clock while `en` is high. Its parts follow the EU block diagram:
//   * decoding unit      - splits the instruction word into opcode, condition,
//                          operand source and register select;
//   * multiplexer unit   - a register MUX over all registers of the machine
//                          (`regs`), the load buffer, the input port and the
//                          stack top, followed by a 2:1 Reg/Imm MUX that picks
//                          that value or the immediate operand;
//   * operating unit     - crec_op_unit (logic, arithmetic, shifts, carry);
//   * accumulator unit   - the register, written by data-manipulation results
//                          and by a MOV whose condition holds;
//   * flag unit          - crec_flag_unit (Zero, Carry, 6-bit condition bus);
//   * control unit       - validates a program-control instruction against the
//                          condition bus and raises its strobe in `ctrl`;
//   * buffer unit        - drives the operand bus: the accumulator for PUSH,
//                          the selected operand otherwise.
//
// Timing: `instr`, `imm` and the mux inputs are sampled in the same cycle;
// the accumulator and flags change at the next rising edge. `ctrl` and
// `opbus` are combinational, so the processor acts on them (jump, push, port
// write...) at that same edge. A MOV from SRC_PORT is an input-port read
// (strobe `stb`), a MOV from SRC_STACK is a POP (strobe `pop`).
// Register selects beyond NREG read as 0.
//
// The part list, the mux structure and the condition set follow the EU
// description; the encodings and the exact strobe meanings are this
// design's choice (see crec_pkg). The EU is not trimmed per program: every
// EU has the full instruction set and a register MUX over all registers.
module crec_eu
  import crec_pkg::*;
#(
  parameter int unsigned WIDTH = crec_pkg::W,
  parameter int unsigned NREG  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  instr_t           instr,
  input  logic [WIDTH-1:0] imm,
  input  logic [WIDTH-1:0] regs [NREG],
  input  logic [WIDTH-1:0] lbuf,
  input  logic [WIDTH-1:0] in_port,
  input  logic [WIDTH-1:0] stk_top,
  output logic [WIDTH-1:0] acc,
  output logic [WIDTH-1:0] opbus,
  output ctrl_t            ctrl,
  output logic [5:0]       cond_bus
);

  // Decoding unit
  op_e   op;
  cond_e cond;
  src_e  src;
  logic [RSELW-1:0] rsel;
  assign op   = instr.op;
  assign cond = instr.cond;
  assign src  = instr.src;
  assign rsel = instr.rsel;

  // Multiplexer unit
  logic [WIDTH-1:0] reg_mux, operand;
  always_comb begin
    reg_mux = '0;
    unique case (src)
      SRC_LBUF:  reg_mux = lbuf;
      SRC_PORT:  reg_mux = in_port;
      SRC_STACK: reg_mux = stk_top;
      default: begin
        for (int unsigned k = 0; k < NREG; k++)
          if (rsel == RSELW'(k)) reg_mux = regs[k];
      end
    endcase
    operand = (src == SRC_IMM) ? imm : reg_mux;
  end

  // Operating unit
  logic [WIDTH-1:0] res;
  logic cout, wr_acc, wr_flags, zf, cf;

  crec_op_unit #(.WIDTH(WIDTH)) u_op (
    .op(op), .acc(acc), .opnd(operand), .cf(cf),
    .res(res), .cout(cout), .wr_acc(wr_acc), .wr_flags(wr_flags)
  );

  // Flag unit
  crec_flag_unit #(.WIDTH(WIDTH)) u_flags (
    .clk(clk), .rst_n(rst_n), .en(en), .upd(wr_flags),
    .res(res), .cin(cout), .zf(zf), .cf(cf), .cond_bus(cond_bus)
  );

  // Control unit: condition check against the condition bus
  logic cond_ok, valid;
  always_comb begin
    unique case (cond)
      C_Z:     cond_ok = cond_bus[CB_Z];
      C_NZ:    cond_ok = cond_bus[CB_NZ];
      C_C:     cond_ok = cond_bus[CB_C];
      C_NC:    cond_ok = cond_bus[CB_NC];
      C_A:     cond_ok = cond_bus[CB_A];
      C_BE:    cond_ok = cond_bus[CB_BE];
      default: cond_ok = 1'b1;
    endcase
    valid = en && is_ctrl(op) && cond_ok;

    ctrl       = '0;
    ctrl.mov   = valid && (op == OP_MOV);
    ctrl.stb   = valid && (op == OP_MOV) && (src == SRC_PORT);
    ctrl.pop   = valid && (op == OP_MOV) && (src == SRC_STACK);
    ctrl.out   = valid && (op == OP_OUT);
    ctrl.push  = valid && (op == OP_PUSH);
    ctrl.load  = valid && (op == OP_LOAD);
    ctrl.store = valid && (op == OP_STORE);
    ctrl.jmp   = valid && (op == OP_JMP);
    ctrl.call  = valid && (op == OP_CALL);
    ctrl.ret   = valid && (op == OP_RET);
  end

  // Accumulator unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (en && wr_acc)
      acc <= res;
    else if (ctrl.mov)
      acc <= operand;
  end

  // Buffer unit: register buffer for PUSH, operand buffer otherwise
  assign opbus = (op == OP_PUSH) ? acc : operand;

endmodule
