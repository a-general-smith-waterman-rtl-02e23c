// crec_pkg: shared types and constants of the CREC processor.
//
// The CREC is a VLIW-like machine: N execution units (EUs), each with its
// own accumulator, run one "slice" (a group of independent instructions) per
// clock. Every EU reads a fixed-width instruction word from its own
// instruction memory. This package defines that word, the EU opcodes, the
// operand sources of the multiplexer unit, the six condition codes of the
// condition bus and the bundle of program-control strobes an EU emits.
//
// The instruction groups (data manipulation, program control), the flag set
// (Zero, Carry), the six conditions and the mux inputs (registers, load
// buffer, input port, stack, immediate) follow the processor description.
// The binary encodings, the 6-bit opcode and the field order are this
// design's own choice: the description fixes only that all instructions
// have the same width.
package crec_pkg;

  // Word length n x 4 bits with n = 4.
  localparam int unsigned W = 16;

  // Opcodes. Data-manipulation ops write the accumulator (except CMP and
  // TEST) and update the flags; program-control ops are conditioned and
  // leave the flags alone.
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    // data manipulation, binary (second operand from the multiplexer unit)
    OP_ADD   = 6'd1,
    OP_ADC   = 6'd2,
    OP_SUB   = 6'd3,
    OP_SBB   = 6'd4,
    OP_CMP   = 6'd5,
    OP_AND   = 6'd6,
    OP_OR    = 6'd7,
    OP_XOR   = 6'd8,
    OP_TEST  = 6'd9,
    // data manipulation, unary (accumulator only)
    OP_NOT   = 6'd10,
    OP_SHL   = 6'd11,
    OP_SAL   = 6'd12,
    OP_SHR   = 6'd13,
    OP_SAR   = 6'd14,
    OP_ROL   = 6'd15,
    OP_ROR   = 6'd16,
    OP_RCL   = 6'd17,
    OP_RCR   = 6'd18,
    OP_INC   = 6'd19,
    OP_DEC   = 6'd20,
    OP_NEG   = 6'd21,
    // program control (all conditioned)
    OP_MOV   = 6'd32,  // acc <- operand (source PORT = input, STACK = pop)
    OP_OUT   = 6'd33,  // operand -> operand bus, output-port strobe
    OP_PUSH  = 6'd34,  // acc -> operand bus, data stack push
    OP_LOAD  = 6'd35,  // operand = address, data memory -> load buffer
    OP_STORE = 6'd36,  // operand = address, acc = data -> store buffer
    OP_JMP   = 6'd37,  // operand = target slice
    OP_CALL  = 6'd38,  // operand = target slice, return slice pushed
    OP_RET   = 6'd39   // return slice popped
  } op_e;

  // Second-operand source (multiplexer unit). The register MUX selects among
  // the registers, the load buffer, the input port and the stack; the
  // Reg/Imm MUX then selects that result or the immediate operand.
  typedef enum logic [2:0] {
    SRC_REG   = 3'd0,
    SRC_LBUF  = 3'd1,
    SRC_PORT  = 3'd2,
    SRC_STACK = 3'd3,
    SRC_IMM   = 3'd4
  } src_e;

  // Conditions of the condition bus, plus "always".
  typedef enum logic [2:0] {
    C_ALWAYS = 3'd0,
    C_Z      = 3'd1,  // zero / equal
    C_NZ     = 3'd2,  // not zero / not equal
    C_C      = 3'd3,  // carry / below
    C_NC     = 3'd4,  // no carry / above or equal
    C_A      = 3'd5,  // above: !C & !Z
    C_BE     = 3'd6   // below or equal: C | Z
  } cond_e;

  // Bit positions in the 6-bit condition bus.
  localparam int unsigned CB_Z = 0, CB_NZ = 1, CB_C = 2, CB_NC = 3, CB_A = 4, CB_BE = 5;

  // Width of the register-select field: up to 512 registers, enough for the
  // largest array of the device table (46 PEs = 276 + 3 EUs + 5 parameters).
  localparam int unsigned RSELW = 9;

  typedef struct packed {
    op_e              op;
    cond_e            cond;
    src_e             src;
    logic [RSELW-1:0] rsel;
  } instr_t;

  localparam int unsigned IW = $bits(instr_t);

  // Program-control strobes of one EU (control signal generator output).
  // stb is the input-port read strobe.
  typedef struct packed {
    logic jmp;
    logic call;
    logic ret;
    logic push;
    logic pop;
    logic load;
    logic store;
    logic mov;
    logic stb;
    logic out;
  } ctrl_t;

  function automatic instr_t mk(op_e op, cond_e cond, src_e src, int unsigned rsel);
    instr_t i;
    i.op   = op;
    i.cond = cond;
    i.src  = src;
    i.rsel = RSELW'(rsel);
    return i;
  endfunction

  function automatic logic is_ctrl(op_e op);
    return op[5];
  endfunction

endpackage
