// crec_op_unit: operating unit of a CREC execution unit (purely combinational).
//
// Four blocks, as in the EU description: the logic unit (AND/OR/XOR and the
// bit test), the arithmetic unit (ADD/SUB with and without carry, compare),
// the shift-left unit (SHL/SAL/ROL/RCL, NEG, INC/DEC) and the shift-right unit
// (SHR/SAR/ROR/RCR, NOT), plus the carry generator that supplies the carry-in
// for ADC, SBB, RCL and RCR from the Carry flag. The binary blocks take the
// accumulator and the operand from the multiplexer unit; the unary blocks
// take the accumulator only. All numbers are unsigned.
//
// Outputs: `res` is the value for the accumulator and for the Zero flag,
// `cout` the new Carry flag, `wr_acc` says whether the accumulator takes
// `res` (low for CMP, TEST and program-control ops) and `wr_flags` whether
// the flags are updated (any data-manipulation op).
//
// Carry conventions are this design's choice where the description is
// silent: carry out for additions and INC, borrow for subtractions, DEC and
// NEG (NEG sets it when the operand was non-zero), the bit shifted or rotated
// out for shifts, and 0 for the logic ops and NOT. Shifts move by one bit.
module crec_op_unit
  import crec_pkg::*;
#(
  parameter int unsigned WIDTH = crec_pkg::W
) (
  input  op_e              op,
  input  logic [WIDTH-1:0] acc,
  input  logic [WIDTH-1:0] opnd,
  input  logic             cf,
  output logic [WIDTH-1:0] res,
  output logic             cout,
  output logic             wr_acc,
  output logic             wr_flags
);

  logic cin;       // carry generator output
  logic [WIDTH:0] sum;

  // Carry generator
  always_comb begin
    unique case (op)
      OP_ADC, OP_SBB, OP_RCL, OP_RCR: cin = cf;
      default:                        cin = 1'b0;
    endcase
  end

  always_comb begin
    res      = acc;
    cout     = 1'b0;
    wr_acc   = 1'b0;
    wr_flags = 1'b0;
    sum      = '0;
    unique case (op)
      // arithmetic unit
      OP_ADD, OP_ADC: begin
        sum      = {1'b0, acc} + {1'b0, opnd} + {{WIDTH{1'b0}}, cin};
        res      = sum[WIDTH-1:0];
        cout     = sum[WIDTH];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_SUB, OP_SBB, OP_CMP: begin
        sum      = {1'b0, acc} - {1'b0, opnd} - {{WIDTH{1'b0}}, cin};
        res      = sum[WIDTH-1:0];
        cout     = sum[WIDTH];
        wr_acc   = (op != OP_CMP);
        wr_flags = 1'b1;
      end
      // logic unit
      OP_AND, OP_TEST: begin
        res      = acc & opnd;
        wr_acc   = (op == OP_AND);
        wr_flags = 1'b1;
      end
      OP_OR: begin
        res      = acc | opnd;
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_XOR: begin
        res      = acc ^ opnd;
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      // shift-left unit
      OP_SHL, OP_SAL: begin
        res      = {acc[WIDTH-2:0], 1'b0};
        cout     = acc[WIDTH-1];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_ROL: begin
        res      = {acc[WIDTH-2:0], acc[WIDTH-1]};
        cout     = acc[WIDTH-1];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_RCL: begin
        res      = {acc[WIDTH-2:0], cin};
        cout     = acc[WIDTH-1];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_INC: begin
        sum      = {1'b0, acc} + 1'b1;
        res      = sum[WIDTH-1:0];
        cout     = sum[WIDTH];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_DEC: begin
        sum      = {1'b0, acc} - 1'b1;
        res      = sum[WIDTH-1:0];
        cout     = sum[WIDTH];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_NEG: begin
        res      = '0 - acc;
        cout     = (acc != '0);
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      // shift-right unit
      OP_SHR: begin
        res      = {1'b0, acc[WIDTH-1:1]};
        cout     = acc[0];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_SAR: begin
        res      = {acc[WIDTH-1], acc[WIDTH-1:1]};
        cout     = acc[0];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_ROR: begin
        res      = {acc[0], acc[WIDTH-1:1]};
        cout     = acc[0];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_RCR: begin
        res      = {cin, acc[WIDTH-1:1]};
        cout     = acc[0];
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      OP_NOT: begin
        res      = ~acc;
        wr_acc   = 1'b1;
        wr_flags = 1'b1;
      end
      default: ;  // NOP and program-control ops: nothing here
    endcase
  end

endmodule
