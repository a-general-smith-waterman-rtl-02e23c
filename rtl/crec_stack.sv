// crec_stack: LIFO memory, used as the CREC data stack (PUSH/POP) and as the
// slice stack (return slice addresses of CALL/RETURN).
//
// DEPTH words of WIDTH bits in a RAM with a stack pointer `sp` counting the
// stored words. `top` is the most recently pushed word, read
// combinationally, so a POP consumes it in the same cycle. On a rising edge
// `push` writes `din` above the top, `pop` removes the top; both at once
// replace the top with `din`. Pushing when full or popping when empty is a
// program error and is flagged by an assertion; the stack then ignores it.
// The size is not fixed by the description (it depends on the program);
// DEPTH is a parameter.
module crec_stack #(
  parameter int unsigned WIDTH = crec_pkg::W,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full
);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;

  assign empty = (sp == '0);
  assign full  = (sp == PW'(DEPTH));
  assign top   = empty ? '0 : mem[AW'(sp - 1'b1)];

  always_ff @(posedge clk) begin
    if (push && pop && !empty)
      mem[AW'(sp - 1'b1)] <= din;
    else if (push && !pop && !full)
      mem[AW'(sp)] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sp <= '0;
    else if (push && !pop && !full)
      sp <= sp + 1'b1;
    else if (pop && !push && !empty)
      sp <= sp - 1'b1;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
