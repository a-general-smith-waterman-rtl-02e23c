// crec_slice_mem: CREC slice memory, a synchronous-read ROM in block RAM.
//
// Each word is the slice word of one program slice: for every EU a pointer
// into its instruction memory and a pointer into its operand memory. The
// word width is whatever the program needs (WIDTH). Contents come from the
// packed parameter INIT, word k in bits [k*WIDTH +: WIDTH].
// On a rising edge with `en` high, `data` takes the word at `addr`; the
// slice counter therefore presents the address of the next slice, so the
// word of the slice being executed is in `data` without a lost cycle.
module crec_slice_mem #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter logic [DEPTH*WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int unsigned k = 0; k < DEPTH; k++)
      mem[k] = INIT[k*WIDTH +: WIDTH];
  end

  always_ff @(posedge clk) begin
    if (en)
      data <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end
endmodule
