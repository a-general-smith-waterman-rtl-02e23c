// sw_fifo: first-in first-out buffer in a dual-port RAM, used for the S and T
// strings and for the d-parameter column of the Smith-Waterman array.
//
// DEPTH words of WIDTH bits, first-word fall-through: `rd_data` is the oldest
// word whenever `empty` is low, and `pop` at a rising edge discards it. `push`
// writes `wr_data` at the same edge. Push and pop in one cycle are allowed
// even when full (the T string uses this to recirculate). `count` is the
// number of stored words. Pushing into a full FIFO without a pop, or
// popping an empty one, is flagged by an assertion and ignored.
// The sizes (4096 x 5 bits for S and T, 4096 x 16 bits for d) are the
// documented ones; the interface is this design's choice.
module sw_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW   = $clog2(DEPTH);
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + CNTW'(do_push) - CNTW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
