// crec_slice_counter: slice program counter of the CREC.
//
// `sc` is the slice being executed. `start` sets it to slice 0 and raises
// `running`. While running, each rising edge moves it to `nxt`: the target on
// the operand bus for JMP and CALL, the popped return slice for RET, sc+1
// otherwise. CALL hands sc+1 to the slice stack (`ret_slice`). A JMP to the
// current slice halts the program: `running` falls and `done` rises until
// the next `start`. `nxt` (0 while starting) is the address the slice memory
// reads, so its output holds the word of `sc` in every running cycle.
// The jump-to-self halt convention is this design's choice.
module crec_slice_counter #(
  parameter int unsigned SW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          jmp,
  input  logic          call,
  input  logic          ret,
  input  logic [SW-1:0] target,
  input  logic [SW-1:0] ret_target,
  output logic [SW-1:0] sc,
  output logic [SW-1:0] nxt,
  output logic [SW-1:0] ret_slice,
  output logic          running,
  output logic          done
);
  logic halt;

  assign ret_slice = sc + 1'b1;
  assign halt      = running && jmp && (target == sc);

  always_comb begin
    if (start)              nxt = '0;
    else if (!running)      nxt = sc;
    else if (jmp || call)   nxt = target;
    else if (ret)           nxt = ret_target;
    else                    nxt = sc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc      <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      sc <= nxt;
      if (start) begin
        running <= 1'b1;
        done    <= 1'b0;
      end else if (halt) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end
endmodule
