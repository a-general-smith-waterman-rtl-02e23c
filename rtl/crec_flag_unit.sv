// crec_flag_unit: Zero and Carry flags of one execution unit and the
// condition generator that turns them into the 6-bit condition bus.
//
// The flags are registers. On a clock edge with `en` and `upd` high they take
// the Zero test of `res` and the carry `cin` from the operating unit; a
// program-control instruction leaves them alone, so a conditioned
// instruction always sees the flags of the last data-manipulation
// instruction of its own EU. The condition bus is decoded from the stored
// flags: bit 0 Zero, 1 Not Zero, 2 Carry, 3 Not Carry, 4 Above (!C & !Z),
// 5 Below or Equal (C | Z). The six conditions are the documented ones;
// the bit order and the reset value (both flags 0) are this design's choice.
module crec_flag_unit #(
  parameter int unsigned WIDTH = crec_pkg::W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             upd,
  input  logic [WIDTH-1:0] res,
  input  logic             cin,
  output logic             zf,
  output logic             cf,
  output logic [5:0]       cond_bus
);
  import crec_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zf <= 1'b0;
      cf <= 1'b0;
    end else if (en && upd) begin
      zf <= (res == '0);
      cf <= cin;
    end
  end

  always_comb begin
    cond_bus        = '0;
    cond_bus[CB_Z]  = zf;
    cond_bus[CB_NZ] = !zf;
    cond_bus[CB_C]  = cf;
    cond_bus[CB_NC] = !cf;
    cond_bus[CB_A]  = !cf && !zf;
    cond_bus[CB_BE] = cf || zf;
  end

endmodule
