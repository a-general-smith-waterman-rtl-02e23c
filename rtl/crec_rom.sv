// crec_rom: small asynchronous-read ROM, the form of the CREC instruction
// memories and direct-operand memories (look-up tables configured as ROMs,
// one pair per EU).
//
// DEPTH words of WIDTH bits; the contents come from the packed parameter
// INIT, word k in bits [k*WIDTH +: WIDTH]. `data` follows `addr` without a
// clock. Addresses beyond DEPTH read as 0.
module crec_rom #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter logic [DEPTH*WIDTH-1:0] INIT = '0
) (
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);
  logic [WIDTH-1:0] rom [DEPTH];

  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++)
      rom[k] = INIT[k*WIDTH +: WIDTH];
    data = (32'(addr) < DEPTH) ? rom[addr] : '0;
  end
endmodule
