// crec_param_eu: custom parameter execution unit.
//
// A stripped-down EU holding one constant of the program, such as the
// Smith-Waterman costs ins, del and sub. It has only the accumulator and
// its load control: the host writes it once with `ld`/`din` before the
// program starts (the value appears on `acc` after that clock edge), and
// the other EUs then read `acc` through their register MUX like any other
// register. A single copy serves the whole array. The `ld` strobe and the
// reset value 0 are this design's choice; the description only says these
// units are loaded with the parameter values first.
module crec_param_eu #(
  parameter int unsigned WIDTH = crec_pkg::W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] acc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (ld) acc <= din;
  end
endmodule
