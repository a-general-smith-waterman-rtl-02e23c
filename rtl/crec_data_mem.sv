// crec_data_mem: CREC data memory with its load buffer and store buffer.
//
// The data memory normally sits outside the FPGA; here it is an internal RAM
// of DEPTH words. EUs never touch it directly:
//   * LOAD: the address on the operand bus is read at the rising edge into
//     the load buffer `lbuf`, which the EUs read through their register MUX
//     from the next cycle on;
//   * STORE: address and data are captured in the store buffer at the rising
//     edge and written into the RAM at the following edge.
// A LOAD of the address held in a pending store buffer returns the buffered
// data. Address bits above the RAM size are ignored. The buffers and the
// memory are the documented parts; the one-cycle buffer timing, the
// forwarding and DEPTH are this design's choice.
module crec_data_mem #(
  parameter int unsigned WIDTH = crec_pkg::W,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_addr,
  input  logic             store,
  input  logic [WIDTH-1:0] store_addr,
  input  logic [WIDTH-1:0] store_data,
  output logic [WIDTH-1:0] lbuf
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  // store buffer
  logic             sb_valid;
  logic [AW-1:0]    sb_addr;
  logic [WIDTH-1:0] sb_data;

  logic [AW-1:0] la;
  assign la = AW'(load_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_valid <= 1'b0;
      sb_addr  <= '0;
      sb_data  <= '0;
      lbuf     <= '0;
    end else begin
      sb_valid <= store;
      if (store) begin
        sb_addr <= AW'(store_addr);
        sb_data <= store_data;
      end
      if (load)
        lbuf <= (sb_valid && sb_addr == la) ? sb_data : mem[la];
    end
  end

  always_ff @(posedge clk) begin
    if (sb_valid)
      mem[sb_addr] <= sb_data;
  end
endmodule
