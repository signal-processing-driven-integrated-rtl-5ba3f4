// Factor memory: 2^AW entries of DW-bit log-space values, with two
// synchronous read ports (the factor product reads both operands in the
// same clock) and one write port. It holds input and result factors as
// flattened arrays at base addresses given by the configuration table.
// The size (4K entries, room for two 1K-entry operands and results) is a
// choice of this design; the document gives only the 1K-entry factor limit.
//
// Timing: read data appear the clock after the address.
module bn_factor_mem
  import bn_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = AW
) (
  input  logic                  clk,
  input  logic [DEPTH_LOG2-1:0] raddr_a,
  input  logic [DEPTH_LOG2-1:0] raddr_b,
  output cost_t                 rdata_a,
  output cost_t                 rdata_b,
  input  logic                  we,
  input  logic [DEPTH_LOG2-1:0] waddr,
  input  cost_t                 wdata
);

  cost_t mem [2**DEPTH_LOG2];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule
