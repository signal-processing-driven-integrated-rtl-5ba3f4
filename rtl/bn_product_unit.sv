// Factor product unit.
//
// In log space the product of two factor entries is the sum of their costs.
// The sum saturates at the largest code (63), which stands for a
// probability too small to represent, so "zero" times anything stays zero.
// Working in log space to avoid underflow follows the document.
//
// Timing: combinational.
module bn_product_unit
  import bn_pkg::*;
(
  input  cost_t a,
  input  cost_t b,
  output cost_t p
);

  logic [DW:0] s;

  assign s = {1'b0, a} + {1'b0, b};
  assign p = s[DW] ? '1 : s[DW-1:0];

endmodule
