// Log-space adder built around a small correction table.
//
// With costs u = -4*log2(p), the cost of p_a + p_b is
//   min(u_a, u_b) - g(|u_a - u_b|),  g(d) = round(4*log2(1 + 2^(-d/4))).
// g is kept in a look-up table, so a sum of probabilities never leaves log
// space. g(d) is zero for d >= 14, so the table holds 14 non-zero entries.
// Inputs and result are signed accumulator values so that sums above 1 can
// be held before renormalisation. Using a table for the addition follows
// the document; the cost scale is this design's.
//
// Timing: combinational.
module bn_logadd_lut
  import bn_pkg::*;
(
  input  acc_t a,
  input  acc_t b,
  output acc_t s
);

  acc_t        mn, d;
  logic [2:0]  g;

  always_comb begin
    mn = (a < b) ? a : b;
    d  = (a < b) ? b - a : a - b;
    // g(d) = round(4*log2(1 + 2^(-d/4)))
    if (d > acc_t'(15)) g = 3'd0;
    else begin
      unique case (d[3:0])
        4'd0, 4'd1:                g = 3'd4;
        4'd2, 4'd3:                g = 3'd3;
        4'd4, 4'd5, 4'd6, 4'd7:    g = 3'd2;
        4'd8, 4'd9, 4'd10, 4'd11,
        4'd12, 4'd13:              g = 3'd1;
        default:                   g = 3'd0;
      endcase
    end
    s = mn - acc_t'(g);
  end

endmodule
