// 6-bit linear feedback shift register choosing the Walsh row at random.
//
// Fibonacci form with the maximal-length polynomial x^6 + x^5 + 1: from
// any non-zero seed it steps through all 63 non-zero states before
// repeating, so K <= 63 consecutive draws name K different rows. Row 0 is
// never produced. A 6-bit LFSR follows the document; the polynomial and
// the seed port are choices of this design.
//
// Timing: `load` copies the seed (0 is replaced by 1), `step` advances one
// state on the clock edge.
module wht_lfsr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [5:0] seed,
  input  logic       step,
  output logic [5:0] value
);

  logic fb;
  assign fb = value[5] ^ value[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     value <= 6'd1;
    else if (load)  value <= (seed == 6'd0) ? 6'd1 : seed;
    else if (step)  value <= {value[4:0], fb};
  end

endmodule
