// Flash-ADC thermometer-to-binary encoder for one rail of the receiver.
//
// The 5-bit flash ADC delivers 31 latched comparator outputs. Instead of
// locating the 1->0 transition, the encoder simply counts the ones ("adding
// encoder"), so an isolated bubble or sparkle moves the code by one LSB at
// most instead of producing a gross error. The count is the binary code
// 0..31. It is also mapped to a symmetric signed sample 2*code-31
// (odd values -31..+31) for the rest of the baseband; that mapping is a
// choice of this design.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
module zb_therm2bin
  import zb_pkg::*;
#(
  parameter int unsigned LEVELS = 31   // comparators of the 5-bit flash ADC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [LEVELS-1:0] therm,
  output logic              out_valid,
  output logic [4:0]        code,
  output sample_t           sample
);

  logic [4:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < LEVELS; i++) ones = ones + 5'(therm[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      code      <= '0;
      sample    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        code   <= ones;
        sample <= sample_t'({1'b0, ones, 1'b0}) - sample_t'(31);
      end
    end
  end

endmodule
