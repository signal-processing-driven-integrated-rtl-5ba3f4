// Hard-decision despreader for the 16-ary orthogonal 802.15.4 code.
//
// The 32 detected chips are compared with the 16 chip sequences of the
// symbol-to-chip table; the symbol whose sequence has the smallest Hamming
// distance wins (lowest symbol index on a tie). The winning distance is
// reported as a per-symbol confidence figure. Minimum-distance decoding of
// hard chips follows the document's choice of hard over soft decisions.
//
// Timing: one register stage; sym_valid follows chips_valid by one clock.
module zb_despreader
  import zb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chips_valid,
  input  logic [31:0] chips,
  output logic        sym_valid,
  output logic [3:0]  sym,
  output logic [5:0]  hdist
);

  logic [3:0] best;
  logic [5:0] best_d;

  always_comb begin
    best   = '0;
    best_d = 6'd63;
    for (int s = 0; s < 16; s++) begin
      logic [31:0] x;
      logic [5:0]  d;
      x = chips ^ chip_seq(4'(s));
      d = '0;
      for (int b = 0; b < CHIPS; b++) d = d + 6'(x[b]);
      if (d < best_d) begin
        best_d = d;
        best   = 4'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0; sym <= '0; hdist <= '0;
    end else begin
      sym_valid <= chips_valid;
      if (chips_valid) begin
        sym  <= best;
        hdist <= best_d;
      end
    end
  end

endmodule
