// Shared constants, types and the chip table of the IEEE 802.15.4 2.45 GHz
// O-QPSK receiver digital baseband.
//
// Each 4-bit data symbol is spread into 32 chips c0..c31; even chips ride on
// the I rail, odd chips on the Q rail, and Q is delayed by one chip time Tc.
// Every rail carries one half-sine pulse per 2*Tc (1 us), so with the 4 MHz
// flash ADC each pulse is seen by four samples (the "2x Nyquist grid").
// A symbol therefore spans 64 samples per rail.
//
// The chip table is not stored: symbol k (k < 8) is the symbol-0 sequence
// rotated right by 4*k chips, and symbol k+8 is symbol k with every odd chip
// inverted. This reproduces the standard's symbol-to-chip table.
package zb_pkg;

  localparam int unsigned SPC        = 4;          // samples per half-sine pulse per rail
  localparam int unsigned CHIPS      = 32;         // chips per data symbol
  localparam int unsigned RAIL_CHIPS = CHIPS / 2;  // chips per rail per symbol
  localparam int unsigned SPS        = SPC * RAIL_CHIPS; // samples per symbol = 64
  localparam int unsigned SW         = 6;          // signed sample width
  localparam logic [3:0]  SFD_LO     = 4'h7;       // SFD 0xA7, low nibble first
  localparam logic [3:0]  SFD_HI     = 4'hA;

  // Symbol 0 chip sequence; bit i holds chip c_i.
  localparam logic [31:0] CHIP_SEQ0 = 32'b0111_0100_0100_1010_1100_0011_1001_1011;

  typedef logic signed [SW-1:0] sample_t;

  typedef enum logic [2:0] {
    ST_IDLE, ST_DETECT, ST_SYNC, ST_CHEST, ST_SFD, ST_PHR, ST_PAYLOAD
  } dbb_state_t;

  // Chip vector of data symbol sym; bit i is chip c_i.
  function automatic logic [31:0] chip_seq(input logic [3:0] sym);
    logic [31:0] s;
    logic [4:0]  sh;
    sh = {sym[2:0], 2'b00};
    // rotate right in chip order: new c_i = old c_(i-4k)
    s = (CHIP_SEQ0 << sh) | (CHIP_SEQ0 >> (6'd32 - {1'b0, sh}));
    if (sh == 5'd0) s = CHIP_SEQ0;
    if (sym[3]) s = s ^ 32'hAAAA_AAAA;
    return s;
  endfunction

endpackage
