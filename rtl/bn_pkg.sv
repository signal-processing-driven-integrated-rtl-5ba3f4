// Shared types and constants of the Bayesian-network factor accelerator.
//
// Factors are multidimensional tables stored as flat arrays. Entries are
// held in log space as 6-bit costs u, standing for the probability
// p = 2^(-u/4) (a quarter-octave step); u = 63 is the smallest value and is
// treated as "practically zero". Products become saturating additions, sums
// use a look-up-table log adder. Up to NV = 20 variables take part in an
// operation, each with up to 256 values. The 6-bit resolution and the
// 20-variable, 256-value and 1K-entry limits follow the document; the
// cost scale and the table layout are choices of this design.
package bn_pkg;

  localparam int unsigned NV   = 20;   // variables per operation
  localparam int unsigned CW   = 8;    // cardinality width (256 values)
  localparam int unsigned DW   = 6;    // entry resolution in log space
  localparam int unsigned AW   = 12;   // factor memory address width (4K entries)
  localparam int unsigned IW   = 16;   // index and stride width
  localparam int unsigned MAXE = 1024; // largest factor handled at a time
  localparam int unsigned ACCW = 11;   // signed log-sum accumulator width
  localparam int unsigned CFGW = 24;   // configuration / scan data word
  localparam int unsigned SAW  = 13;   // scan address: bit 12 selects the table

  typedef logic [DW-1:0] cost_t;
  typedef logic signed [ACCW-1:0] acc_t;

  typedef enum logic [1:0] {
    OP_PRODUCT   = 2'd0,   // out = A * B          (costs added)
    OP_MARGINAL  = 2'd1,   // out = sum over elim vars of A, pinned vars reduce
    OP_NORMALIZE = 2'd2    // out = A / sum(A)
  } op_t;

  // One configuration-table row per variable.
  typedef struct packed {
    logic [CW-1:0] card;     // cardinality (1..256, 0 read as 256)
    logic [CW-1:0] pin_val;  // observed value when pinned
    logic          pinned;   // factor reduction: variable fixed to pin_val
    logic          elim;     // summed out in a marginalisation
    logic          in_a;     // in the scope of input factor A
    logic          in_b;     // in the scope of input factor B
    logic          in_o;     // in the scope of the result
  } var_cfg_t;

  localparam int unsigned VCW = $bits(var_cfg_t);

  // Configuration word addresses
  localparam int unsigned CFG_MODE   = 0;
  localparam int unsigned CFG_BASE_A = 1;
  localparam int unsigned CFG_BASE_B = 2;
  localparam int unsigned CFG_BASE_O = 3;
  localparam int unsigned CFG_VAR0   = 4;   // rows 4..23
  localparam int unsigned CFG_WORDS  = CFG_VAR0 + NV;

  function automatic logic [IW-1:0] card_of(input var_cfg_t v);
    return (v.card == '0) ? IW'(256) : IW'(v.card);
  endfunction

endpackage
