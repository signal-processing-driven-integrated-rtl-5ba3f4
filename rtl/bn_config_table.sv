// Configuration table of the accelerator.
//
// Word 0 holds the operation (factor product, marginalisation/reduction or
// normalisation), words 1..3 the base addresses of factors A, B and the
// result, and words 4..23 one row per variable: cardinality, observed
// value, and the pinned / eliminated / in-A / in-B / in-result flags
// (packed as var_cfg_t in the low 21 bits). It is written and read through
// the scan chain; writes are ignored while the accelerator is busy.
// Configuring the mode from a table follows the document; the layout is
// this design's.
//
// Timing: writes take effect on the clock edge; reads are combinational.
module bn_config_table
  import bn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            busy,
  input  logic            we,
  input  logic [4:0]      addr,
  input  logic [CFGW-1:0] wdata,
  output logic [CFGW-1:0] rdata,
  output op_t             mode,
  output logic [AW-1:0]   base [3],
  output var_cfg_t        vcfg [NV]
);

  logic [CFGW-1:0] words [CFG_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < CFG_WORDS; w++) words[w] <= '0;
    end else if (we && !busy && int'(addr) < CFG_WORDS) begin
      words[addr] <= wdata;
    end
  end

  assign rdata = (int'(addr) < CFG_WORDS) ? words[addr] : '0;
  assign mode  = op_t'(words[CFG_MODE][1:0]);
  assign base[0] = words[CFG_BASE_A][AW-1:0];
  assign base[1] = words[CFG_BASE_B][AW-1:0];
  assign base[2] = words[CFG_BASE_O][AW-1:0];

  always_comb
    for (int v = 0; v < NV; v++) vcfg[v] = var_cfg_t'(words[CFG_VAR0 + v][VCW-1:0]);

endmodule
