// Twenty cascaded assignment counters with incremental index generation.
//
// Counter 0 is the fastest. Each counter runs from 0 to its variable's
// cardinality minus one and carries into the next; a pinned (observed)
// variable and a variable of cardinality 1 never move. Instead of
// multiplying assignments by strides, the three factor indices are updated
// incrementally: the counter that advances adds its stride, and every
// counter below it that wraps subtracts its (card-1)*stride. Cascaded
// counters generating assignments on the fly follow the document; the
// incremental indexing is this design's.
//
// `last` flags the final assignment; `grp_first` flags an assignment in
// which every summed-out variable is at its first value, i.e. the first
// visit of the result entry a marginal sum is collected in.
//
// Timing: `load` sets all counters to their first assignment and the
// indices to the pinned offsets; `step` advances by one on the clock edge.
module bn_assign_counters
  import bn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  var_cfg_t      vcfg [NV],
  input  logic [IW-1:0] stride [3][NV],
  input  logic [IW-1:0] wrap   [3][NV],
  input  logic [IW-1:0] offset [3],
  output logic [IW-1:0] idx [3],
  output logic          last,
  output logic          grp_first
);

  logic [CW-1:0] a [NV];
  logic [NV-1:0] at_max;    // counter cannot advance without wrapping
  logic [NV-1:0] adv;       // the counter that advances (one-hot or zero)
  logic [NV-1:0] wrp;       // counters that wrap
  logic [IW-1:0] nidx [3];

  always_comb begin
    logic found;
    found = 1'b0;
    for (int v = 0; v < NV; v++) begin
      at_max[v] = vcfg[v].pinned || (card_of(vcfg[v]) <= IW'(1)) ||
                  (IW'(a[v]) == card_of(vcfg[v]) - IW'(1));
      adv[v] = !found && !at_max[v];
      wrp[v] = !found && at_max[v] && !vcfg[v].pinned;
      if (!at_max[v]) found = 1'b1;
    end
    last     = !found;
    grp_first = 1'b1;
    for (int v = 0; v < NV; v++)
      if (vcfg[v].elim && !vcfg[v].pinned && a[v] != '0) grp_first = 1'b0;
    for (int f = 0; f < 3; f++) begin
      nidx[f] = idx[f];
      for (int v = 0; v < NV; v++) begin
        if (adv[v]) nidx[f] = nidx[f] + stride[f][v];
        if (wrp[v]) nidx[f] = nidx[f] - wrap[f][v];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NV; v++) a[v] <= '0;
      for (int f = 0; f < 3; f++) idx[f] <= '0;
    end else if (load) begin
      for (int v = 0; v < NV; v++) a[v] <= vcfg[v].pinned ? vcfg[v].pin_val : '0;
      for (int f = 0; f < 3; f++) idx[f] <= offset[f];
    end else if (step && !last) begin
      for (int v = 0; v < NV; v++) begin
        if (adv[v]) a[v] <= a[v] + CW'(1);
        else if (wrp[v]) a[v] <= '0;
      end
      for (int f = 0; f < 3; f++) idx[f] <= nidx[f];
    end
  end

endmodule
