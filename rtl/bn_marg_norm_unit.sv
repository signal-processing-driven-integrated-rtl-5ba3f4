// Factor reduction / marginalisation and renormalisation unit.
//
// It works on one factor at a time, one entry x of the input factor per
// clock, in one of three ways:
//  * marginal (total = 0, norm_apply = 0): result = x on the first visit of
//    a result entry, else log-add(y, x), where y is the partial sum read
//    back from that result entry. Factor reduction needs no arithmetic: the
//    index generator holds the observed variable fixed, so only entries
//    consistent with the observation are copied or summed.
//  * total (total = 1): x is log-added into an internal accumulator
//    (`first` restarts it); `sum` is the new total.
//  * apply (norm_apply = 1): result = x - norm_sum, so that with norm_sum
//    the log of the factor's total the entries sum to one again.
// Results are clamped to the 6-bit entry range. Renormalising after each
// operation follows the document; the read-back accumulation, the
// two-pass normalisation and the clamping are choices of this design.
//
// Timing: sum/result are combinational; the accumulator updates on the
// clock edge of each valid entry in total mode.
module bn_marg_norm_unit
  import bn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  logic  first,
  input  logic  total,
  input  logic  norm_apply,
  input  acc_t  norm_sum,
  input  cost_t x,
  input  cost_t y,
  output acc_t  sum,
  output cost_t result
);

  acc_t acc, x_ext, addend, added;

  assign x_ext  = acc_t'({1'b0, x});
  assign addend = total ? acc : acc_t'({1'b0, y});

  bn_logadd_lut u_add (.a(addend), .b(x_ext), .s(added));

  always_comb begin
    if (norm_apply) sum = x_ext - norm_sum;
    else            sum = first ? x_ext : added;
    if (sum < acc_t'(0))               result = '0;
    else if (sum > acc_t'((1<<DW)-1))  result = '1;
    else                               result = cost_t'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= acc_t'((1<<DW)-1);
    else if (valid && total && !norm_apply) acc <= sum;
  end

endmodule
