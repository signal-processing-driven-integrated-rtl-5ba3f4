// Hardware accelerator for exact inference in arbitrary Bayesian networks
// by clique-tree message passing.
//
// A message-passing schedule is a sequence of factor operations, and the
// accelerator performs one at a time: the product of two factors, the
// marginalisation of a factor (with optional reduction by observed
// variables), or the renormalisation of a factor. Factors live as flat
// log-space arrays in the factor memory. For each operation the
// configuration table lists up to 20 variables with their cardinalities
// and the factors they belong to; strides are derived from the
// cardinalities, 20 cascaded counters enumerate the assignments, and the
// three factor indices follow from the strides. Products are additions of
// 6-bit log values; sums use a look-up-table log adder.
//
// Interface: memory and table are loaded and unloaded through the scan
// chain while the accelerator is idle; `go` starts the configured
// operation and `done` pulses at its end. An operation over E assignments
// takes about 2*E + NV + 4 clocks (2*(2E) + ... for normalisation).
// The partitioning follows the document; see the sub-blocks for what is
// this design's own.
module bn_accel
  import bn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  input  logic scan_update,
  output logic scan_out,
  input  logic go,
  output logic busy,
  output logic done,
  output logic [IW-1:0] result_entries,  // entries of the configured result factor
  output logic too_large                 // result exceeds the 1K-entry limit
);

  // scan access
  logic            s_req, s_we, s_cfg;
  logic [SAW-2:0]  s_addr;
  logic [CFGW-1:0] s_wdata, s_rdata, cfg_rdata;
  // configuration
  op_t             mode;
  logic [AW-1:0]   base [3];
  var_cfg_t        vcfg [NV];
  // strides and counters
  logic [IW-1:0]   stride [3][NV];
  logic [IW-1:0]   wrap   [3][NV];
  logic [IW-1:0]   offset [3];
  logic [IW-1:0]   size   [3];
  logic [IW-1:0]   idx    [3];
  logic            stride_start, stride_done, cnt_load, cnt_step, last, grp_first;
  // datapath
  logic            mem_we, wsel_product, mu_valid, mu_first, mu_total, rd_b_result, norm_apply;
  acc_t            norm_sum, mu_sum;
  cost_t           rd_a, rd_b, prod, mu_res;
  logic [AW-1:0]   ra_a, ra_b, wa;
  cost_t           wd;
  logic            m_we;

  bn_scan_chain u_scan (
    .clk, .rst_n, .scan_en, .scan_in, .update(scan_update), .scan_out,
    .req(s_req), .we(s_we), .sel_cfg(s_cfg), .addr(s_addr), .wdata(s_wdata),
    .rdata(s_rdata));

  bn_config_table u_cfg (
    .clk, .rst_n, .busy, .we(s_req && s_we && s_cfg), .addr(s_addr[4:0]),
    .wdata(s_wdata), .rdata(cfg_rdata), .mode, .base, .vcfg);

  bn_stride_calc u_str (
    .clk, .rst_n, .start(stride_start), .vcfg, .stride, .wrap, .offset, .size,
    .done(stride_done));

  bn_assign_counters u_cnt (
    .clk, .rst_n, .load(cnt_load), .step(cnt_step), .vcfg, .stride, .wrap,
    .offset, .idx, .last, .grp_first);

  bn_ctrl u_ctrl (
    .clk, .rst_n, .go(go && !busy), .mode, .stride_done, .last, .grp_first, .mu_sum,
    .busy, .done, .stride_start, .cnt_load, .cnt_step, .mem_we, .wsel_product,
    .mu_valid, .mu_first, .mu_total, .rd_b_result, .norm_apply, .norm_sum);

  bn_product_unit u_prod (.a(rd_a), .b(rd_b), .p(prod));

  bn_marg_norm_unit u_mn (
    .clk, .rst_n, .valid(mu_valid), .first(mu_first), .total(mu_total),
    .norm_apply, .norm_sum, .x(rd_a), .y(rd_b), .sum(mu_sum), .result(mu_res));

  // Memory ports: the scan chain owns them while the accelerator is idle.
  always_comb begin
    if (busy) begin
      ra_a = base[0] + idx[0][AW-1:0];
      ra_b = rd_b_result ? base[2] + idx[2][AW-1:0] : base[1] + idx[1][AW-1:0];
      wa   = base[2] + idx[2][AW-1:0];
      wd   = wsel_product ? prod : mu_res;
      m_we = mem_we;
    end else begin
      ra_a = s_addr[AW-1:0];
      ra_b = s_addr[AW-1:0];
      wa   = s_addr[AW-1:0];
      wd   = s_wdata[DW-1:0];
      m_we = s_req && s_we && !s_cfg;
    end
  end

  bn_factor_mem u_mem (
    .clk, .raddr_a(ra_a), .raddr_b(ra_b), .rdata_a(rd_a), .rdata_b(rd_b),
    .we(m_we), .waddr(wa), .wdata(wd));

  // A configuration read is answered from the table, a memory read from
  // the memory one clock later; the scan chain captures on that clock.
  logic            cfg_rd_q;
  logic [CFGW-1:0] cfg_rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_rd_q <= 1'b0; cfg_rdata_q <= '0;
    end else begin
      cfg_rd_q        <= s_cfg;
      cfg_rdata_q     <= cfg_rdata;
    end
  end
  assign result_entries = size[2];
  assign too_large      = stride_done && (size[2] > IW'(MAXE));
  assign s_rdata = cfg_rd_q ? cfg_rdata_q : CFGW'(rd_a);

endmodule
