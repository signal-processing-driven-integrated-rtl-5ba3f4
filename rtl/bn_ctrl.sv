// Control state machine of the factor accelerator.
//
// go -> STRIDE (strides computed from the table) -> LOAD (counters set to
// the first assignment) -> a two-clock loop per assignment: RD presents
// the A and B addresses to the memory, EX combines the read entries and
// writes the result, then the counters step. The operation decides what EX
// does:
//   product     write A+B (log space) at the result index, every assignment;
//   marginal    log-add A into the result entry read back through port B
//               (the first visit, grp_first, just copies A);
//   normalize   pass 1 log-adds every entry of A into the total; pass 2
//               reloads the counters and writes A minus the total.
// After the last assignment the machine goes to DONE, raises `done`, and
// returns to IDLE on the next clock. The states and their order are
// this design's; the document names only the three operating modes.
module bn_ctrl
  import bn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  op_t   mode,
  input  logic  stride_done,
  input  logic  last,
  input  logic  grp_first,
  input  acc_t  mu_sum,
  output logic  busy,
  output logic  done,
  output logic  stride_start,
  output logic  cnt_load,
  output logic  cnt_step,
  output logic  mem_we,
  output logic  wsel_product,  // write data from the product unit
  output logic  mu_valid,
  output logic  mu_first,
  output logic  mu_total,
  output logic  rd_b_result,   // port B reads the result factor
  output logic  norm_apply,
  output acc_t  norm_sum
);

  typedef enum logic [2:0] {S_IDLE, S_STRIDE, S_WAIT, S_LOAD, S_RD, S_EX, S_DONE} st_t;
  st_t  st;
  logic pass2, first_q;

  assign busy         = (st != S_IDLE);
  assign done         = (st == S_DONE);
  assign stride_start = (st == S_IDLE) && go;
  assign cnt_load     = (st == S_LOAD);
  assign cnt_step     = (st == S_EX) && !last;
  assign wsel_product = (mode == OP_PRODUCT);
  assign norm_apply   = (mode == OP_NORMALIZE) && pass2;
  assign mu_valid     = (st == S_EX) && (mode != OP_PRODUCT) && !norm_apply;
  assign mu_total     = (mode == OP_NORMALIZE);
  assign mu_first     = (mode == OP_MARGINAL) ? grp_first : first_q;
  assign rd_b_result  = (mode == OP_MARGINAL);

  always_comb begin
    mem_we = 1'b0;
    if (st == S_EX) begin
      unique case (mode)
        OP_PRODUCT:   mem_we = 1'b1;
        OP_MARGINAL:  mem_we = 1'b1;
        OP_NORMALIZE: mem_we = pass2;
        default:      mem_we = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pass2 <= 1'b0; first_q <= 1'b0; norm_sum <= '0;
    end else begin
      unique case (st)
        S_IDLE:   if (go) begin st <= S_STRIDE; pass2 <= 1'b0; end
        S_STRIDE: st <= S_WAIT;          // stride unit clears its done flag
        S_WAIT:   if (stride_done) st <= S_LOAD;
        S_LOAD:   begin st <= S_RD; first_q <= 1'b1; end
        S_RD:     st <= S_EX;
        S_EX: begin
          first_q <= 1'b0;
          if (last) begin
            if (mode == OP_NORMALIZE && !pass2) begin
              pass2    <= 1'b1;
              norm_sum <= mu_sum;
              st       <= S_LOAD;
            end else begin
              st <= S_DONE;
            end
          end else begin
            st <= S_RD;
          end
        end
        S_DONE:   st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

endmodule
