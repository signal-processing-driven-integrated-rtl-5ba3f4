// On-the-fly stride computation for the three factors of an operation.
//
// Variable 0 changes fastest. For each factor F (input A, input B, result
// O) the stride of variable i is the product of the cardinalities of the
// variables j < i that belong to F, and zero when i does not belong to F.
// Then index_F = sum_i assignment[i] * stride_F[i] (eq. 14 of the method).
// The block walks the NV variables one per clock with a single multiplier
// per factor and also produces, per variable, the "wrap" step
// (card-1)*stride that the counters subtract when that variable returns to
// zero, and the index offset contributed by pinned (observed) variables.
// Computing the strides from the stored cardinalities rather than storing
// them follows the document; the serial schedule is this design's.
//
// Timing: `done` rises NV+1 clocks after `start` and stays high until the
// next start.
module bn_stride_calc
  import bn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  var_cfg_t        vcfg [NV],
  output logic [IW-1:0]   stride [3][NV],  // [0]=A, [1]=B, [2]=O
  output logic [IW-1:0]   wrap   [3][NV],
  output logic [IW-1:0]   offset [3],
  output logic [IW-1:0]   size   [3],      // entries of A, B, O
  output logic            done
);

  logic [IW-1:0] acc [3];
  logic [4:0]    i;
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; i <= '0;
      for (int f = 0; f < 3; f++) begin
        acc[f] <= '0; offset[f] <= '0; size[f] <= '0;
        for (int v = 0; v < NV; v++) begin
          stride[f][v] <= '0; wrap[f][v] <= '0;
        end
      end
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0; i <= '0;
      for (int f = 0; f < 3; f++) begin
        acc[f] <= IW'(1); offset[f] <= '0;
      end
    end else if (busy) begin
      if (i == 5'(NV)) begin
        busy <= 1'b0;
        done <= 1'b1;
        for (int f = 0; f < 3; f++) size[f] <= acc[f];
      end else begin
        for (int f = 0; f < 3; f++) begin
          logic member;
          logic [IW-1:0] nxt;
          member = (f == 0) ? vcfg[i].in_a : (f == 1) ? vcfg[i].in_b : vcfg[i].in_o;
          nxt    = IW'(acc[f] * card_of(vcfg[i]));
          if (member) begin
            stride[f][i] <= acc[f];
            wrap[f][i]   <= nxt - acc[f];
            acc[f]       <= nxt;
            if (vcfg[i].pinned) offset[f] <= offset[f] + IW'(acc[f] * IW'(vcfg[i].pin_val));
          end else begin
            stride[f][i] <= '0;
            wrap[f][i]   <= '0;
          end
        end
        i <= i + 5'd1;
      end
    end
  end

endmodule
