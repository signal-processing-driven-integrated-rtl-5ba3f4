// Digital baseband controller and PPDU framing.
//
// State sequence: IDLE until `start`; DETECT (energy detector armed);
// SYNC (one-symbol preamble peak search); CHEST (channel template and
// sample selection); SFD (symbols are decoded until the pair 0x7, 0xA,
// i.e. the SFD octet 0xA7 sent low nibble first, is seen); PHR (two
// symbols, the 7-bit frame length); PAYLOAD (length octets, each assembled
// from two symbols, low nibble first). After a frame the controller rearms
// the detector for the next packet while `start` stays high. With
// `rx_infinite` set, the frame length is ignored and octets are delivered
// without end, the receive-forever state used for bit-error-rate tests.
// Dropping `start` returns to IDLE from any state. If no SFD appears within
// SFD_TIMEOUT symbols the search starts again from DETECT.
// The ordering of the states follows the document; the timeout, the rearm
// behaviour and the handshakes are choices of this design.
//
// Timing: search/ce_start/ed_clear are one-clock pulses on the state
// entries; byte_valid is a one-clock pulse per octet.
module zb_dbb_ctrl
  import zb_pkg::*;
#(
  parameter int unsigned SFD_TIMEOUT = 16   // symbols allowed before the SFD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       rx_infinite,
  input  logic       detected,
  input  logic       locked,
  input  logic       ce_done,
  input  logic       sym_valid,
  input  logic [3:0] sym,
  output dbb_state_t state,
  output logic       ed_enable,
  output logic       ed_clear,
  output logic       ts_search,
  output logic       ce_start,
  output logic       demod_enable,
  output logic       sfd_found,     // pulse
  output logic [6:0] frame_len,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_done     // pulse
);

  logic [3:0] prev_sym, lo_nib;
  logic       have_lo, prev_ok;
  logic [7:0] sym_cnt;
  logic [6:0] byte_cnt;
  logic       ce_seen;

  assign ed_enable    = (state == ST_DETECT);
  assign demod_enable = (state == ST_SFD) || (state == ST_PHR) || (state == ST_PAYLOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; ed_clear <= 1'b0; ts_search <= 1'b0; ce_start <= 1'b0;
      sfd_found <= 1'b0; frame_len <= '0; byte_valid <= 1'b0; byte_data <= '0;
      frame_done <= 1'b0; prev_sym <= '0; prev_ok <= 1'b0; lo_nib <= '0;
      have_lo <= 1'b0; sym_cnt <= '0; byte_cnt <= '0; ce_seen <= 1'b0;
    end else begin
      ed_clear <= 1'b0; ts_search <= 1'b0; ce_start <= 1'b0;
      sfd_found <= 1'b0; byte_valid <= 1'b0; frame_done <= 1'b0;
      if (!start) begin
        state <= ST_IDLE;
      end else begin
        unique case (state)
          ST_IDLE: begin
            state    <= ST_DETECT;
            ed_clear <= 1'b1;
          end
          ST_DETECT: if (detected && !ed_clear) begin
            state     <= ST_SYNC;
            ts_search <= 1'b1;
          end
          ST_SYNC: if (locked && !ts_search) begin
            state    <= ST_CHEST;
            ce_start <= 1'b1;
            ce_seen  <= 1'b0;
          end
          ST_CHEST: begin
            if (!ce_start && !ce_done) ce_seen <= 1'b1;
            if (ce_seen && ce_done) begin
              state   <= ST_SFD;
              prev_ok <= 1'b0;
              sym_cnt <= '0;
            end
          end
          ST_SFD: if (sym_valid) begin
            prev_sym <= sym;
            prev_ok  <= 1'b1;
            sym_cnt  <= sym_cnt + 8'd1;
            if (prev_ok && prev_sym == SFD_LO && sym == SFD_HI) begin
              sfd_found <= 1'b1;
              have_lo   <= 1'b0;
              byte_cnt  <= '0;
              state     <= rx_infinite ? ST_PAYLOAD : ST_PHR;
            end else if (sym_cnt >= 8'(SFD_TIMEOUT)) begin
              state    <= ST_DETECT;
              ed_clear <= 1'b1;
            end
          end
          ST_PHR: if (sym_valid) begin
            if (!have_lo) begin
              lo_nib  <= sym;
              have_lo <= 1'b1;
            end else begin
              have_lo   <= 1'b0;
              frame_len <= {sym[2:0], lo_nib};
              if ({sym[2:0], lo_nib} == 7'd0) begin
                frame_done <= 1'b1;
                state      <= ST_DETECT;
                ed_clear   <= 1'b1;
              end else begin
                state <= ST_PAYLOAD;
              end
            end
          end
          ST_PAYLOAD: if (sym_valid) begin
            if (!have_lo) begin
              lo_nib  <= sym;
              have_lo <= 1'b1;
            end else begin
              have_lo    <= 1'b0;
              byte_valid <= 1'b1;
              byte_data  <= {sym, lo_nib};
              byte_cnt   <= byte_cnt + 7'd1;
              if (!rx_infinite && byte_cnt + 7'd1 == frame_len) begin
                frame_done <= 1'b1;
                state      <= ST_DETECT;
                ed_clear   <= 1'b1;
              end
            end
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

endmodule
