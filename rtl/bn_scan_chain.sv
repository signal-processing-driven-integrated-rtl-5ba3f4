// Scan chain moving data into and out of the accelerator's memory and
// configuration table.
//
// A frame of FW = 1 + SAW + CFGW bits is shifted in LSB first on scan_in
// while scan_en is high: data[23:0], then address[12:0], then the write
// flag. Pulsing `update` (with scan_en low) issues one access: address
// bit 12 selects the configuration table (1) or the factor memory (0).
// For a read the addressed word is captured into the data field of the
// chain on the following clock and appears bit by bit on scan_out during
// the next shift, so each shift also unloads the previous read.
// Using a scan chain for the memory traffic follows the document; the frame
// format is this design's.
module bn_scan_chain
  import bn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            scan_en,
  input  logic            scan_in,
  input  logic            update,
  output logic            scan_out,
  // access port
  output logic            req,
  output logic            we,
  output logic            sel_cfg,
  output logic [SAW-2:0]  addr,
  output logic [CFGW-1:0] wdata,
  input  logic [CFGW-1:0] rdata
);

  localparam int unsigned FW = 1 + SAW + CFGW;

  logic [FW-1:0] sr;
  logic          capture;

  assign scan_out = sr[0];
  assign wdata    = sr[CFGW-1:0];
  assign addr     = sr[CFGW +: SAW-1];
  assign sel_cfg  = sr[CFGW+SAW-1];
  assign we       = sr[FW-1];
  assign req      = update && !scan_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; capture <= 1'b0;
    end else begin
      capture <= req && !we;
      if (scan_en) sr <= {scan_in, sr[FW-1:1]};
      else if (capture) sr[CFGW-1:0] <= rdata;
    end
  end

endmodule
