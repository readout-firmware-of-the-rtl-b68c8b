// spp_extractor: SuperPixel extraction for one link.
//
// A descrambled GWT frame brings four SPPs per 40 MHz bunch crossing.  They
// are loaded into a four-slot buffer and sent on one per 160 MHz cycle, SPP
// 3 (first on the wire) first, so the SPPs can be handled one at a time.
// SPPs with an empty hitmap are special packets and are not sent on; a
// special packet of the synchronisation type instead pulses sync_valid with
// its 12-bit bunch-crossing ID.  The 9-bit timestamp of data SPPs is
// converted from Gray code to binary and the link's 3-bit chip ID, fixed at
// compile time, is prepended (30 -> 33 bits).  Dropping empty SPPs, the Gray
// decode and the chip ID follow the document; slot order and the
// synchronisation-packet code are this design's choices.
//
// Timing: out_valid is registered; the first SPP of a frame leaves one cycle
// after in_valid.  Frames must be at least four cycles apart; a frame that
// arrives while SPPs of the previous one are still waiting overwrites them
// and is counted in `overruns`.
module spp_extractor #(
  parameter logic [2:0] CHIP_ID = 3'd0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [119:0]         in_spps,
  output logic                 out_valid,
  output velo_pkg::spp_chip_t  out_spp,
  output logic                 sync_valid,
  output logic [11:0]          sync_bxid,
  output logic [15:0]          overruns
);
  import velo_pkg::*;

  spp_t       slot [4];      // slot 0 = SPP 3 ... slot 3 = SPP 0
  logic [3:0] pend;
  logic [3:0] sel;           // one-hot, lowest pending slot
  logic [1:0] sel_idx;
  logic [3:0] new_data, new_sync;
  spp_t       in_slot [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      in_slot[k]  = spp_t'(in_spps[30*(3-k) +: 30]);
      new_data[k] = (in_slot[k].hit != '0);
      new_sync[k] = (in_slot[k].hit == '0) && (in_slot[k].col[6:3] == SPP_SYNC);
    end
    sel     = pend & (~pend + 4'd1);
    sel_idx = '0;
    for (int k = 3; k >= 0; k--) if (sel[k]) sel_idx = 2'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      out_valid  <= 1'b0;
      out_spp    <= '0;
      sync_valid <= 1'b0;
      sync_bxid  <= '0;
      overruns   <= '0;
      for (int k = 0; k < 4; k++) slot[k] <= '0;
    end else begin
      out_valid  <= (pend != '0);
      if (pend != '0) begin
        out_spp.chip     <= CHIP_ID;
        out_spp.spp      <= slot[sel_idx];
        out_spp.spp.ts   <= gray2bin(slot[sel_idx].ts);
      end
      sync_valid <= 1'b0;
      if (in_valid) begin
        if ((pend & ~sel) != '0) overruns <= overruns + 16'd1;
        pend <= new_data;
        for (int k = 0; k < 4; k++) slot[k] <= in_slot[k];
        for (int k = 3; k >= 0; k--)
          if (new_sync[k]) begin
            sync_valid <= 1'b1;
            sync_bxid  <= {in_slot[k].row[2:0], in_slot[k].ts};   // bits [19:8]
          end
      end else begin
        pend <= pend & ~sel;
      end
    end
  end

endmodule
