// gwt_descrambler: descrambles the four 30-bit SPPs of each GWT frame.
//
// The scrambling polynomial is x^30 + x^16 + x^15 + x + 1.  Each SPP slot is
// an independent self-synchronising lane: an output bit is the received bit
// XORed with the received bits 1, 15, 16 and 30 positions earlier in the
// same lane.  With 30 bits per frame, the history is exactly the previous
// frame's word of that lane, so one frame is descrambled per cycle with no
// state beyond it.  The self-synchronising form and the per-slot lanes are
// this design's reading of the polynomial; the polynomial is the link's.
//
// Every frame advances the history; frames flagged with in_err, and the
// first frame after `clear` (history not yet filled), are not passed on.
// Timing: one register stage.
module gwt_descrambler (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_err,
  input  logic [119:0] in_spps,
  output logic         out_valid,
  output logic [119:0] out_spps
);
  import velo_pkg::*;

  logic [119:0] hist;
  logic         primed;
  logic [119:0] desc;

  always_comb
    for (int i = 0; i < 4; i++)
      desc[30*i +: 30] = descramble30(in_spps[30*i +: 30], hist[30*i +: 30]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_spps  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        primed <= 1'b0;
      end else if (in_valid) begin
        hist      <= in_spps;
        primed    <= 1'b1;
        out_valid <= primed && !in_err;
        out_spps  <= desc;
      end
    end
  end

endmodule
