// gwt_word_aligner: finds the 128-bit GWT frame boundary in a stream of
// 32-bit transceiver words and keeps it.
//
// Every input word is joined with the previous one and a 32-bit window is
// taken at bit offset `slip` (0..31).  Four windows make one candidate
// frame.  While unlocked, a candidate whose top four bits are not the 4'hA
// header moves the boundary one bit later: slip is incremented, and when it
// wraps from 31 to 0 the word counter holds for one word, so all 128 bit
// positions are visited.  The candidate right after a wrap still holds
// words taken at the old slip and is skipped.  LOCK_FRAMES consecutive good headers assert
// `locked`; while locked, UNLOCK_FRAMES consecutive bad headers drop it and
// count a lock loss.  The header search, bit slip and configurable lock and
// unlock times follow the GWT receiver description; the counts are in
// frames and their defaults are this design's choice.
//
// Interface: rx_word has its earliest bit in bit 31.  frame_valid pulses
// once per four words (40 MHz rate at a 160 MHz word clock) with the frame
// in `frame`, only while locked and only for frames with a good header.
// Latency: frame_valid is registered, one cycle after the last word.
module gwt_word_aligner #(
  parameter int unsigned LOCK_FRAMES   = 16,
  parameter int unsigned UNLOCK_FRAMES = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_valid,
  input  logic [31:0]  rx_word,
  output logic         frame_valid,
  output logic [127:0] frame,
  output logic         locked,
  output logic [15:0]  lock_losses
);
  import velo_pkg::*;

  logic [31:0]  prev_word;
  logic [4:0]   slip;
  logic [1:0]   wcnt;
  logic [95:0]  fr;               // three previous aligned words
  logic [7:0]   good_cnt, bad_cnt;
  logic [31:0]  aligned;
  logic [127:0] cand;
  logic         boundary, hdr_ok;
  logic         skip;             // next candidate mixes two slips

  always_comb begin
    aligned  = 32'({prev_word, rx_word} >> (7'd32 - 7'(slip)));
    cand     = {fr, aligned};
    boundary = rx_valid && (wcnt == 2'd3);
    hdr_ok   = (cand[127:124] == GWT_HDR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_word   <= '0;
      slip        <= '0;
      wcnt        <= '0;
      fr          <= '0;
      good_cnt    <= '0;
      bad_cnt     <= '0;
      locked      <= 1'b0;
      lock_losses <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
      skip        <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (rx_valid) begin
        prev_word <= rx_word;
        fr        <= {fr[63:0], aligned};
        wcnt      <= wcnt + 2'd1;
        if (boundary && skip) begin
          skip <= 1'b0;
        end else if (boundary) begin
          frame <= cand;
          if (!locked) begin
            if (hdr_ok) begin
              bad_cnt <= '0;
              if (good_cnt == 8'(LOCK_FRAMES - 1)) begin
                locked   <= 1'b1;
                good_cnt <= '0;
              end else begin
                good_cnt <= good_cnt + 8'd1;
              end
            end else begin
              good_cnt <= '0;
              slip     <= slip + 5'd1;
              if (slip == 5'd31) begin
                wcnt <= wcnt;                   // boundary one word later
                skip <= 1'b1;
              end
            end
          end else begin
            frame_valid <= hdr_ok;
            if (hdr_ok) begin
              bad_cnt <= '0;
            end else if (bad_cnt == 8'(UNLOCK_FRAMES - 1)) begin
              locked      <= 1'b0;
              bad_cnt     <= '0;
              good_cnt    <= '0;
              lock_losses <= lock_losses + 16'd1;
            end else begin
              bad_cnt <= bad_cnt + 8'd1;
            end
          end
        end
      end
    end
  end

endmodule
