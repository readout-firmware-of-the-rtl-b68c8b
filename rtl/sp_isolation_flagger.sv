// sp_isolation_flagger: marks each SuperPixel of an event as isolated or
// not.
//
// The SPs of one event are buffered (up to MAX_SP; more are dropped and the
// event header's truncated flag is set).  When the event's last item has
// arrived, the buffered SPs are sent out one per cycle, each compared in
// parallel with every other SP of the event: an SP is isolated when no SP
// of the same chip sits in any of the eight neighbouring SuperPixel
// positions.  The header item goes out first.  Buffering a whole event and
// searching the eight neighbours follow the clustering description; the
// buffer size and the parallel compare are this design's choices.
//
// Handshake: valid/ready on both sides.  The input is not accepted while an
// event is being sent out.  Output items keep the input format, with
// out_iso beside them (meaningful for SP items only).
module sp_isolation_flagger #(
  parameter int unsigned MAX_SP = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  velo_pkg::evt_item_t in_item,
  output logic                out_valid,
  input  logic                out_ready,
  output velo_pkg::evt_item_t out_item,
  output logic                out_iso,
  output logic [15:0]         sp_drops
);
  import velo_pkg::*;
  localparam int unsigned NW = $clog2(MAX_SP + 1);

  spp_stored_t buf_sp [MAX_SP];
  evt_hdr_t    hdr;
  logic [NW-1:0] n, idx;
  logic        sending, hdr_sent;
  logic        neigh;
  spp_stored_t me;

  assign in_ready = !sending;

  always_comb begin
    me    = buf_sp[idx[NW-2:0]];
    neigh = 1'b0;
    for (int j = 0; j < MAX_SP; j++) begin
      logic [6:0] dcol;
      logic [5:0] drow;
      dcol = buf_sp[j].col - me.col + 7'd1;     // 0..2 when |dcol| <= 1
      drow = buf_sp[j].row - me.row + 6'd1;
      if (NW'(j) < n && NW'(j) != idx && buf_sp[j].chip == me.chip && dcol <= 7'd2 && drow <= 6'd2)
        neigh = 1'b1;
    end
  end

  always_comb begin
    out_valid = sending;
    out_item  = '0;
    out_iso   = 1'b0;
    if (!hdr_sent) begin
      out_item.is_hdr  = 1'b1;
      out_item.last    = (n == '0);
      out_item.payload = 24'(hdr);
    end else begin
      out_item.is_hdr  = 1'b0;
      out_item.last    = (idx + 1'b1 == n);
      out_item.payload = me;
      out_iso          = !neigh;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n        <= '0;
      idx      <= '0;
      sending  <= 1'b0;
      hdr_sent <= 1'b0;
      hdr      <= '0;
      sp_drops <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        if (in_item.is_hdr) begin
          hdr <= evt_hdr_t'(in_item.payload[15:0]);
          n   <= '0;
        end else if (n < NW'(MAX_SP)) begin
          buf_sp[n[NW-2:0]] <= spp_stored_t'(in_item.payload);
          n <= n + 1'b1;
        end else begin
          hdr.truncated <= 1'b1;
          sp_drops      <= sp_drops + 16'd1;
        end
        if (in_item.last) begin
          sending  <= 1'b1;
          hdr_sent <= 1'b0;
          idx      <= '0;
        end
      end
    end else if (out_ready) begin
      if (!hdr_sent) begin
        hdr_sent <= 1'b1;
        if (n == '0) sending <= 1'b0;
      end else begin
        idx <= idx + 1'b1;
        if (idx + 1'b1 == n) sending <= 1'b0;
      end
    end
  end

endmodule
