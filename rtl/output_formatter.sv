// output_formatter: packs each event's clusters into an LHCb event
// fragment.
//
// Clusters of an event are collected (up to MAX_CLUSTERS; more are dropped
// and flagged).  At the event's end item the fragment is sent as 32-bit
// words:
//   word 0  event ID (incremented for every fragment sent)
//   word 1  {source ID[15:0], fragment size in bytes[15:0]}
//   word 2  {format version[7:0], flags[7:0], 4'b0, bunch-crossing ID[11:0]}
//           flags = {synced, timestamp mismatch, truncated, fast reset, 4'b0}
//   word 3+ one cluster word per cluster, {cluster_t, 3'b000}
// The size counts all words, header included.  The header contents (event
// ID, source ID, size, version) follow the document; the word layout is
// this design's choice.
//
// frag_* is a valid/ready stream with frag_last on the final word.  `idle`
// is high while no fragment is being sent and no end item is arriving,
// which lets clustering start the next event.
module output_formatter #(
  parameter logic [15:0] SOURCE_ID    = 16'd0,
  parameter logic [7:0]  VERSION      = 8'd1,
  parameter int unsigned MAX_CLUSTERS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  velo_pkg::clu_item_t in_item,
  output logic                idle,
  output logic                frag_valid,
  input  logic                frag_ready,
  output logic [31:0]         frag_data,
  output logic                frag_last,
  output logic [31:0]         fragments
);
  import velo_pkg::*;
  localparam int unsigned NW = $clog2(MAX_CLUSTERS + 1);

  logic [31:0]   cbuf [MAX_CLUSTERS];
  logic [NW-1:0] n, idx;
  evt_hdr_t      hdr;
  logic          trunc;
  logic          sending;
  logic [1:0]    hw;          // header word index
  logic [31:0]   event_id;
  logic [15:0]   size_bytes;

  assign idle       = !sending && !(in_valid && in_item.kind == K_END);
  assign size_bytes = 16'((32'(n) + 32'd3) * 32'd4);

  always_comb begin
    frag_valid = sending;
    frag_last  = 1'b0;
    frag_data  = '0;
    if (hw == 2'd0)      frag_data = event_id;
    else if (hw == 2'd1) frag_data = {SOURCE_ID, size_bytes};
    else if (hw == 2'd2) begin
      frag_data = {VERSION, hdr.synced, hdr.ts_mismatch, hdr.truncated | trunc, hdr.fast_reset,
                   4'b0000, 4'b0000, hdr.bxid};
      frag_last = (n == '0);
    end else begin
      frag_data = cbuf[idx[NW-2:0]];
      frag_last = (idx + 1'b1 == n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      idx       <= '0;
      hdr       <= '0;
      trunc     <= 1'b0;
      sending   <= 1'b0;
      hw        <= '0;
      event_id  <= '0;
      fragments <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        case (in_item.kind)
          K_HDR: begin
            hdr   <= evt_hdr_t'(in_item.payload[15:0]);
            n     <= '0;
            trunc <= 1'b0;
          end
          K_CLU: begin
            if (n < NW'(MAX_CLUSTERS)) begin
              cbuf[n[NW-2:0]] <= cluster_word(cluster_t'(in_item.payload));
              n <= n + 1'b1;
            end else begin
              trunc <= 1'b1;
            end
          end
          K_END: begin
            sending <= 1'b1;
            hw      <= '0;
            idx     <= '0;
          end
          default: ;
        endcase
      end
    end else if (frag_ready) begin
      if (frag_last) begin
        sending   <= 1'b0;
        event_id  <= event_id + 32'd1;
        fragments <= fragments + 32'd1;
      end
      if (hw != 2'd3) hw <= hw + 2'd1;
      else            idx <= idx + 1'b1;
    end
  end

endmodule
