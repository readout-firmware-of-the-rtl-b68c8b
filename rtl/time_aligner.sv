// time_aligner: aligns the sorted VELO data to the LHCb timing system.
//
// Every bunch crossing the TFC delivers metadata (12-bit bunch-crossing ID,
// fast-reset, synchronisation and veto flags).  It is pushed into the TFC
// buffer tagged with the number (mod 4) of the sorter page being written.
// When the pushed ID has its nine LSBs at zero, a new timestamp period
// starts: `swap` tells the sorter to exchange pages and the closed page is
// opened for reading.
//
// For each buffered entry of the open page, the aligner reads the time bin
// named by the entry's nine ID bits from the sorter and emits an event: one
// header item, then one item per SPP of the bin.  Vetoed bunch crossings
// emit nothing.  The 9-bit VELO timestamp is extended to 12 bits with the
// upper bits learned from synchronisation packets: a page that carried one
// sets them, every later page adds one.  Until the first synchronisation
// the events carry no SPPs and synced=0; afterwards a difference between
// the extended VELO time and the TFC ID sets ts_mismatch.  Entries of a
// page that is closed again before they were read are dropped and counted
// in `overruns`.  The matching of TFC metadata to time bins follows the
// document; the tagging, veto handling and flags are this design's
// choices.
//
// Event items leave through a 4-deep FIFO with a valid/ready handshake; an
// SPP read is issued only when that FIFO has room for it, so back-pressure
// never loses data.  Throughput: one SPP per cycle, plus two cycles per
// event.
module time_aligner #(
  parameter int unsigned TFC_DEPTH = 1024,
  parameter int unsigned SLOTS     = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // TFC metadata, at most one per bunch crossing
  input  logic                       tfc_valid,
  input  velo_pkg::tfc_t             tfc,
  // sorter control and read port
  output logic                       swap,
  input  logic                       rd_sync_seen,
  input  logic [2:0]                 rd_sync_upper,
  output logic [8:0]                 rd_bin,
  input  logic [$clog2(SLOTS+1)-1:0] rd_count,
  input  logic                       rd_ovf,
  output logic                       rd_en,
  output logic [$clog2(SLOTS)-1:0]   rd_slot,
  input  velo_pkg::spp_stored_t      rd_data,
  // event stream
  output logic                       out_valid,
  input  logic                       out_ready,
  output velo_pkg::evt_item_t        out_item,
  // monitoring
  output logic                       synced,
  output logic [15:0]                tfc_drops,
  output logic [15:0]                overruns,
  output logic [31:0]                events
);
  import velo_pkg::*;
  localparam int unsigned CW = $clog2(SLOTS + 1);
  localparam int unsigned SW = $clog2(SLOTS);

  typedef struct packed {
    logic [1:0] win;
    tfc_t       tfc;
  } tfc_entry_t;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_t;

  state_t     state;
  logic [1:0] wr_win, rd_win;
  logic       page_open;
  logic [2:0] velo_upper;
  tfc_entry_t q_head, q_in;
  logic       q_valid, q_pop, q_in_ready;
  tfc_t       cur;
  logic [CW-1:0] n_spp, n_issued;
  logic       rd_pending, rd_last;
  logic       o_push, o_ready_unused;
  evt_item_t  o_item;
  logic [2:0] o_count;
  logic [$clog2(TFC_DEPTH+1)-1:0] q_count;
  logic       new_period;
  logic       room;
  logic       ext_pending;

  assign new_period = tfc_valid && (tfc.bxid[8:0] == '0);
  assign swap       = new_period;
  assign q_in       = '{win: new_period ? wr_win + 2'd1 : wr_win, tfc: tfc};

  sync_fifo #(.W($bits(tfc_entry_t)), .DEPTH(TFC_DEPTH)) u_tfc_buf (
    .clk, .rst_n, .in_valid(tfc_valid), .in_ready(q_in_ready), .in_data(q_in),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_head), .count(q_count));

  sync_fifo #(.W($bits(evt_item_t)), .DEPTH(4)) u_out (
    .clk, .rst_n, .in_valid(o_push), .in_ready(o_ready_unused), .in_data(o_item),
    .out_valid, .out_ready, .out_data(out_item), .count(o_count));

  assign rd_win = wr_win - 2'd1;
  assign rd_bin = cur.bxid[8:0];
  // Room for one more item, counting a read already in flight.
  assign room   = (o_count + 3'(rd_pending)) < 3'd4;

  always_comb begin
    q_pop   = 1'b0;
    rd_en   = 1'b0;
    rd_slot = n_issued[SW-1:0];
    if (state == S_IDLE && q_valid && q_head.win != wr_win && !ext_pending)
      q_pop = (q_head.win != rd_win) || page_open;
    if (state == S_DATA && n_issued != n_spp && room)
      rd_en = 1'b1;
  end

  always_comb begin
    o_push = 1'b0;
    o_item = '0;
    if (rd_pending) begin
      o_push         = 1'b1;
      o_item.is_hdr  = 1'b0;
      o_item.last    = rd_last;
      o_item.payload = rd_data;
    end else if (state == S_HDR && room) begin
      o_push         = 1'b1;
      o_item.is_hdr  = 1'b1;
      o_item.last    = !(synced && rd_count != '0);
      o_item.payload = 24'(evt_hdr_t'{bxid: cur.bxid, synced: synced,
                                      ts_mismatch: synced && (velo_upper != cur.bxid[11:9]),
                                      truncated: synced && rd_ovf, fast_reset: cur.fast_reset});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wr_win     <= '0;
      page_open  <= 1'b0;
      ext_pending <= 1'b0;
      velo_upper <= '0;
      synced     <= 1'b0;
      cur        <= '0;
      n_spp      <= '0;
      n_issued   <= '0;
      rd_pending <= 1'b0;
      rd_last    <= 1'b0;
      tfc_drops  <= '0;
      overruns   <= '0;
      events     <= '0;
    end else begin
      if (tfc_valid && !q_in_ready) tfc_drops <= tfc_drops + 16'd1;
      if (new_period) begin
        wr_win    <= wr_win + 2'd1;
        page_open <= 1'b1;
      end
      // Timestamp extension for the page that has just become readable;
      // the sorter presents its synchronisation info one cycle after swap.
      ext_pending <= new_period;
      if (ext_pending) begin
        if (rd_sync_seen) begin
          velo_upper <= rd_sync_upper;
          synced     <= 1'b1;
        end else begin
          velo_upper <= velo_upper + 3'd1;
        end
      end
      rd_pending <= rd_en;
      rd_last    <= rd_en && (n_issued + 1'b1 == n_spp);
      case (state)
        S_IDLE: if (q_pop) begin
          if (q_head.win != rd_win || !page_open) begin
            overruns <= overruns + 16'd1;        // its page is gone
          end else if (!q_head.tfc.veto) begin
            cur   <= q_head.tfc;
            state <= S_HDR;
          end
        end
        S_HDR: if (room && !rd_pending) begin
          n_spp    <= synced ? rd_count : '0;
          n_issued <= '0;
          events   <= events + 32'd1;
          state    <= (synced && rd_count != '0) ? S_DATA : S_IDLE;
        end
        S_DATA: begin
          if (rd_en) n_issued <= n_issued + 1'b1;
          if (rd_en && n_issued + 1'b1 == n_spp) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
