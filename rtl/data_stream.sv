// data_stream: one of the two identical TELL40 data streams.
//
// Ten GWT links enter as 32-bit transceiver words.  Per link:
// gwt_link_decoder (word alignment, parity check, descrambling) and
// spp_extractor (one SPP per cycle, empty packets removed, Gray timestamp
// decoded, chip ID prepended).  The links of six chips share the stream
// with (4,2,1,1,1,1) links per chip.  Then, for the whole stream:
// timestamp_sorter (router and double-buffered SPP RAMs), time_aligner
// (TFC buffer, timestamp extension, one event per bunch crossing),
// clustering, and output_formatter (event fragments of 32-bit words).
// All of it runs in one 160 MHz clock; TFC metadata arrives once per
// bunch crossing (every fourth cycle).
//
// The parameters exist so that tests can shrink the memories and lock
// times; their defaults are the full-size design.
module data_stream #(
  parameter logic        STREAM_ID     = 1'b0,
  parameter int unsigned N_LINKS       = 10,
  parameter int unsigned LOCK_FRAMES   = 16,
  parameter int unsigned UNLOCK_FRAMES = 8,
  parameter int unsigned SLOTS         = 512,
  parameter int unsigned TFC_DEPTH     = 1024,
  parameter int unsigned N_MATRICES    = 40,
  parameter int unsigned MAX_SP        = 128,
  parameter int unsigned MAX_CLUSTERS  = 256
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_LINKS-1:0]             rx_valid,
  input  logic [N_LINKS-1:0][31:0]       rx_word,
  input  logic                           tfc_valid,
  input  velo_pkg::tfc_t                 tfc,
  output logic                           frag_valid,
  input  logic                           frag_ready,
  output logic [31:0]                    frag_data,
  output logic                           frag_last,
  output velo_pkg::stream_status_t       status
);
  import velo_pkg::*;

  logic [N_LINKS-1:0]          d_valid, e_valid, s_valid;
  logic [N_LINKS-1:0][119:0]   d_spps;
  spp_chip_t [N_LINKS-1:0]     e_spp;
  logic [N_LINKS-1:0][11:0]    s_bxid;
  logic [N_LINKS-1:0]          locked;
  logic [15:0]                 ll   [N_LINKS];
  logic [31:0]                 pe   [N_LINKS];
  logic [15:0]                 eo   [N_LINKS];

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    gwt_link_decoder #(.LOCK_FRAMES(LOCK_FRAMES), .UNLOCK_FRAMES(UNLOCK_FRAMES)) u_dec (
      .clk, .rst_n, .rx_valid(rx_valid[l]), .rx_word(rx_word[l]),
      .out_valid(d_valid[l]), .out_spps(d_spps[l]), .locked(locked[l]),
      .lock_losses(ll[l]), .parity_errors(pe[l]));
    spp_extractor #(.CHIP_ID(link_chip(l))) u_ext (
      .clk, .rst_n, .in_valid(d_valid[l]), .in_spps(d_spps[l]),
      .out_valid(e_valid[l]), .out_spp(e_spp[l]),
      .sync_valid(s_valid[l]), .sync_bxid(s_bxid[l]), .overruns(eo[l]));
  end

  // Sorter <-> aligner
  logic                          swap, wr_page_unused, rd_sync_seen, rd_ovf, rd_en;
  logic [2:0]                    rd_sync_upper;
  logic [8:0]                    rd_bin;
  logic [$clog2(SLOTS+1)-1:0]    rd_count;
  logic [$clog2(SLOTS)-1:0]      rd_slot;
  spp_stored_t                   rd_data;
  // Aligner -> clustering -> formatter
  logic                          a_valid, a_ready, c_valid, fmt_idle;
  evt_item_t                     a_item;
  clu_item_t                     c_item;

  timestamp_sorter #(.N_LINKS(N_LINKS), .SLOTS(SLOTS)) u_sort (
    .clk, .rst_n, .in_valid(e_valid), .in_spp(e_spp), .sync_valid(s_valid), .sync_bxid(s_bxid),
    .swap, .wr_page(wr_page_unused), .rd_sync_seen, .rd_sync_upper,
    .rd_bin, .rd_count, .rd_ovf, .rd_en, .rd_slot, .rd_data,
    .fifo_drops(status.fifo_drops), .bin_drops(status.bin_drops));

  time_aligner #(.TFC_DEPTH(TFC_DEPTH), .SLOTS(SLOTS)) u_align (
    .clk, .rst_n, .tfc_valid, .tfc, .swap, .rd_sync_seen, .rd_sync_upper,
    .rd_bin, .rd_count, .rd_ovf, .rd_en, .rd_slot, .rd_data,
    .out_valid(a_valid), .out_ready(a_ready), .out_item(a_item),
    .synced(status.synced), .tfc_drops(status.tfc_drops), .overruns(status.overruns),
    .events(status.events));

  clustering #(.N_MATRICES(N_MATRICES), .MAX_SP(MAX_SP), .STREAM_ID(STREAM_ID)) u_clu (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_item(a_item), .fmt_idle,
    .out_valid(c_valid), .out_item(c_item),
    .line_drops(status.line_drops), .sp_drops(status.sp_drops),
    .n_isolated(status.n_isolated), .n_matrix_clusters(status.n_matrix_clusters));

  output_formatter #(.SOURCE_ID({15'd0, STREAM_ID}), .VERSION(8'd1), .MAX_CLUSTERS(MAX_CLUSTERS)) u_fmt (
    .clk, .rst_n, .in_valid(c_valid), .in_item(c_item), .idle(fmt_idle),
    .frag_valid, .frag_ready, .frag_data, .frag_last, .fragments(status.fragments));

  always_comb begin
    status.locked           = 10'(locked);
    status.lock_losses      = '0;
    status.parity_errors    = '0;
    status.extract_overruns = '0;
    for (int l = 0; l < N_LINKS; l++) begin
      status.lock_losses      = status.lock_losses + ll[l];
      status.parity_errors    = status.parity_errors + pe[l];
      status.extract_overruns = status.extract_overruns + eo[l];
    end
  end

endmodule
