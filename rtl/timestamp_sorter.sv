// timestamp_sorter: sorts the SPPs of one data stream into time bins.
//
// Each link's SPPs (33 bits, binary timestamp) enter a link FIFO, then the
// switching router, which spreads them over 16 lanes by the four timestamp
// MSBs.  Lane n writes SPP RAM n, whose 32 bins are addressed by the five
// timestamp LSBs; together the 16 RAMs hold all 512 time bins of a page.
// The RAMs are double-buffered: one page is written while the other is
// read.  On `swap` (given by the time aligner at the bunch crossing whose
// 9-bit ID is 0, so a page spans one full timestamp period of 512 bunch
// crossings) the roles exchange and the bin counts of the new write page are
// cleared, which empties it.  Synchronisation packets seen while a page is
// written are remembered with the page (the upper three bits of the 12-bit
// ID they carry) and handed to the aligner with the closed page.
//
// Read port: rd_bin (9 bits) selects a time bin of the read page; its SPP
// count and overflow flag are combinational, rd_data returns one cycle
// after rd_en.  A link FIFO that is full drops the SPP and counts it.
module timestamp_sorter #(
  parameter int unsigned N_LINKS       = 10,
  parameter int unsigned IN_FIFO_DEPTH = 16,
  parameter int unsigned SW_FIFO_DEPTH = 4,
  parameter int unsigned BINS          = 32,
  parameter int unsigned SLOTS         = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_LINKS-1:0]            in_valid,
  input  velo_pkg::spp_chip_t [N_LINKS-1:0] in_spp,
  input  logic [N_LINKS-1:0]            sync_valid,
  input  logic [N_LINKS-1:0][11:0]      sync_bxid,
  input  logic                          swap,
  output logic                          wr_page,
  output logic                          rd_sync_seen,   // closed page had a sync packet
  output logic [2:0]                    rd_sync_upper,
  input  logic [8:0]                    rd_bin,
  output logic [$clog2(SLOTS+1)-1:0]    rd_count,
  output logic                          rd_ovf,
  input  logic                          rd_en,
  input  logic [$clog2(SLOTS)-1:0]      rd_slot,
  output velo_pkg::spp_stored_t         rd_data,
  output logic [15:0]                   fifo_drops,
  output logic [15:0]                   bin_drops
);
  import velo_pkg::*;
  localparam int unsigned CW  = $clog2(SLOTS + 1);
  localparam int unsigned FCW = $clog2(IN_FIFO_DEPTH + 1);

  logic [N_LINKS-1:0]       f_valid, f_ready, f_in_ready;
  logic [N_LINKS-1:0][32:0] f_data;
  logic [FCW-1:0]           f_cnt [N_LINKS];
  logic [15:0]              r_valid;
  logic [15:0][28:0]        r_data;
  logic                     w_sync_seen;
  logic [2:0]               w_sync_upper;
  logic [CW-1:0]            b_count [16];
  logic [15:0]              b_ovf;
  logic [23:0]              b_data [16];
  logic [15:0]              b_drops [16];
  logic [3:0]               rd_bank_q;
  logic [$clog2(N_LINKS+1)-1:0] n_drop;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    sync_fifo #(.W(33), .DEPTH(IN_FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(in_valid[l]), .in_ready(f_in_ready[l]), .in_data(in_spp[l]),
      .out_valid(f_valid[l]), .out_ready(f_ready[l]), .out_data(f_data[l]), .count(f_cnt[l]));
  end

  spp_router #(.N_IN(N_LINKS), .FIFO_DEPTH(SW_FIFO_DEPTH)) u_router (
    .clk, .rst_n, .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(r_valid), .out_ready('1), .out_data(r_data));

  for (genvar b = 0; b < 16; b++) begin : g_bank
    spp_ram_bank #(.BINS(BINS), .SLOTS(SLOTS), .DW(24)) u_bank (
      .clk, .rst_n, .wr_page, .swap, .in_valid(r_valid[b]), .in_data(r_data[b]),
      .rd_bin(rd_bin[4:0]), .rd_count(b_count[b]), .rd_ovf(b_ovf[b]),
      .rd_en(rd_en && rd_bin[8:5] == 4'(b)), .rd_slot, .rd_data(b_data[b]), .drops(b_drops[b]));
  end

  assign rd_count = b_count[rd_bin[8:5]];
  assign rd_ovf   = b_ovf[rd_bin[8:5]];
  assign rd_data  = spp_stored_t'(b_data[rd_bank_q]);

  always_comb begin
    n_drop = '0;
    for (int l = 0; l < N_LINKS; l++) n_drop = n_drop + $bits(n_drop)'(in_valid[l] && !f_in_ready[l]);
    bin_drops = '0;
    for (int b = 0; b < 16; b++) bin_drops = bin_drops + b_drops[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_page       <= 1'b0;
      w_sync_seen   <= 1'b0;
      w_sync_upper  <= '0;
      rd_sync_seen  <= 1'b0;
      rd_sync_upper <= '0;
      rd_bank_q     <= '0;
      fifo_drops    <= '0;
    end else begin
      if (rd_en) rd_bank_q <= rd_bin[8:5];
      fifo_drops <= fifo_drops + 16'(n_drop);
      if (swap) begin
        wr_page            <= !wr_page;
        rd_sync_seen       <= w_sync_seen;
        rd_sync_upper      <= w_sync_upper;
        w_sync_seen        <= 1'b0;
      end
      for (int l = N_LINKS - 1; l >= 0; l--)
        if (sync_valid[l]) begin
          w_sync_seen  <= 1'b1;
          w_sync_upper <= sync_bxid[l][11:9];
        end
    end
  end

endmodule
