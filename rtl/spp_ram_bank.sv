// spp_ram_bank: one SPP RAM of the timestamp sorter with its slice of the
// event count RAM.
//
// The RAM holds two pages; each page has BINS time bins of SLOTS SPPs of
// 24 bits (chip, column, row, hitmap: the timestamp is implied by the
// address).  Default 2 x 32 x 512 x 24 bits.  An SPP arriving from the
// router is written to the write page at {page, bin, count[bin]} and the
// bin's count is incremented; the count array is the event count RAM for
// this bank's 32 bins.  The other page is read by the time aligner:
// rd_count/rd_ovf give the bin's fill combinationally, and rd_data returns
// the SPP of a slot one cycle after rd_en.
//
// The counts are registers.  On `swap` (the cycle in which the sorter
// exchanges the pages) all counts of the read page, which is about to
// become the write page, are cleared at once, so a page needs no clearing
// pass (this design's choice).  A bin that is full drops further SPPs, sets
// its overflow flag and counts the drop.
// The write port accepts one SPP per cycle and never stalls.
module spp_ram_bank #(
  parameter int unsigned BINS  = 32,
  parameter int unsigned SLOTS = 512,
  parameter int unsigned DW    = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_page,
  input  logic                       swap,
  input  logic                       in_valid,
  input  logic [DW+$clog2(BINS)-1:0] in_data,    // {chip,col,row,ts_lsb,hit}
  input  logic [$clog2(BINS)-1:0]    rd_bin,
  output logic [$clog2(SLOTS+1)-1:0] rd_count,
  output logic                       rd_ovf,
  input  logic                       rd_en,
  input  logic [$clog2(SLOTS)-1:0]   rd_slot,
  output logic [DW-1:0]              rd_data,
  output logic [15:0]                drops
);
  localparam int unsigned BW = $clog2(BINS);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned CW = $clog2(SLOTS + 1);
  localparam int unsigned HW = 8;                   // hitmap bits below ts

  typedef struct packed {
    logic          ovf;
    logic [CW-1:0] cnt;
  } bin_cnt_t;

  logic [DW-1:0] mem [2*BINS*SLOTS];
  bin_cnt_t      cnt [2][BINS];

  logic [BW-1:0] w_bin;
  logic [DW-1:0] w_word;
  bin_cnt_t      w_entry, r_entry;
  logic [CW-1:0] w_fill;
  logic          w_do;
  logic          rd_page;

  always_comb begin
    w_bin   = in_data[HW +: BW];
    w_word  = {in_data[DW+BW-1:HW+BW], in_data[HW-1:0]};
    w_entry = cnt[wr_page][w_bin];
    w_fill  = w_entry.cnt;
    w_do    = in_valid && (w_fill < CW'(SLOTS));
    rd_page = !wr_page;
    r_entry = cnt[rd_page][rd_bin];
    rd_count = r_entry.cnt;
    rd_ovf   = r_entry.ovf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drops <= '0;
      for (int p = 0; p < 2; p++)
        for (int b = 0; b < BINS; b++) cnt[p][b] <= '0;
    end else begin
      if (swap)
        for (int b = 0; b < BINS; b++) cnt[rd_page][b] <= '0;
      if (in_valid) begin
        if (w_do) begin
          cnt[wr_page][w_bin].cnt <= w_fill + 1'b1;
        end else begin
          cnt[wr_page][w_bin].ovf <= 1'b1;
          if (drops != '1) drops <= drops + 16'd1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (w_do) mem[{wr_page, w_bin, w_fill[SW-1:0]}] <= w_word;

  always_ff @(posedge clk)
    if (rd_en) rd_data <= mem[{rd_page, rd_bin, rd_slot}];

endmodule
