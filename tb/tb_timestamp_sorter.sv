// tb_timestamp_sorter: random SPPs with random timestamps on all ten links
// are written during one page; after the swap every one of the 512 time
// bins of the read page is read back and must hold exactly the SPPs with
// that timestamp (order within a bin is free).  Also checks that the
// synchronisation info of the page is handed over, that the next page
// starts empty, and that a full bin drops and counts.
module tb_timestamp_sorter;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int N = 10, SLOTS = 16;
  logic [N-1:0]       in_valid, sync_valid;
  spp_chip_t [N-1:0]  in_spp;
  logic [N-1:0][11:0] sync_bxid;
  logic               swap, wr_page, rd_sync_seen, rd_ovf, rd_en;
  logic [2:0]         rd_sync_upper;
  logic [8:0]         rd_bin;
  logic [4:0]         rd_count;
  logic [3:0]         rd_slot;
  spp_stored_t        rd_data;
  logic [15:0]        fifo_drops, bin_drops;

  timestamp_sorter #(.N_LINKS(N), .SLOTS(SLOTS)) dut (.*);

  logic [23:0] model[512][$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_swap();
    @(negedge clk);
    swap = 1;
    @(negedge clk);
    swap = 0;
  endtask

  task automatic read_all(output int bad);
    bad = 0;
    for (int b = 0; b < 512; b++) begin
      logic [23:0] got[$];
      @(negedge clk);
      rd_bin = 9'(b);
      #1;
      checks++;
      if (int'(rd_count) != model[b].size()) bad++;
      for (int s = 0; s < int'(rd_count); s++) begin
        rd_en = 1; rd_slot = 4'(s);
        @(negedge clk);
        rd_en = 0;
        got.push_back(rd_data);
      end
      got.sort();
      model[b].sort();
      if (got.size() != model[b].size()) bad++;
      else for (int i = 0; i < got.size(); i++) if (got[i] != model[b][i]) bad++;
    end
  endtask

  initial begin
    int bad;
    in_valid = 0; in_spp = 0; sync_valid = 0; sync_bxid = 0; swap = 0; rd_bin = 0; rd_en = 0; rd_slot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      for (int l = 0; l < N; l++) begin
        in_valid[l] = ($urandom % 4) == 0;
        in_spp[l]   = {3'(l % 6), 30'($urandom)};
        if (in_valid[l])
          model[in_spp[l].spp.ts].push_back({in_spp[l].chip, in_spp[l].spp.col, in_spp[l].spp.row, in_spp[l].spp.hit});
      end
      sync_valid = (c == 100) ? 10'b0000001000 : '0;
      sync_bxid[3] = 12'h5A3;
    end
    @(negedge clk);
    in_valid = 0; sync_valid = 0;
    repeat (40) @(negedge clk);
    do_swap();
    checks++;
    if (!rd_sync_seen || rd_sync_upper != 3'(12'h5A3 >> 9)) failures++;
    read_all(bad);
    checks++;
    if (bad != 0) failures++;
    checks++;
    if (fifo_drops != 0 || bin_drops != 0) failures++;
    // next page: nothing written, must read back empty and without sync
    for (int b = 0; b < 512; b++) model[b].delete();
    do_swap();
    do_swap();
    checks++;
    if (rd_sync_seen) failures++;
    read_all(bad);
    checks++;
    if (bad != 0) failures++;
    // overflow: SLOTS + 4 SPPs with the same timestamp
    for (int i = 0; i < SLOTS + 4; i++) begin
      @(negedge clk);
      in_valid = 10'b1;
      in_spp[0] = {3'd2, 7'(i), 6'd1, 9'd77, 8'h3C};
      if (i < SLOTS) model[77].push_back({3'd2, 7'(i), 6'd1, 8'h3C});
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    do_swap();
    read_all(bad);
    checks++;
    if (bad != 0 || bin_drops != 16'd4) failures++;
    rd_bin = 9'd77;
    #1;
    checks++;
    if (!rd_ovf) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
