// tb_spp_ram_bank: writes random SPPs into random bins of the write page,
// swaps pages the way the sorter does (clear pulse, then page flip), and reads every bin back: counts,
// contents and order must match a model.  A bin written past its capacity
// must keep the first SLOTS SPPs, set its overflow flag and count the
// drops.  Re-using a page must start it empty.
module tb_spp_ram_bank;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int BINS = 32, SLOTS = 16;
  logic        wr_page, in_valid, rd_ovf, rd_en;
  logic        swap;
  logic [28:0] in_data;
  logic [4:0]  rd_bin;
  logic [4:0]  rd_count;
  logic [3:0]  rd_slot;
  logic [23:0] rd_data;
  logic [15:0] drops;

  spp_ram_bank #(.BINS(BINS), .SLOTS(SLOTS), .DW(24)) dut (.*);

  logic [23:0] model[BINS][$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_swap();
    @(negedge clk);
    swap = 1;
    @(negedge clk);
    swap = 0;
    wr_page = !wr_page;
  endtask

  task automatic fill(input int n, input int only_bin);
    for (int b = 0; b < BINS; b++) model[b].delete();
    for (int i = 0; i < n; i++) begin
      logic [23:0] w;
      int b;
      w = 24'($urandom);
      b = (only_bin >= 0) ? only_bin : int'($urandom % BINS);
      @(negedge clk);
      in_valid = 1;
      in_data  = {w[23:8], 5'(b), w[7:0]};
      if (model[b].size() < SLOTS) model[b].push_back(w);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_all(input bit expect_ovf_bin, input int ovf_bin);
    for (int b = 0; b < BINS; b++) begin
      @(negedge clk);
      rd_bin = 5'(b);
      #1;
      checks++;
      if (int'(rd_count) != model[b].size()) begin failures++; if (failures < 6) $display("b=%0d cnt=%0d exp=%0d t=%0t", b, rd_count, model[b].size(), $time); end
      checks++;
      if (rd_ovf != (expect_ovf_bin && b == ovf_bin)) failures++;
      for (int s = 0; s < model[b].size(); s++) begin
        @(negedge clk);
        rd_en = 1; rd_slot = 4'(s);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data != model[b][s]) failures++;
      end
    end
  endtask

  initial begin
    wr_page = 0; swap = 0; in_valid = 0; in_data = 0; rd_bin = 0; rd_en = 0; rd_slot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fill(200, -1);
    do_swap();
    check_all(0, 0);
    // the other page is now written; then back to the first one: empty again
    fill(5, 3);
    do_swap();
    check_all(0, 0);
    do_swap();
    for (int b = 0; b < BINS; b++) model[b].delete();
    check_all(0, 0);
    // overflow of one bin
    do_swap();
    fill(SLOTS + 3, 9);
    do_swap();
    check_all(1, 9);
    checks++;
    if (drops != 16'd3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
