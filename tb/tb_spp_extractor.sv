// tb_spp_extractor: frames of random data, idle and synchronisation SPPs
// every four cycles.  Checks that exactly the non-empty SPPs come out, in
// wire order, one per cycle, with the binary timestamp and the chip ID, and
// that synchronisation packets are reported with their 12-bit ID.
module tb_spp_extractor;
  import velo_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic         in_valid, out_valid, sync_valid;
  logic [119:0] in_spps;
  spp_chip_t    out_spp;
  logic [11:0]  sync_bxid;
  logic [15:0]  overruns;

  spp_extractor #(.CHIP_ID(3'd5)) dut (.*);

  logic [32:0] exp_q[$];
  int          exp_sync[$];
  int          nsync = 0;
  bit          ovr_phase = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !ovr_phase) begin
      checks++;
      if (exp_q.size() == 0 || exp_q.pop_front() != out_spp) begin
        failures++;
      end
    end
    if (sync_valid) begin
      checks++;
      if (exp_sync.size() == 0 || exp_sync.pop_front() != int'(sync_bxid)) failures++;
      nsync++;
    end
  end

  initial begin
    in_valid = 0; in_spps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 1000; f++) begin
      logic [3:0][29:0] s;
      bit has_sync;
      has_sync = 0;
      for (int k = 3; k >= 0; k--) begin
        int r, col, row, ts, bx;
        logic [7:0] hit;
        r = $urandom % 10;
        col = $urandom % 128; row = $urandom % 64; ts = $urandom % 512;
        hit = 8'($urandom % 255 + 1);
        if (r < 5) begin
          s[k] = data_spp(col, row, ts, hit);
          exp_q.push_back({3'd5, 7'(col), 6'(row), 9'(ts), hit});
        end else if (r == 5 && !has_sync) begin
          has_sync = 1;
          bx = $urandom % 4096;
          s[k] = sync_spp(bx);
          exp_sync.push_back(bx);
        end else s[k] = idle_spp();
      end
      @(negedge clk);
      in_valid = 1; in_spps = s;
      @(negedge clk);
      in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || exp_sync.size() != 0 || overruns != 0 || nsync == 0) failures++;
    // a frame arriving too early is counted as an overrun
    ovr_phase = 1;
    @(negedge clk);
    in_valid = 1; in_spps = {4{data_spp(1, 1, 1, 8'h1)}};
    @(negedge clk);
    in_spps = {4{data_spp(2, 2, 2, 8'h2)}};
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (overruns != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
