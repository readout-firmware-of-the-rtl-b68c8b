// tb_time_aligner: TFC metadata every fourth cycle (one per bunch crossing)
// over four timestamp periods, with random vetoes, against a cycle model of
// the sorter's read port holding random bin contents per page.  Checks
// that swaps come at every 9-bit wrap, that each non-vetoed TFC entry
// yields one event whose header carries its ID and flags, that events
// before synchronisation carry no SPPs, that afterwards each event carries
// exactly the SPPs of its bin in slot order, and that the extended
// timestamp matches the TFC ID.  A final phase stalls the output until the
// TFC buffer overflows and a page is lost, and checks that both are
// counted.
module tb_time_aligner;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int SLOTS = 4;
  logic        tfc_valid, swap, rd_sync_seen, rd_ovf, rd_en, out_valid, out_ready, synced;
  tfc_t        tfc;
  logic [2:0]  rd_sync_upper;
  logic [8:0]  rd_bin;
  logic [2:0]  rd_count;
  logic [1:0]  rd_slot;
  spp_stored_t rd_data;
  evt_item_t   out_item;
  logic [15:0] tfc_drops, overruns;
  logic [31:0] events;

  time_aligner #(.TFC_DEPTH(1024), .SLOTS(SLOTS)) dut (.*);

  // ---- sorter read-port model ----
  localparam int NWIN = 8;
  int          cnt [NWIN][512];
  logic [23:0] dat [NWIN][512][SLOTS];
  bit          win_sync [NWIN];
  int          wwin = 0, rwin = 0, nswap = 0;
  assign rd_count = 3'(cnt[rwin][rd_bin]);
  assign rd_ovf   = 1'b0;
  always @(posedge clk) begin
    if (rd_en) rd_data <= dat[rwin][rd_bin][rd_slot];
    if (rst_n && swap) begin
      rwin          <= wwin;
      rd_sync_seen  <= win_sync[wwin];
      rd_sync_upper <= 3'(wwin);
      wwin          <= wwin + 1;
      nswap++;
    end
  end

  // ---- expected event stream ----
  evt_item_t exp_q[$];
  int        bx0 = 512 - 16;
  bit        model_synced = 0;
  int        n_ev = 0, n_spp = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stall_phase = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready && !stall_phase) begin
    checks++;
    if (exp_q.size() == 0 || exp_q.pop_front() != out_item) failures++;
    if (out_item.is_hdr) n_ev++; else n_spp++;
  end

  // Build the expected items for one window from its TFC entries.
  task automatic expect_window(input int w, input tfc_t ents[$]);
    if (win_sync[w]) model_synced = 1;
    foreach (ents[i]) begin
      evt_item_t it;
      evt_hdr_t  h;
      int        b, n;
      if (ents[i].veto) continue;
      b = int'(ents[i].bxid[8:0]);
      n = model_synced ? cnt[w][b] : 0;
      h = '{bxid: ents[i].bxid, synced: model_synced, ts_mismatch: 1'b0, truncated: 1'b0,
            fast_reset: ents[i].fast_reset};
      it = '{is_hdr: 1'b1, last: (n == 0), payload: 24'(h)};
      exp_q.push_back(it);
      for (int s = 0; s < n; s++) begin
        it = '{is_hdr: 1'b0, last: (s == n - 1), payload: dat[w][b][s]};
        exp_q.push_back(it);
      end
    end
  endtask

  initial begin
    tfc_t ents[$];
    int w;
    for (int x = 0; x < NWIN; x++) begin
      win_sync[x] = (x == 1);
      for (int b = 0; b < 512; b++) begin
        cnt[x][b] = $urandom % 3;
        for (int s = 0; s < SLOTS; s++) dat[x][b][s] = 24'($urandom);
      end
    end
    tfc_valid = 0; tfc = '0; out_ready = 1; rd_sync_seen = 0; rd_sync_upper = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    w = 0;
    for (int k = 0; k < 16 + 3 * 512 + 1; k++) begin
      tfc_t t;
      t = '{bxid: 12'(bx0 + k), fast_reset: 1'b0, sync: 1'b0, veto: ($urandom % 10) == 0};
      if (t.bxid[8:0] == 0) begin
        expect_window(w, ents);
        ents.delete();
        w++;
      end
      ents.push_back(t);
      @(negedge clk);
      tfc_valid = 1; tfc = t;
      out_ready = ($urandom % 10) != 0;
      @(negedge clk);
      tfc_valid = 0;
      out_ready = ($urandom % 10) != 0;
      repeat (2) begin
        @(negedge clk);
        out_ready = ($urandom % 10) != 0;
      end
    end
    out_ready = 1;
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nswap != 4 || !synced) failures++;
    checks++;
    if (overruns != 0 || tfc_drops != 0 || n_spp == 0 || 32'(n_ev) != events) failures++;
    // Overrun: stall the output for a whole period; the page is lost.
    out_ready = 0;
    stall_phase = 1;
    for (int k = 0; k < 1700; k++) begin
      tfc_t t;
      if (k == 1100) out_ready = 1;
      t = '{bxid: 12'(bx0 + 16 + 3 * 512 + 1 + k), fast_reset: 1'b0, sync: 1'b0, veto: 1'b0};
      @(negedge clk);
      tfc_valid = 1; tfc = t;
      @(negedge clk);
      tfc_valid = 0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (overruns == 0 || tfc_drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
