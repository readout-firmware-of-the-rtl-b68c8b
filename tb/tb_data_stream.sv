// tb_data_stream: end-to-end test of one data stream at its default (full-size) parameters.
//
// A model of the 10 GWT links sends, every bunch crossing (BX, four
// clock cycles), one scrambled 128-bit frame per link as four 32-bit
// words, each link shifted by its own bit offset so that every word
// aligner has to search for the frame boundary.  TFC metadata follows six
// BX behind the data.  SuperPixels are made per BX and stream from known
// cluster shapes: isolated SPs with random hitmaps, and pairs of
// neighbouring SPs whose hit pixels form one small blob across their
// border (2x2 square or horizontal pair: condition A; diagonal pair:
// condition B).  So each event's clusters are known exactly and every
// fragment is compared: event ID, source ID, size, flags, bunch-crossing
// ID, and its cluster words as a set (the order of SPs inside a time bin
// depends on the router's arbitration).
//
// Mechanisms exercised and counted: word alignment and lock of every link;
// a frame with a parity error (dropped and counted); the synchronisation
// packet that extends the 9-bit timestamp (events become synced, no
// timestamp mismatch afterwards); vetoed BXs (no fragment); a fast reset
// flag; a flood of SPs with one timestamp on stream 0 (link FIFO
// drops, bin overflow, SP buffer overflow, the event flagged truncated);
// random stalls of the fragment reader and one long stall on stream 0
// that makes the aligner miss a page (overruns; events of that window may
// be missing, no other event may); and one link losing its lock at the
// end.  Every non-vetoed BX of a read page must give exactly one fragment.
module tb_data_stream;
  import velo_pkg::*;
  import tb_util_pkg::*;

  localparam int NS    = 1;          // streams
  localparam int NL    = 10;            // links per stream
  localparam int D     = 6;             // TFC delay behind data, in BX
  localparam int NBX   = 3300;          // BX simulated
  localparam int LAST_READ = 3072;      // pages before this BX are read
  localparam int FLOOD_BX  = 1064;      // timestamp of the flood
  localparam int STALL_LO  = 2150, STALL_HI = 2600;
  localparam int PERR_BX   = 300;
  localparam int FR_BX     = 700;
  localparam int SYNC_BX   = 100;
  localparam int LOSS_BX   = 3150;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [NS-1:0][NL-1:0]       rx_valid;
  logic [NS-1:0][NL-1:0][31:0] rx_word;
  logic                        tfc_valid;
  tfc_t                        tfc;
  logic [NS-1:0]               frag_valid, frag_ready, frag_last;
  logic [NS-1:0][31:0]         frag_data;
  stream_status_t [NS-1:0]     status;

  data_stream #(.STREAM_ID(1'b0)) dut (
    .clk, .rst_n, .rx_valid(rx_valid[0]), .rx_word(rx_word[0]), .tfc_valid, .tfc,
    .frag_valid(frag_valid[0]), .frag_ready(frag_ready[0]), .frag_data(frag_data[0]),
    .frag_last(frag_last[0]), .status(status[0]));

  // ---------------------------------------------------------------- model
  typedef struct {
    bit          vetoed;
    bit          fast_reset;
    bit          unchecked;    // contents not compared (flood, long stall)
    logic [31:0] words[$];     // expected cluster words
  } exp_evt_t;

  exp_evt_t    expd [NS][int];
  logic [29:0] lq   [NS][NL][$];          // SPPs waiting for a frame
  logic [3:0][29:0] hist [NS][NL];
  bit          bits [NS][NL][$];
  int          n_seen [NS];
  bit          seen [NS][int];
  int          n_iso_exp [NS], n_mat_exp [NS], n_cond_a = 0, n_cond_b = 0;
  int          n_veto = 0, n_stall = 0, n_missing_ok = 0;
  bit          veto_of [int];

  initial begin
    repeat (4 * NBX + 40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int link_of_chip(int chip);
    case (chip)
      0: return $urandom % 4;
      1: return 4 + $urandom % 2;
      default: return chip + 4;
    endcase
  endfunction

  function automatic logic [31:0] clu_word(int s, int chip, int sc, int sr, int n, bit iso);
    cluster_t c;
    c.chip = {1'(s), 3'(chip)};
    {c.col, c.col_frac} = 11'(eighths(sc, n));
    {c.row, c.row_frac} = 11'(eighths(sr, n));
    c.isolated = iso; c.self_contained = 1; c.edge_flag = 0;
    return {c, 3'b000};
  endfunction

  // SPs of one BX on one stream, with their expected clusters.
  task automatic make_hits(int s, int bx);
    exp_evt_t e;
    int niso, ngrp, ts;
    e = expd[s][bx];
    ts = bx % 512;
    niso = ($urandom % 8 == 0) ? 1 + $urandom % 3 : 0;
    ngrp = ($urandom % 40 == 0) ? 1 : 0;
    for (int k = 0; k < niso; k++) begin
      int chip, col, row, sc, sr, n;
      logic [7:0] hit;
      chip = $urandom % 6;  col = 3 + 6 * k;  row = 40 + $urandom % 20;
      hit = 8'($urandom % 255 + 1);
      sc = 0; sr = 0; n = 0;
      for (int i = 0; i < 8; i++) if (hit[i]) begin sc += 2 * col + i / 4; sr += 4 * row + i % 4; n++; end
      e.words.push_back(clu_word(s, chip, sc, sr, n, 1));
      lq[s][link_of_chip(chip)].push_back(data_spp(col, row, ts, hit));
      n_iso_exp[s]++;
    end
    for (int g = 0; g < ngrp; g++) begin
      int chip, shape, y0, sc, sr, n, col;
      logic [7:0] ha, hb;
      chip = $urandom % 6;  col = 4;
      ha = '0; hb = '0;
      shape = $urandom % 3;  y0 = $urandom % 3;
      case (shape)
        0: begin ha[4 + y0] = 1; ha[5 + y0] = 1; hb[y0] = 1; hb[y0 + 1] = 1; n_cond_a++; end
        1: begin ha[4 + y0] = 1; hb[y0] = 1; n_cond_a++; end
        default: begin ha[5 + y0] = 1; hb[y0] = 1; n_cond_b++; end
      endcase
      sc = 0; sr = 0; n = 0;
      for (int i = 0; i < 8; i++) begin
        if (ha[i]) begin sc += 2 * col + i / 4;       sr += 20 + i % 4; n++; end
        if (hb[i]) begin sc += 2 * (col + 1) + i / 4; sr += 20 + i % 4; n++; end
      end
      e.words.push_back(clu_word(s, chip, sc, sr, n, 0));
      lq[s][link_of_chip(chip)].push_back(data_spp(col, 5, ts, ha));
      lq[s][link_of_chip(chip)].push_back(data_spp(col + 1, 5, ts, hb));
      n_mat_exp[s]++;
    end
    expd[s][bx] = e;
  endtask

  // ---------------------------------------------------------------- drive
  int cyc = 0;
  initial begin
    rx_valid = '0; rx_word = '0; tfc_valid = 0; tfc = '0; frag_ready = '1;
    for (int s = 0; s < NS; s++)
      for (int l = 0; l < NL; l++) begin
        hist[s][l] = '0;
        for (int b = 0; b < (s * NL + l) * 7 % 61; b++) bits[s][l].push_back(1'b0);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    int bx;
    bx = cyc / 4;
    if (cyc % 4 == 0) begin
      // events of this BX
      if (bx < NBX) begin
        veto_of[bx] = ($urandom % 4 != 0) && bx != FLOOD_BX && bx != FR_BX;
        for (int s = 0; s < NS; s++) begin
          exp_evt_t e;
          e.vetoed = veto_of[bx];  e.fast_reset = (bx == FR_BX);
          e.unchecked = (s == NS - 1) && bx == FLOOD_BX;
          e.words.delete();
          expd[s][bx] = e;
          if (bx >= 200 && bx % 512 >= 16 && bx % 512 <= 480 && bx < LAST_READ - 100 &&
              !(s == NS - 1 && bx >= FLOOD_BX && bx <= FLOOD_BX + 200))
            make_hits(s, bx);
        end
      end
      // flood: four SPPs of one timestamp on every link for 140 BX
      if (bx >= FLOOD_BX && bx < FLOOD_BX + 140)
        for (int l = 0; l < NL; l++)
          repeat (4) lq[NS-1][l].push_back(data_spp(10, 10, FLOOD_BX % 512, 8'($urandom % 255 + 1)));
      // frames
      for (int s = 0; s < NS; s++)
        for (int l = 0; l < NL; l++) begin
          logic [3:0][29:0] spp;
          logic [127:0] f;
          for (int i = 3; i >= 0; i--) spp[i] = idle_spp();
          if (s == 0 && l == 2 && bx == PERR_BX) begin
            f = make_frame(spp, hist[s][l]);
            f[120] = !f[120];                     // parity error
          end else begin
            if (l == 0 && bx == SYNC_BX) spp[3] = sync_spp(SYNC_BX);
            else for (int i = 3; i >= 0; i--) if (lq[s][l].size() != 0) spp[i] = lq[s][l].pop_front();
            f = make_frame(spp, hist[s][l]);
            if (s == NS - 1 && l == 9 && bx >= LOSS_BX && bx < LOSS_BX + 10) f[127:124] = 4'h5;
          end
          for (int b = 127; b >= 0; b--) bits[s][l].push_back(f[b]);
        end
    end
    // words
    for (int s = 0; s < NS; s++)
      for (int l = 0; l < NL; l++) begin
        rx_valid[s][l] = 1'b1;
        for (int b = 31; b >= 0; b--) rx_word[s][l][b] = bits[s][l].pop_front();
      end
    // TFC, D BX behind
    tfc_valid = 0;
    if (cyc % 4 == 1 && bx >= D && bx - D < NBX) begin
      tfc_valid = 1;
      tfc = '{bxid: 12'(bx - D), fast_reset: (bx - D == FR_BX), sync: 1'b0, veto: veto_of[bx - D]};
      if (veto_of[bx - D]) n_veto++;
    end
    // readers
    for (int s = 0; s < NS; s++) begin
      frag_ready[s] = ($urandom % 5) != 0;
      if (s == 0 && bx >= STALL_LO && bx < STALL_HI) frag_ready[s] = 1'b0;
      if (!frag_ready[s]) n_stall++;
    end
    cyc++;
  end

  // ---------------------------------------------------------------- check
  logic [31:0] fw [NS][$];
  int          next_id [NS];

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) if (frag_valid[s] && frag_ready[s]) begin
      fw[s].push_back(frag_data[s]);
      if (frag_last[s]) begin
        int b, nc;
        logic [31:0] got[$], want[$];
        bit ok;
        exp_evt_t e;
        checks++;
        ok = 1;
        b = int'(fw[s][2][11:0]);
        nc = fw[s].size() - 3;
        if (fw[s][0] != 32'(next_id[s]) || fw[s][1] != {16'(s), 16'(4 * fw[s].size())} ||
            fw[s][2][31:24] != 8'd1 || !fw[s][2][23]) ok = 0;
        if (!expd[s].exists(b) || seen[s].exists(b)) ok = 0;
        else begin
          e = expd[s][b];
          // events of the pages hit by the long stall may have been read
          // across a page change: only their framing is checked
          if (s == 0 && b >= 1536 && b < 2560) e.unchecked = 1;
          if (e.vetoed || fw[s][2][20] != e.fast_reset) ok = 0;
          if (e.unchecked) begin
            if (!fw[s][2][21] && b == FLOOD_BX) ok = 0;
          end else begin
            got.delete();
            for (int i = 3; i < fw[s].size(); i++) got.push_back(fw[s][i]);
            want = e.words;
            got.sort(); want.sort();
            if (got != want || fw[s][2][21] || fw[s][2][22]) ok = 0;
          end
          seen[s][b] = 1;
        end
        if (!ok) begin
          failures++;
          if (failures < 6) $display("stream %0d fragment bx %0d: %p", s, b, fw[s]);
          if (failures < 6 && expd[s].exists(b)) $display("  expected %p", expd[s][b].words);
        end
        next_id[s]++;
        n_seen[s]++;
        fw[s].delete();
      end
    end
  end

  initial begin
    wait (cyc >= 4 * NBX);
    repeat (8000) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      int missing;
      missing = 0;
      foreach (expd[s][b])
        if (b < LAST_READ && !expd[s][b].vetoed && !seen[s].exists(b)) begin
          if (s == 0 && b >= 1536 && b < 2560) n_missing_ok++;
          else begin missing++; if (missing < 4 || missing % 50 == 0) $display("missing bx %0d", b); end
        end
      checks++;
      if (missing != 0) failures++;
      checks++;
      if (status[s].locked != 10'h3ff || status[s].synced != 1'b1 || status[s].fragments != 32'(n_seen[s]) ||
          status[s].extract_overruns != 0 || status[s].tfc_drops != 0) failures++;
      checks++;
      if (status[s].parity_errors != 32'(s == 0) || status[s].lock_losses != 16'(s == NS - 1)) failures++;
      checks++;
      if (s == NS - 1) begin
        if (status[s].fifo_drops == 0 || status[s].bin_drops == 0 || status[s].sp_drops == 0) failures++;
      end else if (status[s].fifo_drops != 0 || status[s].bin_drops != 0 || status[s].sp_drops != 0) failures++;
      checks++;
      if (s == 0 ? status[s].overruns == 0 : status[s].overruns != 0) failures++;
      checks++;
      if (status[s].line_drops != 0 || status[s].n_isolated == 0 ||
          status[s].n_matrix_clusters == 0) failures++;
      $display("stream %0d: locked %b lock losses %0d parity errors %0d synced %0d fragments %0d events %0d",
               s, status[s].locked, status[s].lock_losses, status[s].parity_errors, status[s].synced,
               status[s].fragments, status[s].events);
      $display("  fifo drops %0d bin drops %0d sp drops %0d overruns %0d tfc drops %0d isolated %0d matrix %0d missing %0d",
               status[s].fifo_drops, status[s].bin_drops, status[s].sp_drops, status[s].overruns, status[s].tfc_drops,
               status[s].n_isolated, status[s].n_matrix_clusters, missing);
    end
    checks++;
    if (n_missing_ok == 0 || n_cond_a == 0 || n_cond_b == 0) failures++;
    $display("vetoed BX %0d, stall cycles %0d, condition A %0d B %0d, events lost to the stall %0d",
             n_veto, n_stall, n_cond_a, n_cond_b, n_missing_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
