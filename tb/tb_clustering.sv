// tb_clustering: whole events through flagging, the isolated table, the
// matrix line and the arbiter.
//
// Each event holds isolated SPs (random hitmaps, far from everything) and
// groups of two neighbouring SPs whose hit pixels form one small blob
// across their common border: a 2x2 square, a horizontal pair (both give
// one condition-A seed) or a diagonal pair (one condition-B seed).  So the
// expected output is known exactly: the header, one isolated cluster per
// isolated SP in input order, then one self-contained cluster per group at
// the blob's mean pixel position in group order, then the end item.  One
// event has more groups than there are matrices: the SPs of the extra
// groups must be counted as line drops.  The formatter's idle signal is
// toggled at random.
module tb_clustering;
  import velo_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int NMAT = 40;
  logic        in_valid, in_ready, fmt_idle, out_valid;
  evt_item_t   in_item;
  clu_item_t   out_item;
  logic [15:0] line_drops, sp_drops;
  logic [31:0] n_isolated, n_matrix_clusters;

  clustering #(.N_MATRICES(NMAT), .MAX_SP(128), .STREAM_ID(1'b1)) dut (.*);

  clu_item_t exp_q[$];
  int        e_iso = 0, e_mat = 0, e_drop = 0, n_events = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || exp_q[0] != out_item) begin
      failures++;
      if (failures < 5) $display("t=%0t exp %p got %p", $time, exp_q.size() ? exp_q[0] : '0, out_item);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  always @(negedge clk) fmt_idle = ($urandom % 4) != 0;

  function automatic clu_item_t clu(cluster_t c);
    clu_item_t it;
    it.kind = K_CLU;  it.payload = c;
    return it;
  endfunction

  initial begin
    spp_stored_t sps[$];
    clu_item_t   iso_q[$], mat_q[$];
    in_valid = 0; in_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 150; ev++) begin
      int ngrp, niso;
      evt_hdr_t h;
      sps.delete(); iso_q.delete(); mat_q.delete();
      ngrp = (ev == 77) ? NMAT + 4 : int'($urandom % 6);
      niso = $urandom % 5;
      // groups: SP columns 4+4(g%20), SP rows 5, 20, 35 for each twenty
      for (int g = 0; g < ngrp; g++) begin
        spp_stored_t a, b;
        int shape, y0, px0, py0, sc, sr, n;
        cluster_t c;
        bit [3:0][1:0] pix;   // pixels (dy,dx) of the blob relative to (y0, x0)
        a.chip = 3'($urandom % 3);
        a.col  = 7'(4 + 4 * (g % 20));
        a.row  = 6'(5 + 15 * (g / 20));
        b = a;  b.col = a.col + 7'd1;
        a.hit = '0;  b.hit = '0;
        shape = $urandom % 3;
        y0 = $urandom % 3;          // pixel row inside the SP, blob stays inside
        // pixel column 1 of SP a is x0, pixel column 0 of SP b is x0+1
        case (shape)
          0: begin a.hit[4 + y0] = 1; a.hit[4 + y0 + 1] = 1; b.hit[y0] = 1; b.hit[y0 + 1] = 1; end
          1: begin a.hit[4 + y0] = 1; b.hit[y0] = 1; end
          default: begin a.hit[4 + y0 + 1] = 1; b.hit[y0] = 1; end
        endcase
        sc = 0; sr = 0; n = 0;
        for (int i = 0; i < 8; i++) begin
          if (a.hit[i]) begin sc += 2 * a.col + i / 4; sr += 4 * a.row + i % 4; n++; end
          if (b.hit[i]) begin sc += 2 * b.col + i / 4; sr += 4 * b.row + i % 4; n++; end
        end
        {c.col, c.col_frac} = 11'(eighths(sc, n));
        {c.row, c.row_frac} = 11'(eighths(sr, n));
        c.chip = {1'b1, a.chip};
        c.isolated = 0; c.self_contained = 1; c.edge_flag = 0;
        if ($urandom % 2) begin sps.push_back(a); sps.push_back(b); end
        else begin sps.push_back(b); sps.push_back(a); end
        if (g < NMAT) mat_q.push_back(clu(c)); else e_drop += 2;
      end
      for (int k = 0; k < niso; k++) begin
        spp_stored_t s;
        int sc, sr, n;
        cluster_t c;
        s.chip = 3'($urandom % 6);
        s.col  = 7'(3 + 6 * k);
        s.row  = 6'(40 + $urandom % 20);
        s.hit  = 8'($urandom % 255 + 1);
        sc = 0; sr = 0; n = 0;
        for (int i = 0; i < 8; i++)
          if (s.hit[i]) begin sc += 2 * s.col + i / 4; sr += 4 * s.row + i % 4; n++; end
        {c.col, c.col_frac} = 11'(eighths(sc, n));
        {c.row, c.row_frac} = 11'(eighths(sr, n));
        c.chip = {1'b1, s.chip};
        c.isolated = 1; c.self_contained = 1; c.edge_flag = 0;
        sps.insert($urandom % (sps.size() + 1), s);
      end
      // isolated clusters come out in input order
      foreach (sps[i]) if (sps[i].row >= 40) begin
        cluster_t c;
        int sc, sr, n;
        sc = 0; sr = 0; n = 0;
        for (int b = 0; b < 8; b++)
          if (sps[i].hit[b]) begin sc += 2 * sps[i].col + b / 4; sr += 4 * sps[i].row + b % 4; n++; end
        {c.col, c.col_frac} = 11'(eighths(sc, n));
        {c.row, c.row_frac} = 11'(eighths(sr, n));
        c.chip = {1'b1, sps[i].chip};
        c.isolated = 1; c.self_contained = 1; c.edge_flag = 0;
        iso_q.push_back(clu(c));
      end
      // the matrix order follows the order in which groups enter the line
      h = '{bxid: 12'(ev * 3), synced: 1'b1, ts_mismatch: 1'b0, truncated: 1'b0, fast_reset: ev[0]};
      exp_q.push_back('{kind: K_HDR, payload: 29'(h)});
      foreach (iso_q[i]) exp_q.push_back(iso_q[i]);
      foreach (mat_q[i]) exp_q.push_back(mat_q[i]);
      exp_q.push_back('{kind: K_END, payload: '0});
      e_iso += iso_q.size();  e_mat += mat_q.size();
      n_events++;
      for (int i = -1; i < int'(sps.size()); i++) begin
        @(negedge clk);
        in_valid = 1;
        if (i < 0) in_item = '{is_hdr: 1'b1, last: (sps.size() == 0), payload: 24'(h)};
        else       in_item = '{is_hdr: 1'b0, last: (i == int'(sps.size()) - 1), payload: sps[i]};
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || 32'(line_drops) != 32'(e_drop) || n_isolated != 32'(e_iso) ||
        n_matrix_clusters != 32'(e_mat) || e_drop == 0 || e_iso == 0 || e_mat == 0) failures++;
    $display("events %0d isolated %0d matrix %0d line drops %0d/%0d left %0d", n_events, n_isolated,
             n_matrix_clusters, line_drops, e_drop, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
