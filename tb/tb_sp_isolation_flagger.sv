// tb_sp_isolation_flagger: random events of SPs crowded into a small area
// of two chips, so that both isolated and non-isolated SPs occur.  Each
// event must come out as its header followed by its SPs in order, each
// flagged isolated exactly when no SP of the same chip is among its eight
// neighbours.  Events larger than the buffer must be cut, flagged
// truncated and counted.
module tb_sp_isolation_flagger;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int MAXSP = 16;
  logic        in_valid, in_ready, out_valid, out_ready, out_iso;
  evt_item_t   in_item, out_item;
  logic [15:0] sp_drops;

  sp_isolation_flagger #(.MAX_SP(MAXSP)) dut (.*);

  typedef struct { evt_item_t it; bit iso; } exp_t;
  exp_t exp_q[$];
  int   n_iso = 0, n_non = 0, n_drop = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      if (e.it != out_item || (!out_item.is_hdr && e.iso != out_iso)) begin failures++; end
    end
  end

  initial begin
    in_valid = 0; in_item = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 300; ev++) begin
      spp_stored_t sps[$];
      evt_hdr_t    h;
      int          n, kept;
      sps.delete();
      n = (ev % 50 == 7) ? MAXSP + 3 : int'($urandom % 10);
      for (int i = 0; i < n; i++) begin
        spp_stored_t s;
        s.chip = 3'($urandom % 2);
        s.col  = 7'(60 + $urandom % 6);
        s.row  = 6'(30 + $urandom % 6);
        s.hit  = 8'($urandom % 255 + 1);
        sps.push_back(s);
      end
      kept = (n > MAXSP) ? MAXSP : n;
      n_drop += n - kept;
      h = '{bxid: 12'(ev), synced: 1'b1, ts_mismatch: 1'b0, truncated: (n > MAXSP), fast_reset: 1'b0};
      exp_q.push_back('{it: '{is_hdr: 1'b1, last: (kept == 0), payload: 24'(h)}, iso: 1'b0});
      for (int i = 0; i < kept; i++) begin
        bit iso;
        iso = 1;
        for (int j = 0; j < kept; j++)
          if (j != i && sps[j].chip == sps[i].chip &&
              int'(sps[j].col) <= int'(sps[i].col) + 1 && int'(sps[j].col) + 1 >= int'(sps[i].col) &&
              int'(sps[j].row) <= int'(sps[i].row) + 1 && int'(sps[j].row) + 1 >= int'(sps[i].row)) iso = 0;
        if (iso) n_iso++; else n_non++;
        exp_q.push_back('{it: '{is_hdr: 1'b0, last: (i == kept - 1), payload: sps[i]}, iso: iso});
      end
      // drive: header, then the SPs; the last item carries `last`
      h.truncated = 1'b0;
      for (int i = -1; i < n; i++) begin
        @(negedge clk);
        in_valid = 1;
        if (i < 0) in_item = '{is_hdr: 1'b1, last: (n == 0), payload: 24'(h)};
        else       in_item = '{is_hdr: 1'b0, last: (i == n - 1), payload: sps[i]};
        out_ready = ($urandom % 4) != 0;
        while (!in_ready) begin
          @(negedge clk);
          out_ready = ($urandom % 4) != 0;
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    out_ready = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_iso == 0 || n_non == 0 || 32'(sp_drops) != 32'(n_drop)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
