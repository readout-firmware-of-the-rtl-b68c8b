// tb_output_formatter: random events of 0..20 clusters, one of 260 (more
// than the fragment holds), sent as header, cluster and end items while
// the formatter is idle.  Every fragment word is compared with the
// expected layout: event ID counting up from 0, source ID and size in
// bytes, version, flags and bunch-crossing ID, then the cluster words in
// order, with frag_last on the final word.  The reader stalls at random.
module tb_output_formatter;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam logic [15:0] SRC = 16'h0A51;
  logic        in_valid, idle, frag_valid, frag_ready, frag_last;
  clu_item_t   in_item;
  logic [31:0] frag_data, fragments;

  output_formatter #(.SOURCE_ID(SRC), .VERSION(8'd1), .MAX_CLUSTERS(256)) dut (.*);

  typedef struct { logic [31:0] w; bit last; } word_t;
  word_t exp_q[$];
  int    n_frag = 0, n_trunc = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && frag_valid && frag_ready) begin
    checks++;
    if (exp_q.size() == 0 || exp_q[0].w != frag_data || exp_q[0].last != frag_last) begin
      failures++;
      if (failures < 5) $display("exp %h %b got %h %b", exp_q.size() ? exp_q[0].w : 0, exp_q.size() ? exp_q[0].last : 0,
                                 frag_data, frag_last);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  always @(negedge clk) frag_ready = ($urandom % 3) != 0;

  task automatic send(clu_item_t it);
    @(negedge clk);
    while (!idle) @(negedge clk);
    in_valid = 1; in_item = it;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 200; ev++) begin
      int nc, kept;
      evt_hdr_t h;
      logic [31:0] cw [$];
      nc = (ev == 100) ? 260 : int'($urandom % 21);
      kept = (nc > 256) ? 256 : nc;
      h.bxid = 12'($urandom);
      h.synced = 1'($urandom); h.ts_mismatch = 1'($urandom);
      h.truncated = (ev % 37 == 5); h.fast_reset = 1'($urandom);
      send('{kind: K_HDR, payload: 29'(h)});
      cw.delete();
      for (int i = 0; i < nc; i++) begin
        cluster_t c;
        c = cluster_t'($urandom);
        send('{kind: K_CLU, payload: c});
        if (i < kept) cw.push_back({c, 3'b000});
      end
      if (h.truncated || nc > kept) n_trunc++;
      exp_q.push_back('{w: 32'(ev), last: 0});
      exp_q.push_back('{w: {SRC, 16'((kept + 3) * 4)}, last: 0});
      exp_q.push_back('{w: {8'd1, h.synced, h.ts_mismatch, h.truncated || (nc > kept), h.fast_reset,
                            8'h00, h.bxid}, last: (kept == 0)});
      foreach (cw[i]) exp_q.push_back('{w: cw[i], last: (i == kept - 1)});
      n_frag++;
      send('{kind: K_END, payload: '0});
    end
    repeat (2000) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || fragments != 32'(n_frag) || !idle) failures++;
    $display("fragments %0d truncated %0d", fragments, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
