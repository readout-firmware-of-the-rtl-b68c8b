// tb_cluster_matrix: random groups of SuperPixels sent down the line into
// one matrix, then a search.
//
// Each trial places the matrix with a first SP, sends up to seven more SPs
// of which some fall inside the 3x5 SP window on the same chip (they must
// be absorbed) and some do not (they must reappear on the line output one
// cycle later, in order, with the end marker behind them).  After `search`
// every candidate is acknowledged as it appears.  A reference model here
// builds the 12x10 pixel picture, finds the checking pixels (zero L plus
// condition A or B) in the same order, and computes each candidate's
// position from the mean absolute pixel coordinate of its 3x3 window, its
// self-contained and edge flags.  The matrix must be free afterwards.
module tb_cluster_matrix;
  import velo_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_eoe, out_valid, out_eoe, search, busy, cand_valid, cand_ack;
  spp_stored_t in_sp, out_sp;
  cluster_t    cand;

  cluster_matrix #(.ROWS(12), .COLS(10), .STREAM_ID(1'b0)) dut (.*);

  spp_stored_t fwd_q[$];
  cluster_t    exp_q[$];
  int          n_a = 0, n_b = 0, n_sc = 0, n_edge = 0, n_fwd = 0;
  bit          pic [12][10];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // forwarded SPs
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (fwd_q.size() == 0 || fwd_q[0] != out_sp) failures++;
    if (fwd_q.size() != 0) void'(fwd_q.pop_front());
    n_fwd++;
  end

  function automatic bit p(int y, int x);
    if (y < 0 || x < 0 || y >= 12 || x >= 10) return 0;
    return pic[y][x];
  endfunction

  initial begin
    in_valid = 0; in_eoe = 0; in_sp = '0; search = 0; cand_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      spp_stored_t first, s;
      int bc, br, ns;
      first.chip = 3'($urandom % 2);
      first.col  = 7'(3 + $urandom % 120);
      first.row  = 6'(2 + $urandom % 60);
      first.hit  = 8'($urandom);
      if (first.hit == 0) first.hit = 8'h01;
      bc = int'(first.col) - 2;  br = int'(first.row) - 1;
      for (int y = 0; y < 12; y++) for (int x = 0; x < 10; x++) pic[y][x] = 0;
      for (int i = 0; i < 8; i++) if (first.hit[i]) pic[4 + i % 4][4 + i / 4] = 1;
      @(negedge clk);
      in_valid = 1; in_sp = first; in_eoe = 0;
      ns = $urandom % 8;
      for (int k = 0; k < ns; k++) begin
        int dc, dr;
        bit inside_w;
        s.chip = ($urandom % 4 == 0) ? first.chip ^ 3'd1 : first.chip;
        dc = int'($urandom % 7) - 3;  dr = int'($urandom % 5) - 2;
        s.col = 7'(int'(first.col) + dc);
        s.row = 6'(int'(first.row) + dr);
        s.hit = 8'($urandom % 4 == 0 ? 8'($urandom) : 8'(1 << ($urandom % 8)));
        inside_w = s.chip == first.chip && dc >= -2 && dc <= 2 && dr >= -1 && dr <= 1;
        if (inside_w) begin
          for (int i = 0; i < 8; i++)
            if (s.hit[i]) pic[4 * (dr + 1) + i % 4][2 * (dc + 2) + i / 4] = 1;
        end else fwd_q.push_back(s);
        @(negedge clk);
        in_sp = s;
      end
      @(negedge clk);
      in_valid = 0; in_eoe = 1;
      @(negedge clk);
      in_eoe = 0;
      checks++;
      if (!out_eoe) failures++;
      // expected candidates, in the matrix's serving order
      for (int y = 0; y < 12; y++)
        for (int x = 0; x < 10; x++) begin
          bit zl, a, b, ring;
          zl = !p(y, x-1) && !p(y+1, x-1) && !p(y+2, x-1) && !p(y-1, x-1) &&
               !p(y-1, x) && !p(y-1, x+1) && !p(y-1, x+2);
          a  = zl && p(y, x);
          b  = zl && !p(y, x) && p(y+1, x) && p(y, x+1);
          if (a || b) begin
            cluster_t c;
            int sc, sr, n, ec, er;
            if (a) n_a++; else n_b++;
            sc = 0; sr = 0; n = 0; ring = 0;
            for (int r = -1; r <= 3; r++)
              for (int q = -1; q <= 3; q++)
                if (r >= 0 && r <= 2 && q >= 0 && q <= 2) begin
                  if (p(y + r, x + q)) begin
                    sc += 2 * bc + x + q;  sr += 4 * br + y + r;  n++;
                  end
                end else if (p(y + r, x + q)) ring = 1;
            ec = eighths(sc, n);  er = eighths(sr, n);
            c.chip = {1'b0, first.chip};
            {c.col, c.col_frac} = 11'(ec);
            {c.row, c.row_frac} = 11'(er);
            c.isolated = 0;
            c.self_contained = !ring;
            c.edge_flag = (y == 0 || x == 0 || y + 3 >= 12 || x + 3 >= 10);
            if (c.self_contained) n_sc++;
            if (c.edge_flag) n_edge++;
            exp_q.push_back(c);
          end
        end
      // search
      search = 1;
      @(negedge clk);
      search = 0;
      for (int cyc = 0; cyc < 200 && busy; cyc++) begin
        cand_ack = ($urandom % 3) != 0;
        @(posedge clk);
        if (cand_valid && cand_ack) begin
          checks++;
          if (exp_q.size() == 0 || exp_q[0] != cand) begin
            failures++;
            if (failures < 5) $display("trial %0d: exp %p got %p", t, exp_q.size() ? exp_q[0] : '0, cand);
          end
          if (exp_q.size()) void'(exp_q.pop_front());
        end
        @(negedge clk);
      end
      cand_ack = 0;
      checks++;
      if (busy || exp_q.size() != 0 || fwd_q.size() != 0) begin
        failures++;
        exp_q.delete(); fwd_q.delete();
      end
    end
    checks++;
    if (n_a == 0 || n_b == 0 || n_sc == 0 || n_edge == 0 || n_fwd == 0) failures++;
    $display("conditions A %0d B %0d, self-contained %0d, edge %0d, forwarded %0d", n_a, n_b, n_sc, n_edge, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
