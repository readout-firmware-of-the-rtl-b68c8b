// tb_cluster_lut_isolated: every one of the 255 non-empty hitmaps, each at
// several random SuperPixel positions and on both chips.  The expected
// cluster position is the mean pixel coordinate of the hit pixels computed
// here in real arithmetic and rounded to the nearest eighth; the cluster
// must also carry the chip, and the isolated and self-contained flags.
module tb_cluster_lut_isolated;
  import velo_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;

  spp_stored_t sp;
  cluster_t    cl;

  cluster_lut_isolated #(.STREAM_ID(1'b1)) dut (.sp, .cl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 1; h < 256; h++)
      for (int rep = 0; rep < 4; rep++) begin
        int sc, sr, n, ec, er;
        sp.chip = 3'($urandom % 6);
        sp.col  = 7'($urandom % 128);
        sp.row  = 6'($urandom % 64);
        sp.hit  = 8'(h);
        sc = 0; sr = 0; n = 0;
        for (int i = 0; i < 8; i++)
          if (h[i]) begin
            sc += 2 * int'(sp.col) + i / 4;
            sr += 4 * int'(sp.row) + i % 4;
            n++;
          end
        ec = eighths(sc, n);
        er = eighths(sr, n);
        #1;
        checks++;
        if ({cl.col, cl.col_frac} != 11'(ec) || {cl.row, cl.row_frac} != 11'(er) ||
            cl.chip != {1'b1, sp.chip} || !cl.isolated || !cl.self_contained || cl.edge_flag) begin
          failures++;
          if (failures < 5) $display("hit %h col %0d row %0d: exp %0d %0d got %0d %0d", h, sp.col, sp.row,
                                     ec, er, {cl.col, cl.col_frac}, {cl.row, cl.row_frac});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
