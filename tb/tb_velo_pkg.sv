// tb_velo_pkg: checks the package functions against the reference models:
// Gray decoding of all 512 timestamps, descrambling of serially scrambled
// random words, centroids of all hitmaps and 3x3 patterns, and the chip
// number of each link.
module tb_velo_pkg;
  import velo_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    logic [29:0] h, prev, cur, d;
    for (int b = 0; b < 512; b++) begin
      checks++;
      if (gray2bin(to_gray(9'(b))) != 9'(b)) failures++;
      checks++;
      if (bin2gray(9'(b)) != to_gray(9'(b))) failures++;
    end
    // prev must be the last 30 scrambled bits: h[k-1] was sent k bits ago,
    // which is bit k-1 of the previous word (bit 0 is sent last).
    h = 30'($urandom);
    prev = h;
    for (int i = 0; i < 200; i++) begin
      d   = 30'($urandom);
      cur = scramble_serial(d, h);
      checks++;
      if (descramble30(cur, prev) != d) failures++;
      prev = cur;
    end
    for (int m = 1; m < 256; m++) begin
      int sc, sr, n;
      logic [8:0] c;
      sc = 0; sr = 0; n = 0;
      for (int i = 0; i < 8; i++) if (m[i]) begin sc += i / 4; sr += i % 4; n++; end
      c = sp_centroid(8'(m));
      checks++;
      if (int'(c[8:5]) != eighths(sc, n) || int'(c[4:0]) != eighths(sr, n)) failures++;
    end
    for (int m = 1; m < 512; m++) begin
      int sc, sr, n;
      logic [9:0] c;
      sc = 0; sr = 0; n = 0;
      for (int i = 0; i < 9; i++) if (m[i]) begin sc += i % 3; sr += i / 3; n++; end
      c = c3_centroid(9'(m));
      checks++;
      if (int'(c[9:5]) != eighths(sc, n) || int'(c[4:0]) != eighths(sr, n)) failures++;
    end
    for (int l = 0; l < 10; l++) begin
      int exp_chip;
      exp_chip = (l < 4) ? 0 : (l < 6) ? 1 : l - 4;
      checks++;
      if (int'(link_chip(l)) != exp_chip) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
