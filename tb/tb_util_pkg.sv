// tb_util_pkg: reference models shared by the testbenches.
//
// The models are written independently of the RTL: the scrambler works bit
// by bit with a shift register, the Gray code and centroids are computed
// from their definitions, and the frame builder places fields by their bit
// positions.
package tb_util_pkg;

  // Serial multiplicative scrambler for x^30 + x^16 + x^15 + x + 1.
  // h[k-1] holds the scrambled bit sent k bits ago.  Bit 29 goes first.
  function automatic logic [29:0] scramble_serial(input logic [29:0] d, ref logic [29:0] h);
    logic [29:0] s;
    for (int b = 29; b >= 0; b--) begin
      s[b] = d[b] ^ h[0] ^ h[14] ^ h[15] ^ h[29];
      h    = {h[28:0], s[b]};
    end
    return s;
  endfunction

  function automatic logic [8:0] to_gray(input logic [8:0] b);
    logic [8:0] g;
    g[8] = b[8];
    for (int i = 0; i < 8; i++) g[i] = b[i+1] ^ b[i];
    return g;
  endfunction

  // Data SPP with the binary timestamp Gray-coded as on the link.
  function automatic logic [29:0] data_spp(input int col, input int row, input int ts, input logic [7:0] hit);
    return {7'(col), 6'(row), to_gray(9'(ts)), hit};
  endfunction

  // Synchronisation special SPP carrying a 12-bit bunch-crossing ID.
  function automatic logic [29:0] sync_spp(input int bxid);
    return {4'h5, 6'd0, 12'(bxid), 8'h00};
  endfunction

  function automatic logic [29:0] idle_spp();
    return {4'h0, 26'd0};
  endfunction

  // GWT frame from four plain SPPs (index 3 first on the wire); scrambles
  // each slot with its own history and fills in the parity bits.
  function automatic logic [127:0] make_frame(input logic [3:0][29:0] spp, ref logic [3:0][29:0] hist);
    logic [127:0] f;
    logic [29:0]  h, s;
    f[127:124] = 4'hA;
    for (int i = 0; i < 4; i++) begin
      h = hist[i];
      s = scramble_serial(spp[i], h);
      hist[i] = h;
      f[30*i +: 30] = s;
      f[120 + i]    = ^s;
    end
    return f;
  endfunction

  // Rounded centroid of pixel coordinates in eighths.
  function automatic int eighths(input int sum, input int n);
    real v;
    v = (real'(sum) * 8.0) / real'(n);
    return int'($floor(v + 0.5));
  endfunction

endpackage
