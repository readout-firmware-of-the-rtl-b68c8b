// velo_pkg: types, constants and small functions shared by the VELO readout
// data path.
//
// GWT frame (128 bits, most significant bit first on the wire):
//   [127:124] header, always 4'hA
//   [123:120] parity, bit 120+i covers SPP i (this design's choice: even
//             parity over the 30 scrambled bits of that SPP)
//   [119:90]  SPP 3, [89:60] SPP 2, [59:30] SPP 1, [29:0] SPP 0
// SuperPixel packet (30 bits): column [29:23], row [22:17], Gray-coded
// timestamp [16:8], hitmap [7:0].  The field layout follows the VeloPix
// format; the hitmap bit order (bit i = pixel column i/4, pixel row i%4 of
// the 2x4 SuperPixel), the special-packet codes and the cluster word are
// this design's choices.  An SPP with an empty hitmap is a special packet;
// its type sits in [29:26].  Type 4'h5 is taken as the synchronisation
// packet and carries the binary 12-bit bunch-crossing ID in [19:8].
package velo_pkg;

  localparam int unsigned SPP_W     = 30;
  localparam int unsigned TS_W      = 9;
  localparam int unsigned BXID_W    = 12;
  localparam int unsigned CHIP_W    = 3;
  localparam int unsigned COL_W     = 7;   // SuperPixel column
  localparam int unsigned ROW_W     = 6;   // SuperPixel row
  localparam int unsigned HIT_W     = 8;
  localparam logic [3:0]  GWT_HDR   = 4'hA;
  localparam logic [3:0]  SPP_SYNC  = 4'h5;

  // Polynomial x^30 + x^16 + x^15 + x + 1: taps 1, 15, 16, 30.
  localparam int unsigned SCR_T1 = 1, SCR_T2 = 15, SCR_T3 = 16, SCR_T4 = 30;

  typedef struct packed {
    logic [COL_W-1:0] col;
    logic [ROW_W-1:0] row;
    logic [TS_W-1:0]  ts;
    logic [HIT_W-1:0] hit;
  } spp_t;                                   // 30 bits

  // SPP with chip ID prepended (33 bits), as it enters the router.
  typedef struct packed {
    logic [CHIP_W-1:0] chip;
    spp_t              spp;
  } spp_chip_t;

  // SPP as stored in the SPP RAMs: the timestamp is the address (24 bits).
  typedef struct packed {
    logic [CHIP_W-1:0] chip;
    logic [COL_W-1:0]  col;
    logic [ROW_W-1:0]  row;
    logic [HIT_W-1:0]  hit;
  } spp_stored_t;

  // TFC metadata for one bunch crossing.
  typedef struct packed {
    logic [BXID_W-1:0] bxid;
    logic              fast_reset;
    logic              sync;
    logic              veto;
  } tfc_t;

  // Event header travelling with the SPPs of one bunch crossing.
  typedef struct packed {
    logic [BXID_W-1:0] bxid;
    logic              synced;     // VELO timestamp extension valid
    logic              ts_mismatch;
    logic              truncated;  // bin overflow or SP buffer overflow
    logic              fast_reset;
  } evt_hdr_t;

  // Item of the event stream between time alignment and clustering: an
  // event is one header item followed by zero or more SPP items; `last`
  // marks the final item of the event.
  typedef struct packed {
    logic        is_hdr;
    logic        last;
    logic [23:0] payload;      // evt_hdr_t (low 16 bits) or spp_stored_t
  } evt_item_t;

  // Cluster: chip = {stream, chip}, pixel position and 1/8 fractions.
  typedef struct packed {
    logic [3:0] chip;
    logic [7:0] col;
    logic [7:0] row;
    logic [2:0] col_frac;
    logic [2:0] row_frac;
    logic       isolated;
    logic       self_contained;
    logic       edge_flag;
  } cluster_t;                               // 29 bits

  function automatic logic [TS_W-1:0] gray2bin(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [TS_W-1:0] bin2gray(input logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Self-synchronising descrambler step for one 30-bit lane.  cur is the
  // scrambled word just received, prev the one before it; bit 29 is the
  // earliest bit.  d[n] = s[n] ^ s[n-1] ^ s[n-15] ^ s[n-16] ^ s[n-30].
  function automatic logic [SPP_W-1:0] descramble30(input logic [SPP_W-1:0] cur,
                                                    input logic [SPP_W-1:0] prev);
    logic [2*SPP_W-1:0] c;
    logic [SPP_W-1:0]   d;
    c = {prev, cur};
    for (int b = 0; b < SPP_W; b++)
      d[b] = c[b] ^ c[b+SCR_T1] ^ c[b+SCR_T2] ^ c[b+SCR_T3] ^ c[b+SCR_T4];
    return d;
  endfunction

  // Rounded mean of a coordinate sum over n pixels, in 1/8 pixel units.
  function automatic logic [7:0] mean8(input logic [7:0] sum, input logic [3:0] n);
    logic [11:0] num;
    num = ({4'd0, sum} << 3) + 12'(n >> 1);
    return (n == 0) ? 8'd0 : 8'(num / 12'(n));
  endfunction

  // Isolated-SP cluster table entry: centroid of the hit pixels inside the
  // 2x4 SuperPixel, {col8[3:0], row8[4:0]} in 1/8 pixel units.
  function automatic logic [8:0] sp_centroid(input logic [HIT_W-1:0] hit);
    logic [7:0] sc, sr;
    logic [3:0] n;
    logic [7:0] mc, mr;
    sc = '0; sr = '0; n = '0;
    for (int i = 0; i < HIT_W; i++)
      if (hit[i]) begin
        sc = sc + 8'(i / 4);
        sr = sr + 8'(i % 4);
        n  = n + 4'd1;
      end
    mc = mean8(sc, n);
    mr = mean8(sr, n);
    return {mc[3:0], mr[4:0]};
  endfunction

  // 3x3 candidate table entry: bit (r*3+c) is pixel (row r, col c) counted
  // from the south-west corner.  Returns {col8[4:0], row8[4:0]}.
  function automatic logic [9:0] c3_centroid(input logic [8:0] pix);
    logic [7:0] sc, sr;
    logic [3:0] n;
    logic [7:0] mc, mr;
    sc = '0; sr = '0; n = '0;
    for (int i = 0; i < 9; i++)
      if (pix[i]) begin
        sc = sc + 8'(i % 3);
        sr = sr + 8'(i / 3);
        n  = n + 4'd1;
      end
    mc = mean8(sc, n);
    mr = mean8(sr, n);
    return {mc[4:0], mr[4:0]};
  endfunction

  // Item of the cluster stream between clustering and output formatting.
  typedef enum logic [1:0] {K_HDR = 2'd0, K_CLU = 2'd1, K_END = 2'd2} clu_kind_t;
  typedef struct packed {
    clu_kind_t   kind;
    logic [28:0] payload;      // evt_hdr_t (low 16 bits) or cluster_t
  } clu_item_t;

  // Monitoring counters of one data stream, for the slow-control registers.
  typedef struct packed {
    logic [9:0]  locked;          // per link
    logic [15:0] lock_losses;     // summed over links
    logic [31:0] parity_errors;   // summed over links
    logic [15:0] extract_overruns;
    logic [15:0] fifo_drops;
    logic [15:0] bin_drops;
    logic        synced;
    logic [15:0] tfc_drops;
    logic [15:0] overruns;
    logic [31:0] events;
    logic [15:0] sp_drops;
    logic [15:0] line_drops;
    logic [31:0] n_isolated;
    logic [31:0] n_matrix_clusters;
    logic [31:0] fragments;
  } stream_status_t;

  // Chip of each link in a data stream: links per chip (4,2,1,1,1,1).
  function automatic logic [CHIP_W-1:0] link_chip(input int link);
    if (link < 4) return 3'd0;
    if (link < 6) return 3'd1;
    return CHIP_W'(link - 4);
  endfunction

  // Cluster word of the output fragment.
  function automatic logic [31:0] cluster_word(input cluster_t c);
    return {c, 3'b000};
  endfunction

endpackage
