// cluster_matrix: one clustering matrix on the SP distribution line.
//
// The matrix covers 3 x 5 SuperPixels (12 pixel rows x 10 pixel columns).
// It starts free, with no position on the module.  The first SP that
// reaches a free matrix places it: that SP becomes the centre position
// (SP row 1, SP column 2 of the matrix).  Later SPs of the same chip that
// fall inside the window are absorbed; all other SPs move on to the next
// matrix of the line one cycle later.  The end-of-event marker follows the
// SPs down the line.
//
// On `search` the matrix looks for checking pixels, all 120 in parallel.
// Both conditions need the "zero L": the three pixels west of the pixel
// and the south-west pixel, and the three pixels south of it and of its
// two eastern neighbours, are empty.  Condition A: the pixel itself is
// active.  Condition B: the pixel is empty and the pixels north and east of
// it are active.  The lowest-numbered checking pixel not yet done seeds a
// 3x3 candidate with the seed at its south-west corner; a 512-entry table
// (generated from the centroid formula, velo_pkg::c3_centroid) turns the
// 3x3 pattern into a position with 1/8-pixel fractions.  The candidate is
// self-contained when the 16 pixels around it are empty and at the edge
// when that ring leaves the matrix.  On cand_ack the seed is marked done;
// when no checking pixel is left the matrix returns to free.  Sizes, the
// placement rule and the A/B search follow the document; pixel orientation
// (row up = north, column up = east), serving order and the flag
// definitions are this design's choices.
//
// Timing: absorb/forward is registered (one cycle per matrix on the line);
// one candidate per cycle during search.
module cluster_matrix #(
  parameter int unsigned ROWS      = 12,
  parameter int unsigned COLS      = 10,
  parameter logic        STREAM_ID = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // distribution line
  input  logic                  in_valid,
  input  velo_pkg::spp_stored_t in_sp,
  input  logic                  in_eoe,
  output logic                  out_valid,
  output velo_pkg::spp_stored_t out_sp,
  output logic                  out_eoe,
  // candidate search
  input  logic                  search,
  output logic                  busy,
  output logic                  cand_valid,
  output velo_pkg::cluster_t    cand,
  input  logic                  cand_ack
);
  import velo_pkg::*;
  localparam int unsigned SPR = ROWS / 4;      // SP rows
  localparam int unsigned SPC = COLS / 2;      // SP columns
  localparam int unsigned NP  = ROWS * COLS;

  typedef enum logic [1:0] {M_FREE, M_FILL, M_SEARCH} mstate_t;

  mstate_t                   st;
  logic [ROWS-1:0][COLS-1:0] pix, done;
  logic [2:0]                chip;
  logic signed [8:0]         base_c, base_r;  // SP coordinates of matrix origin
  logic signed [8:0]         dc, dr;
  logic                      fits, absorb;
  logic [ROWS-1:0][COLS-1:0] check;
  logic [NP-1:0]             seed_flat;
  logic                      any_seed;
  int unsigned               sy, sx;
  logic [8:0]                win;
  logic [9:0]                cen;
  logic                      ring_hit, ring_out;
  logic signed [12:0]        col8, row8;

  function automatic logic px(input logic [ROWS-1:0][COLS-1:0] m, input int y, input int x);
    if (y < 0 || x < 0 || y >= int'(ROWS) || x >= int'(COLS)) return 1'b0;
    return m[y][x];
  endfunction

  // Placement of the incoming SP relative to this matrix.
  always_comb begin
    dc     = $signed({2'b00, in_sp.col}) - base_c;
    dr     = $signed({3'b000, in_sp.row}) - base_r;
    fits   = (st == M_FILL) && (in_sp.chip == chip) &&
             dc >= 0 && dc < $signed(9'(SPC)) && dr >= 0 && dr < $signed(9'(SPR));
    absorb = in_valid && ((st == M_FREE && !search) || fits);
  end

  // Checking pixels (conditions A and B).
  always_comb begin
    for (int y = 0; y < int'(ROWS); y++)
      for (int x = 0; x < int'(COLS); x++) begin
        logic zl;
        zl = !px(pix, y, x-1) && !px(pix, y+1, x-1) && !px(pix, y+2, x-1) && !px(pix, y-1, x-1) &&
             !px(pix, y-1, x) && !px(pix, y-1, x+1) && !px(pix, y-1, x+2);
        check[y][x] = zl && (pix[y][x] || (px(pix, y+1, x) && px(pix, y, x+1))) && !done[y][x];
      end
    seed_flat = NP'(check);
    any_seed  = (st == M_SEARCH) && (seed_flat != '0);
    sy = 0; sx = 0;
    for (int i = NP - 1; i >= 0; i--)
      if (seed_flat[i]) begin
        sy = i / COLS;
        sx = i % COLS;
      end
  end

  // Candidate window, ring and cluster position.
  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r*3+c] = px(pix, int'(sy) + r, int'(sx) + c);
    ring_hit = 1'b0;
    for (int r = -1; r <= 3; r++)
      for (int c = -1; c <= 3; c++)
        if (r == -1 || r == 3 || c == -1 || c == 3)
          ring_hit = ring_hit | px(pix, int'(sy) + r, int'(sx) + c);
    ring_out = (sy == 0) || (sx == 0) || (sy + 3 >= ROWS) || (sx + 3 >= COLS);
    cen  = c3_centroid(win);
    col8 = 13'(base_c) * 13'sd16 + $signed(13'(sx * 8)) + $signed({8'd0, cen[9:5]});
    row8 = 13'(base_r) * 13'sd32 + $signed(13'(sy * 8)) + $signed({8'd0, cen[4:0]});
    cand.chip           = {STREAM_ID, chip};
    cand.col            = col8[10:3];
    cand.col_frac       = col8[2:0];
    cand.row            = row8[10:3];
    cand.row_frac       = row8[2:0];
    cand.isolated       = 1'b0;
    cand.self_contained = !ring_hit;
    cand.edge_flag      = ring_out;
  end

  assign cand_valid = any_seed;
  assign busy       = (st != M_FREE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= M_FREE;
      pix       <= '0;
      done      <= '0;
      chip      <= '0;
      base_c    <= '0;
      base_r    <= '0;
      out_valid <= 1'b0;
      out_sp    <= '0;
      out_eoe   <= 1'b0;
    end else begin
      out_valid <= in_valid && !absorb;
      out_sp    <= in_sp;
      out_eoe   <= in_eoe;
      case (st)
        M_FREE: if (absorb) begin
          st     <= M_FILL;
          chip   <= in_sp.chip;
          base_c <= $signed({2'b00, in_sp.col}) - 9'sd2;
          base_r <= $signed({3'b000, in_sp.row}) - 9'sd1;
          for (int i = 0; i < 8; i++) pix[4 + i % 4][4 + i / 4] <= in_sp.hit[i];
        end
        M_FILL: begin
          if (absorb)
            for (int i = 0; i < 8; i++)
              if (in_sp.hit[i]) pix[int'(dr) * 4 + i % 4][int'(dc) * 2 + i / 4] <= 1'b1;
          if (search) st <= M_SEARCH;
        end
        M_SEARCH: begin
          if (!any_seed) begin
            st   <= M_FREE;
            pix  <= '0;
            done <= '0;
          end else if (cand_ack) begin
            done[sy][sx] <= 1'b1;
          end
        end
        default: st <= M_FREE;
      endcase
    end
  end

endmodule
