// cluster_lut_isolated: cluster of an isolated SuperPixel.
//
// An isolated SP forms its cluster on its own.  The table maps each of the
// 255 possible hitmaps to the centroid of its hit pixels inside the 2x4
// SuperPixel, in eighths of a pixel; the table is generated from that
// formula (velo_pkg::sp_centroid) rather than stored.  The result is added
// to the SuperPixel's origin (column x2, row x4) to give the cluster's
// pixel column and row and their 1/8 fractions.  The cluster is flagged
// isolated and self-contained.  One cluster per isolated SP, at the
// centroid, is this design's reading of the table.
// Purely combinational.
module cluster_lut_isolated #(
  parameter logic STREAM_ID = 1'b0
) (
  input  velo_pkg::spp_stored_t sp,
  output velo_pkg::cluster_t    cl
);
  import velo_pkg::*;

  logic [8:0]  cen;
  logic [10:0] col8, row8;

  always_comb begin
    cen  = sp_centroid(sp.hit);
    col8 = {sp.col, 4'b0000} + 11'(cen[8:5]);
    row8 = {sp.row, 5'b00000} + 11'(cen[4:0]);
    cl.chip           = {STREAM_ID, sp.chip};
    cl.col            = col8[10:3];
    cl.col_frac       = col8[2:0];
    cl.row            = row8[10:3];
    cl.row_frac       = row8[2:0];
    cl.isolated       = 1'b1;
    cl.self_contained = 1'b1;
    cl.edge_flag      = 1'b0;
  end

endmodule
