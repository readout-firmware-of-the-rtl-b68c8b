// clustering: turns the SuperPixels of each event into clusters.
//
// Steps, per event:
//  1. sp_isolation_flagger buffers the event's SPs and flags each one
//     isolated or not.
//  2. A switch sends isolated SPs to the isolated-cluster table, which gives
//     their cluster at once, and non-isolated SPs onto the distribution line
//     of N_MATRICES clustering matrices.
//  3. When the end-of-event marker has passed the last matrix, every matrix
//     searches its candidates in parallel; a fixed-priority arbiter takes
//     one cluster per cycle, lowest matrix first.
//  4. When all matrices are free again an end item closes the event.
// An event whose SPs are all isolated skips steps 3 and the line wait.  An
// SP that leaves the end of the line without finding a matrix is dropped
// and counted.  Flagging, the switch, the isolated table and the matrix
// line follow the document; processing one event at a time is this
// design's simplification.
//
// Output: a stream of clu_item_t (header, clusters, end) with a valid
// strobe; a new event header is only sent when `fmt_idle` shows that the
// formatter has finished the previous fragment.  No other back-pressure.
module clustering #(
  parameter int unsigned N_MATRICES = 40,
  parameter int unsigned MAX_SP     = 128,
  parameter logic        STREAM_ID  = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  velo_pkg::evt_item_t in_item,
  input  logic                fmt_idle,
  output logic                out_valid,
  output velo_pkg::clu_item_t out_item,
  output logic [15:0]         line_drops,
  output logic [15:0]         sp_drops,
  output logic [31:0]         n_isolated,
  output logic [31:0]         n_matrix_clusters
);
  import velo_pkg::*;

  typedef enum logic [2:0] {C_HDR, C_SPS, C_LINE, C_SEARCH, C_END} cstate_t;

  cstate_t     st;
  logic        f_valid, f_ready, f_iso;
  evt_item_t   f_item;
  spp_stored_t f_sp;
  cluster_t    iso_cl;
  logic        line_used;

  logic [N_MATRICES:0]  l_valid, l_eoe;
  spp_stored_t          l_sp [N_MATRICES+1];
  logic [N_MATRICES-1:0] m_busy, m_cand, m_ack;
  cluster_t             m_cl [N_MATRICES];
  logic                 search;
  int unsigned          pick;

  sp_isolation_flagger #(.MAX_SP(MAX_SP)) u_flag (
    .clk, .rst_n, .in_valid, .in_ready, .in_item,
    .out_valid(f_valid), .out_ready(f_ready), .out_item(f_item), .out_iso(f_iso), .sp_drops);

  assign f_sp = spp_stored_t'(f_item.payload);

  cluster_lut_isolated #(.STREAM_ID(STREAM_ID)) u_iso (.sp(f_sp), .cl(iso_cl));

  always_comb begin
    f_ready = (st == C_SPS) || (st == C_HDR && fmt_idle);
    // Line entry: non-isolated SPs; the end marker rides with the last item
    // and is only sent when the event used the line.
    l_valid[0] = (st == C_SPS) && f_valid && !f_item.is_hdr && !f_iso;
    l_sp[0]    = f_sp;
    l_eoe[0]   = (st == C_SPS) && f_valid && f_item.last && (line_used || !f_iso);
  end

  for (genvar m = 0; m < N_MATRICES; m++) begin : g_mat
    cluster_matrix #(.ROWS(12), .COLS(10), .STREAM_ID(STREAM_ID)) u_mat (
      .clk, .rst_n,
      .in_valid(l_valid[m]), .in_sp(l_sp[m]), .in_eoe(l_eoe[m]),
      .out_valid(l_valid[m+1]), .out_sp(l_sp[m+1]), .out_eoe(l_eoe[m+1]),
      .search, .busy(m_busy[m]), .cand_valid(m_cand[m]), .cand(m_cl[m]), .cand_ack(m_ack[m]));
  end

  assign search = (st == C_SEARCH);

  always_comb begin
    pick  = 0;
    for (int m = N_MATRICES - 1; m >= 0; m--) if (m_cand[m]) pick = m;
    m_ack = '0;
    if (search && m_cand != '0) m_ack[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st                <= C_HDR;
      out_valid         <= 1'b0;
      out_item          <= '0;
      line_used         <= 1'b0;
      line_drops        <= '0;
      n_isolated        <= '0;
      n_matrix_clusters <= '0;
    end else begin
      out_valid <= 1'b0;
      if (l_valid[N_MATRICES]) line_drops <= line_drops + 16'd1;
      case (st)
        C_HDR: if (f_valid && fmt_idle) begin
          out_valid     <= 1'b1;
          out_item.kind <= K_HDR;
          out_item.payload <= 29'(f_item.payload[15:0]);
          line_used     <= 1'b0;
          st            <= f_item.last ? C_END : C_SPS;
        end
        C_SPS: if (f_valid) begin
          if (f_iso) begin
            out_valid        <= 1'b1;
            out_item.kind    <= K_CLU;
            out_item.payload <= iso_cl;
            n_isolated       <= n_isolated + 32'd1;
          end else begin
            line_used <= 1'b1;
          end
          if (f_item.last) st <= (line_used || !f_iso) ? C_LINE : C_END;
        end
        C_LINE: if (l_eoe[N_MATRICES]) st <= C_SEARCH;
        C_SEARCH: begin
          if (m_cand != '0) begin
            out_valid         <= 1'b1;
            out_item.kind     <= K_CLU;
            out_item.payload  <= m_cl[pick];
            n_matrix_clusters <= n_matrix_clusters + 32'd1;
          end else if (m_busy == '0) begin
            st <= C_END;
          end
        end
        C_END: begin
          out_valid     <= 1'b1;
          out_item.kind <= K_END;
          out_item.payload <= '0;
          st            <= C_HDR;
        end
        default: st <= C_HDR;
      endcase
    end
  end

endmodule
