// velo_tell40_top: VELO readout firmware data path of one TELL40 board.
//
// The twenty GWT links of a VELO module are split over two identical,
// independent data streams of ten links each (stream 0: chips 0-5, stream
// 1: chips 6-11), so each stream carries about half of the bandwidth and
// feeds its own PCIe output.  Both streams share the 160 MHz clock and the
// TFC metadata, which arrives once per bunch crossing.  Each stream
// delivers event fragments as 32-bit words with a valid/ready handshake,
// and a status record of monitoring counters for the slow-control
// registers.  The transceivers, PCIe, TFC and slow-control interfaces are
// outside this module: their signals are its ports.
module velo_tell40_top #(
  parameter int unsigned N_LINKS       = 10,
  parameter int unsigned LOCK_FRAMES   = 16,
  parameter int unsigned UNLOCK_FRAMES = 8,
  parameter int unsigned SLOTS         = 512,
  parameter int unsigned TFC_DEPTH     = 1024,
  parameter int unsigned N_MATRICES    = 40,
  parameter int unsigned MAX_SP        = 128,
  parameter int unsigned MAX_CLUSTERS  = 256
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [1:0][N_LINKS-1:0]              rx_valid,
  input  logic [1:0][N_LINKS-1:0][31:0]        rx_word,
  input  logic                                 tfc_valid,
  input  velo_pkg::tfc_t                       tfc,
  output logic [1:0]                           frag_valid,
  input  logic [1:0]                           frag_ready,
  output logic [1:0][31:0]                     frag_data,
  output logic [1:0]                           frag_last,
  output velo_pkg::stream_status_t [1:0]       status
);
  for (genvar s = 0; s < 2; s++) begin : g_stream
    data_stream #(
      .STREAM_ID(1'(s)), .N_LINKS(N_LINKS), .LOCK_FRAMES(LOCK_FRAMES), .UNLOCK_FRAMES(UNLOCK_FRAMES),
      .SLOTS(SLOTS), .TFC_DEPTH(TFC_DEPTH), .N_MATRICES(N_MATRICES), .MAX_SP(MAX_SP),
      .MAX_CLUSTERS(MAX_CLUSTERS)
    ) u_stream (
      .clk, .rst_n, .rx_valid(rx_valid[s]), .rx_word(rx_word[s]), .tfc_valid, .tfc,
      .frag_valid(frag_valid[s]), .frag_ready(frag_ready[s]), .frag_data(frag_data[s]),
      .frag_last(frag_last[s]), .status(status[s]));
  end

endmodule
