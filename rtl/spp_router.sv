// spp_router: the switching router that sorts SPPs by timestamp MSBs.
//
// Four columns of eight 2x2 switching blocks move SPPs from N_IN input
// links onto 16 output lanes, one per SPP RAM.  Column s routes on
// timestamp bit 8-s (bit 16-s of its 33-s bit word) and removes it, so the
// word shrinks 33 -> 32 -> 31 -> 30 -> 29 bits and the lane an SPP leaves
// on equals the four timestamp MSBs.  The wiring is a butterfly: column s
// pairs the lanes whose indices differ only in bit 3-s, and a 1 sends the
// SPP to the lane with that bit set.  Inputs 0..N_IN-1 enter lanes
// 0..N_IN-1; with ten links, switches 0 and 1 of the first column see two
// inputs and the other six see one.  The column count, switch count and
// widths follow the router description; the exact lane pairing is this
// design's butterfly reading of it.
//
// All handshakes are valid/ready; every switch buffers in FIFOs, so the
// router back-pressures its inputs only when congested.
module spp_router #(
  parameter int unsigned N_IN       = 10,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_IN-1:0]      in_valid,
  output logic [N_IN-1:0]      in_ready,
  input  logic [N_IN-1:0][32:0] in_data,
  output logic [15:0]          out_valid,
  input  logic [15:0]          out_ready,
  output logic [15:0][28:0]    out_data
);
  // Lane signals between columns; column s carries 33-s bit words.
  logic [4:0][15:0]       v, r;
  logic [4:0][15:0][32:0] d;

  for (genvar l = 0; l < 16; l++) begin : g_lane_in
    if (l < N_IN) begin : g_used
      assign v[0][l]     = in_valid[l];
      assign d[0][l]     = in_data[l];
      assign in_ready[l] = r[0][l];
    end else begin : g_unused
      assign v[0][l] = 1'b0;
      assign d[0][l] = '0;
    end
    assign out_valid[l] = v[4][l];
    assign out_data[l]  = d[4][l][28:0];
    assign r[4][l]      = out_ready[l];
  end

  for (genvar s = 0; s < 4; s++) begin : g_col
    localparam int unsigned B  = 3 - s;          // lane bit set by this column
    localparam int unsigned WI = 33 - s;
    for (genvar k = 0; k < 8; k++) begin : g_sw
      localparam int unsigned LA = ((k >> B) << (B + 1)) | (k & ((1 << B) - 1));
      localparam int unsigned LB = LA | (1 << B);
      logic [1:0][WI-1:0] sw_in;
      logic [1:0][WI-2:0] sw_out;
      assign sw_in[0] = d[s][LA][WI-1:0];
      assign sw_in[1] = d[s][LB][WI-1:0];
      spp_switch2x2 #(.W(WI), .SEL_BIT(16 - s), .FIFO_DEPTH(FIFO_DEPTH)) u_sw (
        .clk, .rst_n,
        .in_valid({v[s][LB], v[s][LA]}), .in_ready({r[s][LB], r[s][LA]}), .in_data(sw_in),
        .out_valid({v[s+1][LB], v[s+1][LA]}), .out_ready({r[s+1][LB], r[s+1][LA]}),
        .out_data(sw_out));
      assign d[s+1][LA] = 33'(sw_out[0]);
      assign d[s+1][LB] = 33'(sw_out[1]);
    end
  end

endmodule
