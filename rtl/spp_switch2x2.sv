// spp_switch2x2: one switching block of the timestamp-sorting router.
//
// Two inputs, two outputs.  Each SPP is steered by one timestamp bit,
// SEL_BIT of its W-bit word: 0 goes to output 0 (upper), 1 to output 1
// (lower).  The bit is removed on the way through, since the output lane
// now encodes it, so outputs are W-1 bits wide.  FIFOs sit on both inputs
// and both outputs to absorb congestion, as the router description asks.
// When both input heads want the same output, a per-output round-robin
// pointer picks one (arbitration is this design's choice); the other waits.
// Up to two SPPs cross per cycle.
//
// Handshakes are valid/ready.  Latency through an idle switch: 2 cycles.
module spp_switch2x2 #(
  parameter int unsigned W          = 33,
  parameter int unsigned SEL_BIT    = 16,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          in_valid,
  output logic [1:0]          in_ready,
  input  logic [1:0][W-1:0]   in_data,
  output logic [1:0]          out_valid,
  input  logic [1:0]          out_ready,
  output logic [1:0][W-2:0]   out_data
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [1:0]         h_valid, h_pop, o_push, o_ready;
  logic [1:0][W-1:0]  h_data;
  logic [1:0][W-2:0]  o_data;
  logic [1:0]         rr;            // per output: input favoured on a tie
  logic [1:0][1:0]    req;           // req[o][i]
  logic [1:0]         gnt_in;        // gnt_in[o]: which input output o takes
  logic [CW-1:0]      cnt_unused [4];

  for (genvar i = 0; i < 2; i++) begin : g_in
    sync_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_data[i]),
      .out_valid(h_valid[i]), .out_ready(h_pop[i]), .out_data(h_data[i]), .count(cnt_unused[i]));
  end

  for (genvar o = 0; o < 2; o++) begin : g_out
    sync_fifo #(.W(W-1), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(o_push[o]), .in_ready(o_ready[o]), .in_data(o_data[o]),
      .out_valid(out_valid[o]), .out_ready(out_ready[o]), .out_data(out_data[o]),
      .count(cnt_unused[2+o]));
  end

  always_comb begin
    h_pop  = '0;
    o_push = '0;
    o_data = '0;
    gnt_in = '0;
    for (int o = 0; o < 2; o++) begin
      for (int i = 0; i < 2; i++) req[o][i] = h_valid[i] && (h_data[i][SEL_BIT] == 1'(o));
      if (req[o] == 2'b11) gnt_in[o] = rr[o];
      else                 gnt_in[o] = req[o][1];
      if (req[o] != 2'b00 && o_ready[o]) begin
        o_push[o]         = 1'b1;
        o_data[o]         = strip(h_data[gnt_in[o]]);
        h_pop[gnt_in[o]]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else
      for (int o = 0; o < 2; o++)
        if (o_push[o] && req[o] == 2'b11) rr[o] <= !gnt_in[o];
  end

  function automatic logic [W-2:0] strip(input logic [W-1:0] d);
    logic [W-2:0] r;
    for (int b = 0; b < W - 1; b++) r[b] = (b < SEL_BIT) ? d[b] : d[b+1];
    return r;
  endfunction

endmodule
