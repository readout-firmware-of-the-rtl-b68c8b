// sync_fifo: single-clock first-in first-out buffer with valid/ready ports.
//
// A register array of DEPTH words with a read and a write pointer and an
// occupancy count.  Data written in one cycle is visible at the output in
// the next.  in_ready is low when full; out_valid is low when empty.  A push
// and a pop may happen in the same cycle.  The switching blocks, link inputs
// and the TFC metadata buffer use it; depth and style are this design's
// choice.  DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  // The occupancy can never exceed the depth.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
