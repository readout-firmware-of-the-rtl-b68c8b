// gwt_link_decoder: the deserialisation and decoding chain of one GWT link.
//
// 32-bit transceiver words -> word alignment (header search, bit slip,
// lock) -> parity check -> descrambling.  The output is one descrambled
// frame (four SPPs, SPP 3 in the top bits) per 40 MHz bunch crossing while
// the link is locked and the frame is error free.  Losing lock clears the
// descrambler so that its history is refilled before data flows again.
// Latency: 3 cycles from the last word of a frame to out_valid.
module gwt_link_decoder #(
  parameter int unsigned LOCK_FRAMES   = 16,
  parameter int unsigned UNLOCK_FRAMES = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_valid,
  input  logic [31:0]  rx_word,
  output logic         out_valid,
  output logic [119:0] out_spps,
  output logic         locked,
  output logic [15:0]  lock_losses,
  output logic [31:0]  parity_errors
);
  logic         f_valid, c_valid, c_err;
  logic [127:0] f_frame;
  logic [119:0] c_spps;

  gwt_word_aligner #(.LOCK_FRAMES(LOCK_FRAMES), .UNLOCK_FRAMES(UNLOCK_FRAMES)) u_align (
    .clk, .rst_n, .rx_valid, .rx_word,
    .frame_valid(f_valid), .frame(f_frame), .locked, .lock_losses);

  gwt_frame_checker #(.CNT_W(32)) u_check (
    .clk, .rst_n, .in_valid(f_valid), .in_frame(f_frame),
    .out_valid(c_valid), .out_err(c_err), .out_spps(c_spps), .parity_errors);

  gwt_descrambler u_desc (
    .clk, .rst_n, .clear(!locked), .in_valid(c_valid), .in_err(c_err), .in_spps(c_spps),
    .out_valid, .out_spps);

endmodule
