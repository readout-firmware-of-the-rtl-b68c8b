// gwt_frame_checker: parity check of aligned GWT frames.
//
// Each of the four parity bits [123:120] is compared with the XOR of the 30
// scrambled bits of its SPP (bit 120+i covers SPP i; the parity equation is
// this design's choice).  A frame that fails is marked invalid with
// `out_err` so that the descrambler can still advance its history and then
// drop it, and a saturating error counter is incremented for monitoring.
// No error threshold is applied here: the acceptable error rate is left to
// the monitoring system.
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
module gwt_frame_checker #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [127:0]     in_frame,
  output logic             out_valid,
  output logic             out_err,
  output logic [119:0]     out_spps,
  output logic [CNT_W-1:0] parity_errors
);
  logic [3:0] par_calc;
  logic       bad;

  always_comb begin
    for (int i = 0; i < 4; i++) par_calc[i] = ^in_frame[30*i +: 30];
    bad = (par_calc != in_frame[123:120]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_err       <= 1'b0;
      out_spps      <= '0;
      parity_errors <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_err  <= bad;
        out_spps <= in_frame[119:0];
        if (bad && parity_errors != '1) parity_errors <= parity_errors + 1'b1;
      end
    end
  end

endmodule
