// tb_gwt_frame_checker: frames built by the reference frame builder pass
// with no error; frames with one flipped data or parity bit are flagged and
// counted.  Also checks the one-cycle latency.
module tb_gwt_frame_checker;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic         in_valid, out_valid, out_err;
  logic [127:0] in_frame;
  logic [119:0] out_spps;
  logic [31:0]  parity_errors;

  gwt_frame_checker #(.CNT_W(32)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][29:0] hist, spp;
    int nbad = 0;
    in_valid = 0; in_frame = 0; hist = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [127:0] f;
      bit bad;
      int pos;
      for (int k = 0; k < 4; k++) spp[k] = 30'($urandom);
      f = make_frame(spp, hist);
      bad = ($urandom % 3) == 0;
      pos = 4 + int'($urandom % 120);                // a bit of SPPs or parity
      if (bad) f[pos] = !f[pos];
      @(negedge clk);
      in_valid = 1; in_frame = f;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_err != bad || out_spps != f[119:0]) begin failures++; if (failures < 4) $display("i=%0d v=%b err=%b bad=%b", i, out_valid, out_err, bad); end
      if (bad) nbad++;
      checks++;
      if (parity_errors != 32'(nbad)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
