// tb_gwt_descrambler: random SPPs scrambled bit by bit by the reference
// scrambler come back unchanged from the second frame on; the first frame
// only fills the history; frames flagged bad are not passed on but still
// keep the descrambler in step.
module tb_gwt_descrambler;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic         clear, in_valid, in_err, out_valid;
  logic [119:0] in_spps, out_spps;

  gwt_descrambler dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][29:0] hist, spp;
    clear = 0; in_valid = 0; in_err = 0; in_spps = 0;
    for (int k = 0; k < 4; k++) hist[k] = 30'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [127:0] f;
      bit err;
      for (int k = 0; k < 4; k++) spp[k] = 30'($urandom);
      f = make_frame(spp, hist);
      err = (i > 0) && ($urandom % 5 == 0);
      @(negedge clk);
      in_valid = 1; in_spps = f[119:0]; in_err = err;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (i == 0 || err) begin
        if (out_valid) failures++;
      end else if (!out_valid || out_spps != spp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
