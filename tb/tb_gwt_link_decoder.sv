// tb_gwt_link_decoder: a full GWT link, serialised to 32-bit words with a
// random bit offset.  After lock, every error-free frame must come out
// descrambled and in order; frames with a parity error must be dropped and
// counted.
module tb_gwt_link_decoder;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic         rx_valid, out_valid, locked;
  logic [31:0]  rx_word;
  logic [119:0] out_spps;
  logic [15:0]  lock_losses;
  logic [31:0]  parity_errors;

  gwt_link_decoder #(.LOCK_FRAMES(4), .UNLOCK_FRAMES(4)) dut (.*);

  logic             bits[$];
  logic [119:0]     plain[$];       // expected outputs after lock
  logic [3:0][29:0] hist;
  int               nbad_sent = 0, cyc = 0, last_word_cyc[$];
  bit               inject = 0;

  task automatic push_frame();
    logic [3:0][29:0] spp;
    logic [127:0] f;
    for (int k = 0; k < 4; k++) spp[k] = 30'($urandom);
    f = make_frame(spp, hist);
    if (inject && ($urandom % 4 == 0)) begin
      f[7] ^= 1'b1;
      nbad_sent++;
      plain.push_back('1);
    end else begin
      plain.push_back(spp);
    end
    for (int b = 127; b >= 0; b--) bits.push_back(f[b]);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first = -1, idx = -1, outs = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      outs++;
      if (idx < 0) begin
        for (int i = 0; i < plain.size(); i++) if (plain[i] == out_spps) idx = i;
        checks++;
        if (idx < 0) failures++;
      end else begin
        idx++;
        while (idx < plain.size() && plain[idx] == '1) idx++;
        // the frame right after a dropped one is descrambled with a wrong
        // history, as in any self-synchronising scrambler: not compared
        if (!(idx > 0 && plain[idx-1] == '1)) begin
          checks++;
          if (idx >= plain.size() || plain[idx] != out_spps) failures++;
        end
      end
    end
  end

  initial begin
    int off;
    rx_valid = 0; rx_word = 0;
    for (int k = 0; k < 4; k++) hist[k] = 30'($urandom);
    off = $urandom % 128;
    for (int i = 0; i < off; i++) bits.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      if (locked && i > 2000) inject = 1;
      while (bits.size() < 64) push_frame();
      @(negedge clk);
      rx_valid = 1;
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
    checks++;
    if (!locked || outs < 400) failures++;
    checks++;
    if (parity_errors == 0 || lock_losses != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
