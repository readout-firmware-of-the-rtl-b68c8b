// tb_gwt_word_aligner: sends random frames with a random bit offset and
// checks that the aligner locks, that every frame after lock is delivered
// unchanged and in order, that the lock takes LOCK_FRAMES good headers, and
// that UNLOCK_FRAMES bad headers drop it and count a lock loss.
module tb_gwt_word_aligner;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int LOCKF = 4, UNLOCKF = 3;
  logic         rx_valid;
  logic [31:0]  rx_word;
  logic         frame_valid, locked;
  logic [127:0] frame;
  logic [15:0]  lock_losses;

  gwt_word_aligner #(.LOCK_FRAMES(LOCKF), .UNLOCK_FRAMES(UNLOCKF)) dut (.*);

  logic         bits[$];
  logic [127:0] sent[$];
  int           nframes = 0;
  bit           corrupt = 0;

  task automatic push_frame();
    logic [127:0] f;
    f = {$urandom, $urandom, $urandom, $urandom};
    f[127:124] = corrupt ? 4'h5 : 4'hA;
    if (!corrupt) sent.push_back(f);
    else sent.push_back('1);             // placeholder, never expected
    for (int b = 127; b >= 0; b--) bits.push_back(f[b]);
    nframes++;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lock_cycle = -1, cyc = 0, out_idx = -1, good_after_lock = 0;
  int frames_at_lock;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_valid) begin
      if (out_idx < 0) begin
        // first output frame: find it among the sent ones
        for (int i = 0; i < sent.size(); i++) if (sent[i] == frame) out_idx = i;
        checks++;
        if (out_idx < 0) failures++;
      end else begin
        while (out_idx + 1 < sent.size() && sent[out_idx+1] == '1) out_idx++;
        out_idx++;
        checks++;
        if (out_idx >= sent.size() || sent[out_idx] != frame) failures++;
      end
      good_after_lock++;
    end
  end

  initial begin
    int off;
    rx_valid = 0; rx_word = 0;
    off = $urandom % 128;
    for (int i = 0; i < off; i++) bits.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!locked && cyc < 30000) begin
      while (bits.size() < 64) push_frame();
      @(negedge clk);
      rx_valid = 1;
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
    checks++;
    if (!locked) failures++;
    // lock needs LOCKF good frames after alignment: no sooner than that
    checks++;
    if (nframes < LOCKF) failures++;
    // run 40 locked frames
    for (int i = 0; i < 160; i++) begin
      while (bits.size() < 64) push_frame();
      @(negedge clk);
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
    checks++;
    if (!locked || good_after_lock < 35) failures++;
    checks++;
    if (lock_losses != 0) failures++;
    // UNLOCKF-1 bad headers must not unlock
    corrupt = 1;
    for (int k = 0; k < UNLOCKF - 1; k++) push_frame();
    corrupt = 0;
    for (int i = 0; i < 64; i++) begin
      while (bits.size() < 64) push_frame();
      @(negedge clk);
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
    checks++;
    if (!locked || lock_losses != 0) failures++;
    // UNLOCKF bad headers unlock
    corrupt = 1;
    for (int k = 0; k < UNLOCKF + 1; k++) push_frame();
    corrupt = 0;
    for (int i = 0; i < 40; i++) begin
      while (bits.size() < 64) push_frame();
      @(negedge clk);
      for (int b = 31; b >= 0; b--) rx_word[b] = bits.pop_front();
    end
    checks++;
    if (lock_losses != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
