// tb_spp_router: random SPPs with random timestamps on all ten inputs, with
// random back-pressure on the 16 lanes.  Every SPP must arrive on the lane
// equal to its four timestamp MSBs, with those bits removed, in order per
// input, and none may be lost.  Also follows one SPP with MSBs 1010 to
// lane 10.
module tb_spp_router;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int N = 10;
  logic [N-1:0]       in_valid, in_ready;
  logic [N-1:0][32:0] in_data;
  logic [15:0]        out_valid, out_ready;
  logic [15:0][28:0]  out_data;

  spp_router #(.N_IN(N), .FIFO_DEPTH(4)) dut (.*);

  logic [28:0] q[N][16][$];
  int          hd[N][16];
  int          sent = 0, recv = 0;

  function automatic logic [28:0] expect_word(input logic [32:0] d);
    return {d[32:17], d[12:0]};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_ready[i]) begin
        q[i][in_data[i][16:13]].push_back(expect_word(in_data[i]));
        sent++;
      end
    for (int l = 0; l < 16; l++)
      if (out_valid[l] && out_ready[l]) begin
        bit ok;
        ok = 0;
        for (int i = 0; i < N; i++)
          if (!ok && q[i][l].size() > hd[i][l] && q[i][l][hd[i][l]] == out_data[l]) begin
            hd[i][l]++;
            ok = 1;
          end
        checks++;
        if (!ok) failures++;
        recv++;
      end
  end

  initial begin
    int left;
    for (int i = 0; i < N; i++) for (int l = 0; l < 16; l++) hd[i][l] = 0;
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom % 3) == 0;
          in_data[i]  = {1'($urandom), $urandom};
        end
      out_ready = 16'($urandom) | 16'($urandom);
    end
    @(negedge clk);
    in_valid = 0; out_ready = '1;
    repeat (60) @(negedge clk);
    left = 0;
    for (int i = 0; i < N; i++) for (int l = 0; l < 16; l++) left += q[i][l].size() - hd[i][l];
    checks++;
    if (sent != recv || left != 0 || sent < 5000) failures++;
    // the SPP of the example: timestamp MSBs 1010 reach lane 10
    @(negedge clk);
    in_valid[9] = 1; in_data[9] = {3'd1, 7'd3, 6'd4, 4'b1010, 5'd7, 8'h81};
    @(negedge clk);
    in_valid = 0;
    for (int c = 0; c < 20 && !out_valid[10]; c++) @(negedge clk);
    checks++;
    if (!out_valid[10] || out_data[10] != {3'd1, 7'd3, 6'd4, 5'd7, 8'h81}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
