// tb_spp_switch2x2: random SPPs on both inputs with random back-pressure.
// Every SPP must leave on the output named by its routing bit, with that
// bit removed, in order per input/output pair, and none may be lost.  A
// phase with no contention checks that two SPPs cross per cycle.
module tb_spp_switch2x2;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int W = 33, SB = 16;
  logic [1:0]         in_valid, in_ready, out_valid, out_ready;
  logic [1:0][W-1:0]  in_data;
  logic [1:0][W-2:0]  out_data;

  spp_switch2x2 #(.W(W), .SEL_BIT(SB), .FIFO_DEPTH(4)) dut (.*);

  logic [W-2:0] q[2][2][$];     // q[input][output], read from head index hd
  int           hd[2][2] = '{'{0, 0}, '{0, 0}};
  int sent = 0, recv = 0;

  function automatic logic [W-2:0] drop_bit(input logic [W-1:0] d);
    return {d[W-1:SB+1], d[SB-1:0]};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++)
      if (in_valid[i] && in_ready[i]) begin
        q[i][in_data[i][SB]].push_back(drop_bit(in_data[i]));
        sent++;
      end
    for (int o = 0; o < 2; o++)
      if (out_valid[o] && out_ready[o]) begin
        bit ok;
        ok = 0;
        for (int i = 0; i < 2; i++)
          if (!ok && q[i][o].size() > hd[i][o] && q[i][o][hd[i][o]] == out_data[o]) begin
            hd[i][o]++;
            ok = 1;
          end
        checks++;
        if (!ok) failures++;
        recv++;
      end
  end

  int ncyc, nrecv0;
  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom % 2) != 0;
          in_data[i]  = {1'($urandom), $urandom};
        end
      end
      out_ready = 2'($urandom);
    end
    @(negedge clk);
    in_valid = 0; out_ready = 2'b11;
    repeat (30) @(negedge clk);
    checks++;
    if (sent != recv || sent < 1000) failures++;
    // no contention: input 0 -> output 0, input 1 -> output 1, all ready
    nrecv0 = recv;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      in_valid = 2'b11;
      in_data[0] = {1'($urandom), $urandom}; in_data[0][SB] = 1'b0;
      in_data[1] = {1'($urandom), $urandom}; in_data[1][SB] = 1'b1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (recv - nrecv0 != 200) failures++;
    if (q[0][0].size() + q[0][1].size() + q[1][0].size() + q[1][1].size() != hd[0][0] + hd[0][1] + hd[1][0] + hd[1][1]) failures++;
    if (q[0][0].size() + q[0][1].size() + q[1][0].size() + q[1][1].size() != hd[0][0] + hd[0][1] + hd[1][0] + hd[1][1]) begin failures++; $display("%0d %0d %0d %0d / %0d %0d %0d %0d", q[0][0].size(), q[0][1].size(), q[1][0].size(), q[1][1].size(), hd[0][0], hd[0][1], hd[1][0], hd[1][1]); $display("FAIL line %0d", `__LINE__); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
