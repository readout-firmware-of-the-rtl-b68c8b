// tb_sync_fifo: random push/pop traffic against a queue model; checks the
// data order, the full/empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [2:0] count;
  logic [7:0] model[$];

  sync_fifo #(.W(8), .DEPTH(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(model.size())) failures++;
      checks++;
      if (in_ready != (model.size() < 4) || out_valid != (model.size() > 0)) failures++;
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) failures++;
      end
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 2) != 0;
      in_data   = 8'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the clock edge
  always @(posedge clk) if (rst_n) begin
    logic do_pop, do_push;
    do_pop  = out_valid && out_ready;
    do_push = in_valid && in_ready;
    if (do_pop) void'(model.pop_front());
    if (do_push) model.push_back(in_data);
  end
endmodule
