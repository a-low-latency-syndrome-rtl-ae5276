// tb_sync_fifo: random push/pop traffic against a queue model. Checks data
// order, full/empty flags and the fill count, including simultaneous push and
// pop, full and empty.
module tb_sync_fifo;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] q[$];
  int fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: mostly push, mostly pop, mixed
      in_valid  = ($urandom_range(99) < ((t / 500) % 2 ? 30 : 75));
      out_ready = ($urandom_range(99) < ((t / 500) % 2 ? 75 : 30));
      in_data   = W'($urandom);
      #1;
      check(int'(count) == q.size(), "count");
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == D) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid) check(out_data == q[0], "data order");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    check(fulls > 0 && empties > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
