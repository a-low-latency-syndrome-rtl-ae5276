// tb_pingpong_buf: fills vectors lane-parallel and reads them back by element
// index. The producer runs ahead, so both halves fill and wr_ready drops.
// Checks every element, the order of the vectors and the
// wr_ready / rd_valid flags.
module tb_pingpong_buf;
  localparam int L = 4, D = 3, E = 11;   // 11 elements in 4 lanes x 3 rows
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_ready, wr_commit = 0, rd_valid, rd_release = 0;
  logic [L-1:0] wr_en = '0;
  logic [1:0] wr_addr = '0;
  logic [7:0] wr_data [L];
  logic [3:0] rd_idx = '0;
  logic [7:0] rd_data;
  int vec_w = 0, vec_r = 0, full_seen = 0;

  pingpong_buf #(.LANES(L), .DEPTH(D), .DATA_W(8)) dut (.*);

  function automatic logic [7:0] val(int v, int e);
    return 8'(v * 37 + e * 5 + 1);
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    foreach (wr_data[l]) wr_data[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      while (!wr_ready) begin full_seen++; @(negedge clk); end
      for (int r = 0; r < D; r++) begin
        wr_addr = 2'(r);
        for (int l = 0; l < L; l++) begin
          wr_en[l]   = (r * L + l < E);
          wr_data[l] = val(v, r * L + l);
        end
        wr_commit = (r == D - 1);
        @(negedge clk);
      end
      wr_en = '0; wr_commit = 0;
      vec_w++;
    end
  end

  // consumer: slow, so the producer fills both halves
  initial begin
    @(posedge rst_n);
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      while (!rd_valid) @(negedge clk);
      repeat (6) @(negedge clk);
      for (int e = 0; e < E; e++) begin
        rd_idx = 4'(e);
        #1;
        check(rd_data == val(v, e), $sformatf("vector %0d element %0d", v, e));
        rd_release = (e == E - 1);
        @(negedge clk);
      end
      rd_release = 0;
      vec_r++;
    end
    @(negedge clk);
    check(!rd_valid && wr_ready, "empty after all vectors");
    check(full_seen > 0, "both halves full at least once");
    check(vec_w == 8 && vec_r == 8, "all vectors passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
