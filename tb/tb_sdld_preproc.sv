// tb_sdld_preproc: streams received words, some of them codewords with a few
// flipped signs, and captures the ping-pong writes. Checks every network input
// element ([syndrome as 0/1.0, |y|]), the hard-decision word, the commit, and
// that a word takes N + ceil(M/LANES) + 1 cycles at full input rate. It also
// checks that input waits while the buffer has no free half.
module tb_sdld_preproc;
  import sdld_ref_pkg::*;
  localparam int N = 63, M = 18, L = 16, DEPTH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid = 0, s_ready, wr_ready = 1, wr_commit, hd_valid, hd_ready = 1;
  logic [7:0] s_data = '0;
  logic [L-1:0] wr_en;
  logic [2:0] wr_addr;
  logic [7:0] wr_data [L];
  logic [N-1:0] hd_data;
  int v [DEPTH * L];
  int commits = 0, blocked = 0;

  sdld_preproc #(.LANES(L)) dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < L; l++) if (wr_en[l]) v[int'(wr_addr) * L + l] = int'(wr_data[l]);
    if (wr_commit) commits++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      int y [N];
      logic [N-1:0] yb;
      logic [17:0] syn;
      int t0, t1, c0;
      // a codeword (all-zero message gives all-positive) plus noise
      for (int i = 0; i < N; i++) begin
        y[i] = int'($urandom_range(100)) + 1;
        if ($urandom_range(9) < (w % 3)) y[i] = -y[i];
        if (i == w) y[i] = -128;
        if (i == w + 1) y[i] = 0;
      end
      foreach (v[e]) v[e] = -1;
      if (w == 5) begin
        // no free half for a while
        @(negedge clk); wr_ready = 0; s_valid = 1; s_data = 8'(y[0]);
        repeat (4) begin @(negedge clk); if (!s_ready) blocked++; end
        s_valid = 0;
        wr_ready = 1;
      end
      c0 = commits;
      @(negedge clk);
      t0 = $time / 10;
      for (int i = 0; i < N; i++) begin
        s_valid = 1; s_data = 8'(y[i]);
        #1;
        while (!s_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      s_valid = 0;
      while (commits == c0) @(negedge clk);
      t1 = $time / 10;
      check(t1 - t0 == N + (M + L - 1) / L + 1, $sformatf("cycles per word %0d", t1 - t0));
      for (int i = 0; i < N; i++) yb[i] = (y[i] < 0);
      syn = poly_mod_g(yb);
      for (int i = 0; i < N; i++) check(v[M + i] == ((y[i] < 0) ? -y[i] : y[i]), $sformatf("|y| element %0d", i));
      for (int m = 0; m < M; m++) check(v[m] == (syn[m] ? 32 : 0), $sformatf("syndrome element %0d", m));
      check(hd_data == yb, "hard decision word");
    end
    check(blocked == 4, "input held while buffer busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
