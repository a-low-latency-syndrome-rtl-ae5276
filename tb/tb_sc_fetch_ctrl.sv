// tb_sc_fetch_ctrl: drives the fetch/control unit with sparse input vectors
// and a model of P PE queues that drain at random. Checks that exactly the
// non-zero inputs reach the PEs, in column order and with their values, and
// that pushes wait for room. It checks one release per vector, that
// activation starts only when all PEs are idle and the output half is free,
// rows 0..ROWS-1 with the commit on the last, and the scan time of
// N_IN + stall cycles.
module tb_sc_fetch_ctrl;
  localparam int NI = 20, R = 3, P = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_release, pe_push, out_ready = 0, act_en, out_commit;
  logic ev_skip, ev_stall, ev_out_wait;
  logic [4:0] in_idx, pe_col;
  logic [7:0] in_data, pe_val;
  logic [P-1:0] pe_ready, pe_idle;
  logic [1:0] act_row;
  int u [NI];
  int pend [P];
  int pushed_col[$], pushed_val[$];
  int n_stall = 0, n_skip = 0, n_wait = 0, releases = 0, rows_seen[$], commits = 0;
  bit bad_act = 0;

  sc_fetch_ctrl #(.N_IN(NI), .ROWS(R), .P(P)) dut (.*);

  assign in_data = 8'(u[in_idx]);
  always_comb for (int p = 0; p < P; p++) begin
    pe_ready[p] = (pend[p] < 3);
    pe_idle[p]  = (pend[p] == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (pe_push) begin pushed_col.push_back(int'(pe_col)); pushed_val.push_back(int'(pe_val)); end
    if (ev_stall) n_stall++;
    if (ev_skip) n_skip++;
    if (ev_out_wait) n_wait++;
    if (in_release) releases++;
    if (act_en) begin
      rows_seen.push_back(int'(act_row));
      if (!(&pe_idle) || pend[0] != 0) bad_act = 1;
    end
    if (out_commit) commits++;
    for (int p = 0; p < P; p++) begin
      if (pend[p] > 0 && $urandom_range(3) == 0) pend[p] = pend[p] - 1;
      if (pe_push) pend[p] = pend[p] + 1;
    end
  end

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
    foreach (pend[p]) pend[p] = 0;
    foreach (u[j]) u[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 4; v++) begin
      int nz[$], t0, t1, s0, k0;
      nz.delete();
      for (int j = 0; j < NI; j++) begin
        u[j] = ($urandom_range(1) == 0) ? 0 : int'($urandom_range(255, 1));
        if (u[j] != 0) nz.push_back(j);
      end
      pushed_col.delete(); pushed_val.delete(); rows_seen.delete();
      s0 = n_stall; k0 = n_skip;
      @(negedge clk);
      in_valid = 1;
      t0 = $time / 10;
      while (!in_release) begin @(negedge clk); end
      t1 = $time / 10;
      @(negedge clk);
      in_valid = 0;
      check(t1 - t0 + 1 == NI + (n_stall - s0), $sformatf("scan cycles %0d", t1 - t0 + 1));
      check(n_skip - k0 == NI - nz.size(), $sformatf("zeros skipped %0d vs %0d, pushes %0d", n_skip - k0, NI - nz.size(), pushed_col.size()));
      check(pushed_col.size() == nz.size(), "one push per non-zero input");
      foreach (nz[k]) if (k < pushed_col.size()) begin
        check(pushed_col[k] == nz[k] && pushed_val[k] == u[nz[k]], "pushed column and value");
      end
      // output half busy for a while
      repeat (30) @(negedge clk);
      check(!act_en, "no activation while output half busy");
      out_ready = 1;
      while (commits == v) @(negedge clk);
      out_ready = 0;
      check(rows_seen.size() == R, "one activation cycle per row");
      foreach (rows_seen[k]) check(rows_seen[k] == k, "row order");
    end
    check(releases == 4, "one release per vector");
    check(!bad_act, "activation only after PEs drain");
    check(n_stall > 0 && n_wait > 0, "stall and output wait exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
