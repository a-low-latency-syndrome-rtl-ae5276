// tb_sc_pe: loads a random sparse sub-matrix in CSC form into one PE, streams
// the non-zero inputs of random vectors and compares every accumulator+bias
// with a dense integer reference. Also checks one MAC cycle per stored
// weight of the visited columns, the clear on read-out, and back-pressure
// from the small input FIFO.
module tb_sc_pe;
  import sdld_pkg::*;
  import sdld_ref_pkg::*;
  localparam int NI = 12, R = 3, NNZ = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_COLPTR;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic in_valid = 0, in_ready, idle, mac_fire, rd_clr = 0;
  logic [3:0] in_col = '0, in_frac = 4'd5;
  logic [7:0] in_val = '0;
  logic [1:0] rd_row = '0;
  logic signed [32:0] rd_sum;
  int macs = 0, full_seen = 0;

  sc_pe #(.N_IN(NI), .ROWS(R), .NNZ_MAX(NNZ), .FIFO_DEPTH(2)) dut (.*);

  always @(posedge clk) begin
    if (mac_fire) macs++;
    if (in_valid && !in_ready) full_seen++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cfg(cfg_sel_e s, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = 16'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_layer m;
    int ptr[], ent[$];
    m = new(NI, R, 0);
    m.random_fill(5, 1 << 22);
    for (int j = 0; j < 3; j++) for (int r = 0; r < R; r++)
      if (m.widx[r][j] < 0) m.widx[r][j] = int'($urandom_range(63));
    m.widx[0][3] = -1; m.widx[1][3] = -1; m.widx[2][3] = -1;   // an empty column
    m.csc(1, 0, ptr, ent);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j <= NI; j++) cfg(CFG_COLPTR, j, ptr[j]);
    foreach (ent[k]) cfg(CFG_NZ, k, ent[k]);
    for (int c = 0; c < 64; c++) cfg(CFG_LUT, c, m.lut[c] & 255);
    for (int r = 0; r < R; r++) cfg(CFG_BIAS, r, m.bias[r]);
    for (int v = 0; v < 12; v++) begin
      int u [NI];
      longint expct [R];
      int m0, n_ent;
      in_frac = 4'(3 + v % 4);
      n_ent = 0;
      for (int j = 0; j < NI; j++) begin
        u[j] = ($urandom_range(2) == 0) ? 0 : int'($urandom_range(255, 1));
        if (j == 3 || j < 3) u[j] = 77 + j;
        if (u[j] != 0) n_ent += ptr[j + 1] - ptr[j];
      end
      for (int r = 0; r < R; r++) begin
        expct[r] = m.bias[r];
        for (int j = 0; j < NI; j++)
          if (m.widx[r][j] >= 0) expct[r] += longint'(u[j]) * m.lut[m.widx[r][j]] * (longint'(1) << (15 - int'(in_frac)));
      end
      m0 = macs;
      for (int j = 0; j < NI; j++) if (u[j] != 0) begin
        @(negedge clk);
        in_valid = 1; in_col = 4'(j); in_val = 8'(u[j]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      in_valid = 0;
      while (!idle) @(negedge clk);
      check(macs - m0 == n_ent, $sformatf("MAC cycles %0d vs %0d", macs - m0, n_ent));
      for (int r = 0; r < R; r++) begin
        rd_row = 2'(r); rd_clr = 1;
        #1;
        check(longint'(rd_sum) == expct[r], $sformatf("row %0d sum %0d vs %0d", r, rd_sum, expct[r]));
        @(negedge clk);
      end
      rd_clr = 0;
      for (int r = 0; r < R; r++) begin
        rd_row = 2'(r); #1;
        check(longint'(rd_sum) == m.bias[r], "cleared to bias");
      end
    end
    check(full_seen > 0, "FIFO back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
