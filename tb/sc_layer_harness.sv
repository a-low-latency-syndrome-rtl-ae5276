// sc_layer_harness: drives one sc_layer with random sparse weights and
// vectors and checks its outputs against the integer reference model.
// The input ping-pong buffer is modelled as always holding the next vector,
// and the output buffer as a write-capture array whose free half comes and
// goes. It checks every output element, the release and commit per vector,
// and the layer time. With the output always free the layer time must stay
// within N_IN + (busiest PE's cycles) + ROWS + 3, where a PE spends
// max(1, stored weights) cycles on each non-zero input.
module sc_layer_harness
  import sdld_pkg::*;
  import sdld_ref_pkg::*;
#(
  parameter int   NI  = 40,
  parameter int   NO  = 22,
  parameter int   P   = 4,
  parameter act_e ACT = ACT_RELU,
  parameter int   NV  = 6,
  parameter int   NNZ_ROW = NI / 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   skips,
  output int   stalls,
  output int   sats,
  output bit   done
);
  localparam int ROWS = (NO + P - 1) / P;
  localparam int COL_W = $clog2(NI);
  localparam int ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_COLPTR;
  logic [7:0] cfg_pe = '0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic [3:0] in_frac = 4'd4, out_frac;
  logic in_valid = 0, in_release, out_ready = 0, out_commit;
  logic [COL_W-1:0] in_idx;
  logic [7:0] in_data;
  logic [P-1:0] out_wr_en, ev_mac, ev_sat;
  logic [ROW_W-1:0] out_wr_addr;
  logic [7:0] out_wr_data [P];
  logic ev_skip, ev_stall, ev_out_wait;

  sc_layer #(.N_IN(NI), .N_OUT(NO), .P(P), .ACT(ACT), .FIFO_DEPTH(4), .NNZ_MAX(((NO + P - 1) / P) * NNZ_ROW)) dut (.*);

  int u [NI];
  int got [ROWS * P];
  int commits = 0, releases = 0;
  assign in_data = 8'(u[in_idx]);

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < P; l++) if (out_wr_en[l]) got[int'(out_wr_addr) * P + l] = int'(out_wr_data[l]);
    if (out_commit) commits++;
    if (in_release) releases++;
    if (ev_skip) skips++;
    if (ev_stall) stalls++;
    for (int l = 0; l < P; l++) if (ev_sat[l]) sats++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL(%s): %s", ACT.name(), msg); end
  endtask

  task automatic cfg(cfg_sel_e s, int pe, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_pe = 8'(pe); cfg_addr = 16'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    ref_layer m;
    int ptr[], ent[$], work[P];
    checks = 0; failures = 0; skips = 0; stalls = 0; sats = 0; done = 0;
    m = new(NI, NO, ACT == ACT_HTANH);
    m.random_fill(NNZ_ROW, 1 << 21);
    @(posedge rst_n);
    for (int p = 0; p < P; p++) begin
      m.csc(P, p, ptr, ent);
      for (int j = 0; j <= NI; j++) cfg(CFG_COLPTR, p, j, ptr[j]);
      foreach (ent[k]) cfg(CFG_NZ, p, k, ent[k]);
      for (int r = 0; r * P + p < NO; r++) cfg(CFG_BIAS, p, r, m.bias[r * P + p]);
    end
    for (int c = 0; c < 64; c++) cfg(CFG_LUT, 0, c, m.lut[c] & 255);
    cfg(CFG_FRAC, 0, 0, 3);
    check(out_frac == ((ACT == ACT_HTANH) ? 4'd7 : 4'd3), "output format register");
    for (int v = 0; v < NV; v++) begin
      int o[], t0, t1, bound, c0;
      for (int j = 0; j < NI; j++) u[j] = ($urandom_range(1) == 0) ? 0 : int'($urandom_range(255, 1));
      in_frac = 4'(3 + v % 3);
      m.compute(u, int'(in_frac), int'(out_frac), o);
      bound = 0;
      for (int p = 0; p < P; p++) begin
        m.csc(P, p, ptr, ent);
        work[p] = 0;
        for (int j = 0; j < NI; j++) if (u[j] != 0) work[p] += (ptr[j + 1] - ptr[j] > 0) ? ptr[j + 1] - ptr[j] : 1;
        if (work[p] > bound) bound = work[p];
      end
      bound += NI + ROWS + 3;
      foreach (got[e]) got[e] = -999;
      c0 = commits;
      @(negedge clk);
      in_valid = 1;
      out_ready = (v % 2 == 0);
      t0 = $time / 10;
      while (!in_release) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      if (!out_ready) begin
        repeat (20) @(negedge clk);
        check(commits == c0 && ev_out_wait, "waits for a free output half");
        out_ready = 1;
      end
      while (commits == c0) @(negedge clk);
      t1 = $time / 10;
      if (v % 2 == 0) check(t1 - t0 <= bound, $sformatf("layer time %0d > bound %0d", t1 - t0, bound));
      check(t1 - t0 >= NI + ROWS, "layer time at least scan + activation");
      for (int i = 0; i < NO; i++) begin
        int g;
        g = (ACT == ACT_HTANH) ? int'($signed(8'(got[i]))) : got[i];
        check(g == o[i], $sformatf("vector %0d output %0d: %0d vs %0d", v, i, g, o[i]));
      end
    end
    check(releases == NV && commits == NV, "one release and one commit per vector");
    done = 1;
  end
endmodule
