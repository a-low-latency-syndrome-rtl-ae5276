// tb_sdld_top: end-to-end test of the full decoder at its default size
// (BCH(63,45), network 81-300x6-63, 16 PEs per layer).
//
// It builds a random pruned and clustered network, with 10% weight density
// spread evenly over the PEs and 64 centroids per layer, and loads it through
// the configuration port. It then streams noisy BPSK codewords: encoded as
// m(x)*g(x), with Gaussian noise at about Eb/N0 = 4 dB, quantized to FXP-3.5.
// Every decoded word is compared with an integer reference of the whole
// decoder (pre-processing, seven layers, bit flipping).
// Three phases:
//   A  isolated codewords      : latency within 16600 cycles (83 us at 200 MHz)
//   B  back-to-back codewords  : output interval within 2520 cycles (5 Mbit/s
//                                of 63-bit words at 200 MHz)
//   C  output stalled at first : back-pressure through the whole pipeline
// Each mechanism must occur at least once: zero-input skipping, PE FIFO
// stalls, layers waiting for a free output half, saturation, bit flips, and
// back-pressure at the input and the output.
module tb_sdld_top;
  import sdld_pkg::*;
  import sdld_ref_pkg::*;
  localparam int P = 16;
  localparam int LAT_MAX = 16600, INTERVAL_MAX = 2520;
  localparam int NA = 2, NB = 10, NC = 12, NW = NA + NB + NC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic cfg_we = 0;
  logic [2:0] cfg_layer = '0;
  cfg_sel_e cfg_sel = CFG_COLPTR;
  logic [7:0] cfg_pe = '0;
  logic [15:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 1;
  logic [7:0] s_data = '0;
  logic [62:0] m_data;

  sdld_top dut (.*);

  ref_layer net [LAYERS];
  int fracs [LAYERS + 1] = '{5, 5, 4, 4, 3, 3, 2, 7};
  logic [62:0] expected [NW];
  longint t_in [NW], t_out [NW];
  int n_in = 0, n_out = 0;
  int words_sent = 0;

  // mechanism counters
  int ev_skip = 0, ev_stall = 0, ev_wait = 0, ev_sat = 0, ev_flip = 0, ev_in_bp = 0, ev_out_bp = 0;
  for (genvar l = 0; l < LAYERS; l++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_layer[l].ev_skip) ev_skip++;
      if (dut.g_layer[l].ev_stall) ev_stall++;
      if (dut.g_layer[l].ev_out_wait) ev_wait++;
      if (dut.g_layer[l].ev_sat != '0) ev_sat++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.ev_flip) ev_flip++;
    if (s_valid && !s_ready) ev_in_bp++;
    if (m_valid && !m_ready) ev_out_bp++;
    if (m_valid && m_ready) begin
      checks++;
      if (n_out >= NW || m_data != expected[n_out]) begin
        failures++;
        $display("FAIL: decoded word %0d differs", n_out);
      end
      t_out[n_out] = cyc;
      n_out++;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(int l, cfg_sel_e s, int pe, int a, int d);
    cfg_we = 1; cfg_layer = 3'(l); cfg_sel = s; cfg_pe = 8'(pe); cfg_addr = 16'(a); cfg_data = 32'(d);
    @(negedge clk);
  endtask

  // approximately Gaussian, unit variance (sum of 12 uniforms)
  function automatic real gauss();
    real g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom_range(65535)) / 65536.0;
    return g - 6.0;
  endfunction

  // build one noisy word and its reference decoding
  task automatic make_word(int w, output int y[63]);
    logic [44:0] msg;
    logic [62:0] c, yb;
    logic [17:0] syn;
    int v[], o[];
    msg = {$urandom, $urandom};
    c = '0;
    for (int i = 0; i < 45; i++) if (msg[i]) c ^= 63'(G) << i;
    for (int i = 0; i < 63; i++) begin
      real r = (c[i] ? -1.0 : 1.0) + 0.53 * gauss();
      int q = int'($floor(r * 32.0 + 0.5));
      y[i] = (q > 127) ? 127 : (q < -128) ? -128 : q;
      yb[i] = (y[i] < 0);
    end
    syn = poly_mod_g(yb);
    v = new[ANN_IN];
    for (int m = 0; m < M; m++) v[m] = syn[m] ? 32 : 0;
    for (int i = 0; i < 63; i++) v[M + i] = (y[i] < 0) ? -y[i] : y[i];
    for (int l = 0; l < LAYERS; l++) begin
      net[l].compute(v, fracs[l], fracs[l + 1], o);
      v = o;
    end
    expected[w] = yb;
    for (int i = 0; i < 63; i++) if (v[i] < 0) expected[w][i] = ~yb[i];
  endtask

  task automatic send_word(int w);
    int y[63];
    make_word(w, y);
    for (int i = 0; i < 63; i++) begin
      s_valid = 1; s_data = 8'(y[i]);
      #1;
      while (!s_ready) begin @(negedge clk); #1; end
      if (i == 0) t_in[w] = cyc;
      @(negedge clk);
    end
    s_valid = 0;
  endtask

  initial begin
    int ptr[], ent[$];
    longint lat_max = 0, ivl_max = 0;
    for (int l = 0; l < LAYERS; l++) begin
      net[l] = new(layer_in(l), layer_out(l), l == LAYERS - 1);
      net[l].random_fill(layer_in(l) / 10, 1 << 21);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // load the network
    for (int l = 0; l < LAYERS; l++) begin
      for (int p = 0; p < P; p++) begin
        net[l].csc(P, p, ptr, ent);
        for (int j = 0; j <= layer_in(l); j++) cfg(l, CFG_COLPTR, p, j, ptr[j]);
        foreach (ent[k]) cfg(l, CFG_NZ, p, k, ent[k]);
        for (int r = 0; r * P + p < layer_out(l); r++) cfg(l, CFG_BIAS, p, r, net[l].bias[r * P + p]);
      end
      for (int c = 0; c < 64; c++) cfg(l, CFG_LUT, 0, c, net[l].lut[c] & 255);
      if (l < LAYERS - 1) cfg(l, CFG_FRAC, 0, 0, fracs[l + 1]);
    end
    cfg_we = 0;
    $display("network loaded at cycle %0d", cyc);

    // phase A: isolated words, latency
    for (int w = 0; w < NA; w++) begin
      send_word(w);
      while (n_out <= w) @(negedge clk);
      check(t_out[w] - t_in[w] <= LAT_MAX, $sformatf("latency %0d cycles", t_out[w] - t_in[w]));
      if (t_out[w] - t_in[w] > lat_max) lat_max = t_out[w] - t_in[w];
    end
    // phase B: back-to-back words, throughput
    for (int w = NA; w < NA + NB; w++) send_word(w);
    while (n_out < NA + NB) @(negedge clk);
    for (int w = NA + 5; w < NA + NB; w++) begin
      check(t_out[w] - t_out[w - 1] <= INTERVAL_MAX, $sformatf("output interval %0d cycles", t_out[w] - t_out[w - 1]));
      if (t_out[w] - t_out[w - 1] > ivl_max) ivl_max = t_out[w] - t_out[w - 1];
    end
    // phase C: output held, back-pressure
    m_ready = 0;
    fork
      begin
        repeat (15000) @(negedge clk);
        m_ready = 1;
      end
      for (int w = NA + NB; w < NW; w++) send_word(w);
    join
    while (n_out < NW) @(negedge clk);
    repeat (10) @(negedge clk);
    check(n_out == NW, "every word decoded once");
    $display("latency %0d cycles, steady output interval %0d cycles", lat_max, ivl_max);
    $display("events: skip %0d stall %0d out_wait %0d sat %0d flip %0d in_bp %0d out_bp %0d",
             ev_skip, ev_stall, ev_wait, ev_sat, ev_flip, ev_in_bp, ev_out_bp);
    check(ev_skip > 0, "zero inputs skipped");
    check(ev_stall > 0, "PE FIFO stall");
    check(ev_wait > 0, "layer waited for output half");
    check(ev_sat > 0, "saturation");
    check(ev_flip > 0, "bits flipped");
    check(ev_in_bp > 0, "input back-pressure");
    check(ev_out_bp > 0, "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
