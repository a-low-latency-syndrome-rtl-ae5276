// sdld_pkg: constants and types shared by the syndrome-based neural decoder.
//
// The decoder targets the BCH(63,45) code. Its noise-estimation network has
// seven layers (81 -> 300 x6 -> 63). Each layer keeps 10% of its weights,
// and every kept weight is one of 64 per-layer centroids stored as 8-bit
// FXP-1.7 values. Accumulation is in FXP-10.22. The ANN input is FXP-3.5 and
// the ANN output is FXP-1.7. All of these numbers follow the design
// description. The generator polynomial g(x) is the standard one for this code:
// g(x) = m1(x) m3(x) m5(x) over GF(64) built on x^6 + x + 1.
// The configuration bus that loads the network is this design's own choice.
package sdld_pkg;

  localparam int N        = 63;          // code length
  localparam int K        = 45;          // message length
  localparam int M        = N - K;       // syndrome length (18)
  localparam int ANN_IN   = N + M;       // 81 network inputs
  localparam int HIDDEN   = 300;         // hidden layer width
  localparam int LAYERS   = 7;           // fully connected layers

  localparam int DATA_W   = 8;           // activations and centroids
  localparam int W_FRAC   = 7;           // centroid format FXP-1.7
  localparam int ACC_W    = 32;          // accumulator FXP-10.22
  localparam int ACC_FRAC = 22;
  localparam int IN_FRAC  = 5;           // network input format FXP-3.5
  localparam int OUT_FRAC = 7;           // network output format FXP-1.7
  localparam int CLUSTERS = 64;          // weight clusters per layer
  localparam int CIDX_W   = 6;           // cluster index width
  localparam int DENSITY_PCT = 10;       // non-zero weights after pruning

  // g(x) = x^18 + x^17 + x^16 + x^15 + x^13 + x^11 + x^10 + x^7 + x^6 + x^3 + x + 1
  localparam logic [M:0] BCH_G = 19'h782CF;

  typedef enum logic [0:0] {ACT_RELU, ACT_HTANH} act_e;

  // Memory selected by a configuration write.
  typedef enum logic [2:0] {
    CFG_COLPTR = 3'd0,  // addr = column j (0..N_IN), data = CSC start pointer
    CFG_NZ     = 3'd1,  // addr = entry k, data[5:0] = cluster, data[15:8] = local row
    CFG_LUT    = 3'd2,  // addr = cluster, data[7:0] = centroid (all PEs of the layer)
    CFG_BIAS   = 3'd3,  // addr = local row, data = bias in FXP-10.22
    CFG_FRAC   = 3'd4   // data[3:0] = fraction bits of the layer output
  } cfg_sel_e;

  // Width of layer l (0-based) input and output vectors.
  function automatic int layer_in(int l);
    return (l == 0) ? ANN_IN : HIDDEN;
  endfunction

  function automatic int layer_out(int l);
    return (l == LAYERS - 1) ? N : HIDDEN;
  endfunction

  // Column i of the parity-check matrix: x^i mod g(x).
  function automatic logic [M-1:0] bch_col(int i);
    logic [M-1:0] r;
    r = 1;
    for (int t = 0; t < i; t++) begin
      r = r[M-1] ? ((r << 1) ^ BCH_G[M-1:0]) : (r << 1);
    end
    return r;
  endfunction

endpackage
