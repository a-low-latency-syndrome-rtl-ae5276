// sdld_top: syndrome-based deep-learning decoder for the BCH(63,45) code.
//
// The decoder estimates the channel noise pattern with a compressed neural
// network and flips the bits it marks as wrong. All stages run concurrently
// as a dataflow pipeline:
//
//   s_* -> input FIFO -> sdld_preproc --(ping-pong 0: v = [s, |y|], 81)-->
//          sc_layer 0 (81->300, RELU)  --(ping-pong 1)--> sc_layer 1 ...
//          sc_layer 5 (300->300, RELU) --(ping-pong 6)-->
//          sc_layer 6 (300->63, hard tanh) --(ping-pong 7: z, 63)-->
//          sdld_postproc -> output FIFO -> m_*
//   sdld_preproc -> hard-decision FIFO (63 bits) -> sdld_postproc
//
// Every layer has P processing elements, and up to eight codewords can be in
// flight, one per ping-pong half. A new codeword can enter every
// max(layer time) cycles. The slowest layer takes about 300 cycles plus the
// extra MAC cycles of its busiest PE, plus ceil(300/P) activation cycles.
//
// Interfaces:
//   s_valid/s_data/s_ready : reliabilities, signed FXP-3.5, one per beat,
//                            63 beats per codeword, bit position 0 first
//   m_valid/m_data/m_ready : decoded codeword, bit i = code position i
//   cfg_*                  : loads the trained, pruned and clustered network
//                            (cfg_sel_e in sdld_pkg). Load before decoding.
//                            The network is the output of training, so it
//                            is not built into the RTL.
//
// The event outputs of the layers and post-processing (ev_*) and the FIFO
// fill levels are left for observation in simulation and for optional
// performance counters, so nothing inside the top reads them.
//
// The pipeline, the stage functions, the number formats and the 16 PEs per
// layer follow the design description. The stream and configuration
// interfaces and the FIFO depths are this design's choices.
module sdld_top
  import sdld_pkg::*;
#(
  parameter int P              = 16,
  parameter int IN_FIFO_DEPTH  = 128,
  parameter int HD_FIFO_DEPTH  = 32,
  parameter int OUT_FIFO_DEPTH = 8,
  parameter int PE_FIFO_DEPTH  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             cfg_we,
  input  logic [2:0]       cfg_layer,
  input  cfg_sel_e         cfg_sel,
  input  logic [7:0]       cfg_pe,
  input  logic [15:0]      cfg_addr,
  input  logic [31:0]      cfg_data,
  // reliability stream in
  input  logic             s_valid,
  input  logic [7:0]       s_data,
  output logic             s_ready,
  // decoded codeword stream out
  output logic             m_valid,
  output logic [N-1:0]     m_data,
  input  logic             m_ready
);
  localparam int NPP = LAYERS + 1;

  // ping-pong buffer k sits in front of layer k (k = LAYERS: in front of post-processing)
  logic              pp_wr_ready  [NPP];
  logic [P-1:0]      pp_wr_en     [NPP];
  logic [15:0]       pp_wr_addr   [NPP];
  logic [DATA_W-1:0] pp_wr_data   [NPP][P];
  logic              pp_wr_commit [NPP];
  logic              pp_rd_valid  [NPP];
  logic [15:0]       pp_rd_idx    [NPP];
  logic [DATA_W-1:0] pp_rd_data   [NPP];
  logic              pp_rd_release[NPP];
  logic [3:0]        frac         [NPP];

  // ---------------- input FIFO ----------------
  logic              rx_valid, rx_ready;
  logic [7:0]        rx_data;
  logic [$clog2(IN_FIFO_DEPTH+1)-1:0] rx_count;

  sync_fifo #(.WIDTH(8), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid (s_valid), .in_data (s_data), .in_ready (s_ready),
    .out_valid(rx_valid), .out_data(rx_data), .out_ready(rx_ready),
    .count    (rx_count)
  );

  // ---------------- pre-processing ----------------
  localparam int PP0_DEPTH = (ANN_IN + P - 1) / P;
  localparam int PP0_AW    = (PP0_DEPTH > 1) ? $clog2(PP0_DEPTH) : 1;
  logic              hd_in_valid, hd_in_ready;
  logic [N-1:0]      hd_in_data;
  logic [PP0_AW-1:0] pre_wr_addr;

  sdld_preproc #(.N(N), .M(M), .LANES(P)) u_pre (
    .clk, .rst_n,
    .s_valid  (rx_valid), .s_data (rx_data), .s_ready (rx_ready),
    .wr_ready (pp_wr_ready[0]),
    .wr_en    (pp_wr_en[0]),
    .wr_addr  (pre_wr_addr),
    .wr_data  (pp_wr_data[0]),
    .wr_commit(pp_wr_commit[0]),
    .hd_valid (hd_in_valid), .hd_data (hd_in_data), .hd_ready (hd_in_ready)
  );
  assign pp_wr_addr[0] = 16'(pre_wr_addr);
  assign frac[0]       = 4'(IN_FRAC);

  // ---------------- hard-decision FIFO ----------------
  logic              hd_valid, hd_pop;
  logic [N-1:0]      hd_data;
  logic [$clog2(HD_FIFO_DEPTH+1)-1:0] hd_count;

  sync_fifo #(.WIDTH(N), .DEPTH(HD_FIFO_DEPTH)) u_hd_fifo (
    .clk, .rst_n,
    .in_valid (hd_in_valid), .in_data (hd_in_data), .in_ready (hd_in_ready),
    .out_valid(hd_valid), .out_data(hd_data), .out_ready(hd_pop),
    .count    (hd_count)
  );

  // ---------------- ping-pong buffers ----------------
  for (genvar k = 0; k < NPP; k++) begin : g_pp
    localparam int ELEMS = (k == 0) ? ANN_IN : layer_out(k - 1);
    localparam int DEPTH = (ELEMS + P - 1) / P;
    localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    localparam int IW    = $clog2(P * DEPTH);

    pingpong_buf #(.LANES(P), .DEPTH(DEPTH), .DATA_W(DATA_W)) u_pp (
      .clk, .rst_n,
      .wr_ready  (pp_wr_ready[k]),
      .wr_en     (pp_wr_en[k]),
      .wr_addr   (pp_wr_addr[k][AW-1:0]),
      .wr_data   (pp_wr_data[k]),
      .wr_commit (pp_wr_commit[k]),
      .rd_valid  (pp_rd_valid[k]),
      .rd_idx    (pp_rd_idx[k][IW-1:0]),
      .rd_data   (pp_rd_data[k]),
      .rd_release(pp_rd_release[k])
    );
  end

  // ---------------- sparsely connected layers ----------------
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int   NI    = layer_in(l);
    localparam int   NO    = layer_out(l);
    localparam act_e A     = (l == LAYERS - 1) ? ACT_HTANH : ACT_RELU;
    localparam int   ROWS  = (NO + P - 1) / P;
    localparam int   ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
    localparam int   COL_W = $clog2(NI);

    logic [COL_W-1:0] idx;
    logic [ROW_W-1:0] waddr;
    logic [P-1:0]     ev_mac, ev_sat;
    logic             ev_skip, ev_stall, ev_out_wait;

    sc_layer #(.N_IN(NI), .N_OUT(NO), .P(P), .ACT(A), .FIFO_DEPTH(PE_FIFO_DEPTH)) u_layer (
      .clk, .rst_n,
      .cfg_we     (cfg_we && (cfg_layer == 3'(l))),
      .cfg_sel, .cfg_pe, .cfg_addr, .cfg_data,
      .in_frac    (frac[l]),
      .out_frac   (frac[l + 1]),
      .in_valid   (pp_rd_valid[l]),
      .in_idx     (idx),
      .in_data    (pp_rd_data[l]),
      .in_release (pp_rd_release[l]),
      .out_ready  (pp_wr_ready[l + 1]),
      .out_wr_en  (pp_wr_en[l + 1]),
      .out_wr_addr(waddr),
      .out_wr_data(pp_wr_data[l + 1]),
      .out_commit (pp_wr_commit[l + 1]),
      .ev_mac, .ev_sat, .ev_skip, .ev_stall, .ev_out_wait
    );
    assign pp_rd_idx[l]      = 16'(idx);
    assign pp_wr_addr[l + 1] = 16'(waddr);
  end

  // ---------------- post-processing ----------------
  logic              dec_valid, dec_ready, ev_flip;
  logic [N-1:0]      dec_data;
  logic [$clog2(N)-1:0] post_idx;
  logic [$clog2(OUT_FIFO_DEPTH+1)-1:0] tx_count;

  sdld_postproc #(.N(N)) u_post (
    .clk, .rst_n,
    .rd_valid  (pp_rd_valid[LAYERS]),
    .rd_idx    (post_idx),
    .rd_data   (pp_rd_data[LAYERS]),
    .rd_release(pp_rd_release[LAYERS]),
    .hd_valid, .hd_data, .hd_pop,
    .out_valid (dec_valid), .out_data (dec_data), .out_ready (dec_ready),
    .ev_flip
  );
  assign pp_rd_idx[LAYERS] = 16'(post_idx);

  // ---------------- output FIFO ----------------
  sync_fifo #(.WIDTH(N), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid (dec_valid), .in_data (dec_data), .in_ready (dec_ready),
    .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready),
    .count    (tx_count)
  );

endmodule
