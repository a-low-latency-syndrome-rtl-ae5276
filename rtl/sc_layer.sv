// sc_layer: one sparsely connected (SC) layer of the noise-estimation network.
//
// The layer computes phi_i = g(b_i + sum over {j : w_ij != 0, u_j != 0} of
// C[I_ij] * u_j) for N_OUT outputs from N_IN inputs. The weights are pruned to
// 10% density and clustered to 64 centroids. g is RELU in hidden layers and
// hard tanh in the output layer.
//
// The work is split over P processing elements (sc_pe). Output row i belongs
// to PE i mod P, so each PE holds ROWS = ceil(N_OUT/P) rows in CSC form. The
// fetch unit (sc_fetch_ctrl) reads the input vector from the previous
// ping-pong buffer, skips zero inputs and broadcasts each non-zero input to
// all PEs. Once they drain, the P activation units (sc_act_quant) turn row r
// of every PE into lane p, row r of the next ping-pong buffer in one cycle
// per local row.
//
// Timing per vector: N_IN scan cycles, or more when the PE FIFOs fill because
// the busiest PE needs more MAC cycles. A few drain cycles follow, then ROWS
// activation cycles.
//
// Configuration: cfg_pe selects the PE for column pointers, non-zero entries
// and biases. Centroid writes go to every PE, which each hold a copy of the
// layer's table. CFG_FRAC sets the output format out_frac: its reset value is
// FRAC_RST, and it is fixed at 7 (FXP-1.7) for the hard-tanh output layer.
// The split over PEs, the cyclic row assignment, zero skipping and the
// activations follow the design description. The configuration port and the
// reset formats are this design's choices. NNZ_MAX is the weight capacity of
// one PE; its default holds 10% of the PE's sub-matrix, the density left by
// pruning, which is the same in every PE.
module sc_layer
  import sdld_pkg::*;
#(
  parameter int   N_IN       = 300,
  parameter int   N_OUT      = 300,
  parameter int   P          = 16,
  parameter act_e ACT        = ACT_RELU,
  parameter int   FIFO_DEPTH = 16,
  parameter logic [3:0] FRAC_RST = 4'd5,
  parameter int   NNZ_MAX    = (((N_OUT + P - 1) / P) * N_IN * DENSITY_PCT + 99) / 100,
  localparam int  ROWS       = (N_OUT + P - 1) / P,
  localparam int  COL_W      = $clog2(N_IN),
  localparam int  ROW_W      = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_we,
  input  cfg_sel_e             cfg_sel,
  input  logic [7:0]           cfg_pe,
  input  logic [15:0]          cfg_addr,
  input  logic [31:0]          cfg_data,
  // fixed-point formats
  input  logic [3:0]           in_frac,
  output logic [3:0]           out_frac,
  // input ping-pong buffer, read side
  input  logic                 in_valid,
  output logic [COL_W-1:0]     in_idx,
  input  logic [DATA_W-1:0]    in_data,
  output logic                 in_release,
  // output ping-pong buffer, write side
  input  logic                 out_ready,
  output logic [P-1:0]         out_wr_en,
  output logic [ROW_W-1:0]     out_wr_addr,
  output logic [DATA_W-1:0]    out_wr_data [P],
  output logic                 out_commit,
  // events
  output logic [P-1:0]         ev_mac,
  output logic [P-1:0]         ev_sat,
  output logic                 ev_skip,
  output logic                 ev_stall,
  output logic                 ev_out_wait
);
  logic                 pe_push;
  logic [COL_W-1:0]     pe_col;
  logic [DATA_W-1:0]    pe_val;
  logic [P-1:0]         pe_ready, pe_idle;
  logic                 act_en;
  logic [ROW_W-1:0]     act_row;
  logic [3:0]           frac_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                frac_q <= FRAC_RST;
    else if (cfg_we && cfg_sel == CFG_FRAC)    frac_q <= cfg_data[3:0];
  end
  assign out_frac = (ACT == ACT_HTANH) ? 4'(OUT_FRAC) : frac_q;

  sc_fetch_ctrl #(.N_IN(N_IN), .ROWS(ROWS), .P(P)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_idx, .in_data, .in_release,
    .pe_push, .pe_col, .pe_val, .pe_ready, .pe_idle,
    .out_ready, .act_en, .act_row, .out_commit,
    .ev_skip, .ev_stall, .ev_out_wait
  );

  assign out_wr_addr = act_row;

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic                  pe_cfg_we;
    logic signed [ACC_W:0] sum;

    assign pe_cfg_we = cfg_we && ((cfg_sel == CFG_LUT) || (cfg_pe == 8'(p)));

    sc_pe #(.N_IN(N_IN), .ROWS(ROWS), .NNZ_MAX(NNZ_MAX), .FIFO_DEPTH(FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .cfg_we   (pe_cfg_we),
      .cfg_sel, .cfg_addr, .cfg_data,
      .in_valid (pe_push),
      .in_ready (pe_ready[p]),
      .in_col   (pe_col),
      .in_val   (pe_val),
      .in_frac  (in_frac),
      .idle     (pe_idle[p]),
      .mac_fire (ev_mac[p]),
      .rd_row   (act_row),
      .rd_clr   (act_en),
      .rd_sum   (sum)
    );

    logic sat;
    sc_act_quant #(.ACT(ACT)) u_act (
      .sum      (sum),
      .out_frac (out_frac),
      .q        (out_wr_data[p]),
      .sat      (sat)
    );
    assign ev_sat[p]    = act_en && sat;
    assign out_wr_en[p] = act_en;
  end

endmodule
