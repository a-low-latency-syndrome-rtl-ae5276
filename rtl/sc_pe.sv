// sc_pe: processing element of a sparsely connected layer.
//
// A layer's weight matrix is split cyclically over its P PEs: PE p owns the
// rows i with i mod P = p, kept as local rows r = i / P. Each PE stores its
// sub-matrix in Compressed Sparse Column (CSC) form in private memories:
//   col_ptr[j] .. col_ptr[j+1]-1 : entries of column j
//   nz_mem[k] = {local row, 6-bit cluster index}
// A weight is decoded through a private 64-entry look-up table of FXP-1.7
// centroids, so W[i][j] = C[I[i][j]] (clustered weights).
//
// The fetch unit pushes (column j, input u_j) pairs only for non-zero inputs.
// The PE pops one pair, walks the column's entries at one MAC per cycle, and
// adds u_j * C[idx], aligned to FXP-10.22, into the accumulator of that row.
// The pop of the next column happens in the same cycle as the last MAC of the
// current one, so a column with n entries takes n cycles, and an empty
// column takes one cycle. Inputs are unsigned 8-bit with in_frac fraction
// bits. The product has in_frac + 7 fraction bits and is shifted left by
// 15 - in_frac. The 32-bit accumulation wraps.
//
// The accumulator slice (ROWS words) is read out row by row through rd_row.
// rd_sum gives accumulator + bias, and rd_clr clears the row for the next
// vector. Memories are loaded through the cfg_* port before decoding starts.
// Local rows, CSC storage, cluster indices, the centroid table and the
// FXP-10.22 precision follow the design description. The bias storage, the
// product alignment and the one-MAC-per-cycle schedule are this design's
// choices.
module sc_pe
  import sdld_pkg::*;
#(
  parameter int N_IN       = 300,
  parameter int ROWS       = 19,
  parameter int NNZ_MAX    = (ROWS * N_IN * DENSITY_PCT + 99) / 100,
  parameter int FIFO_DEPTH = 16,
  localparam int COL_W     = $clog2(N_IN),
  localparam int ROW_W     = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int PTR_W     = $clog2(NNZ_MAX + 1),
  localparam int CP_AW     = $clog2(N_IN + 1),
  localparam int NZ_AW     = (NNZ_MAX > 1) ? $clog2(NNZ_MAX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration (already decoded for this PE)
  input  logic                    cfg_we,
  input  cfg_sel_e                cfg_sel,
  input  logic [15:0]             cfg_addr,
  input  logic [31:0]             cfg_data,
  // column stream from the fetch unit
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [COL_W-1:0]        in_col,
  input  logic [DATA_W-1:0]       in_val,
  input  logic [3:0]              in_frac,
  // status
  output logic                    idle,
  output logic                    mac_fire,
  // accumulator read-out
  input  logic [ROW_W-1:0]        rd_row,
  input  logic                    rd_clr,
  output logic signed [ACC_W:0]   rd_sum
);
  // ---------------- private memories ----------------
  logic [PTR_W-1:0]          col_ptr [N_IN + 1];
  logic [ROW_W+CIDX_W-1:0]   nz_mem  [NNZ_MAX];
  logic signed [DATA_W-1:0]  lut     [CLUSTERS];
  logic signed [ACC_W-1:0]   bias    [ROWS];
  logic signed [ACC_W-1:0]   acc     [ROWS];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      case (cfg_sel)
        CFG_COLPTR: col_ptr[cfg_addr[CP_AW-1:0]] <= cfg_data[PTR_W-1:0];
        CFG_NZ:     nz_mem[cfg_addr[NZ_AW-1:0]] <= {cfg_data[8 +: ROW_W], cfg_data[CIDX_W-1:0]};
        CFG_LUT:    lut[cfg_addr[CIDX_W-1:0]] <= cfg_data[DATA_W-1:0];
        CFG_BIAS:   bias[cfg_addr[ROW_W-1:0]] <= cfg_data;
        default: ;
      endcase
    end
  end

  // ---------------- input FIFO ----------------
  logic                   f_valid, f_ready;
  logic [COL_W-1:0]       f_col;
  logic [DATA_W-1:0]      f_val;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  sync_fifo #(.WIDTH(COL_W + DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  ({in_col, in_val}),
    .in_ready (in_ready),
    .out_valid(f_valid),
    .out_data ({f_col, f_val}),
    .out_ready(f_ready),
    .count    (f_count)
  );

  // ---------------- MAC engine ----------------
  logic                     busy;
  logic [PTR_W-1:0]         k, kend;
  logic [DATA_W-1:0]        u;
  logic                     last;
  logic [ROW_W-1:0]         row;
  logic [CIDX_W-1:0]        cidx;
  logic signed [DATA_W:0]   prod_a;
  logic signed [2*DATA_W:0] prod;
  logic signed [ACC_W-1:0]  addend;
  logic [PTR_W-1:0]         p_lo, p_hi;

  always_comb begin
    last     = busy && (k + 1'b1 == kend);
    f_ready  = !busy || last;
    {row, cidx} = nz_mem[NZ_AW'(k)];
    prod_a   = $signed({1'b0, u});
    prod     = prod_a * lut[cidx];
    addend   = ACC_W'(prod) <<< (ACC_FRAC - W_FRAC - int'(in_frac));
    p_lo     = col_ptr[CP_AW'(f_col)];
    p_hi     = col_ptr[CP_AW'(f_col) + 1'b1];
    mac_fire = busy;
    idle     = !busy && !f_valid;
    rd_sum   = (ACC_W+1)'(acc[rd_row]) + (ACC_W+1)'(bias[rd_row]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      k    <= '0;
      kend <= '0;
      u    <= '0;
      for (int r = 0; r < ROWS; r++) acc[r] <= '0;
    end else begin
      if (busy) acc[row] <= acc[row] + addend;
      if (rd_clr) acc[rd_row] <= '0;
      if (f_valid && f_ready) begin
        k    <= p_lo;
        kend <= p_hi;
        u    <= f_val;
        busy <= (p_lo != p_hi);
      end else if (last) begin
        busy <= 1'b0;
      end else if (busy) begin
        k <= k + 1'b1;
      end
    end
  end

  // Read-out happens only while the PE is drained.
  assert property (@(posedge clk) disable iff (!rst_n) rd_clr |-> !busy);

endmodule
