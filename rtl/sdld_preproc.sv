// sdld_preproc: pre-processing stage of the decoder.
//
// Channel reliabilities y_i arrive one per beat as signed 8-bit FXP-3.5.
// The stage packs N = 63 of them into one received word and derives:
//   y_b  : the binary hard decision (1 where y_i < 0)
//   |y|  : the magnitudes, kept unsigned so |-4.0| = 128 stays exact
//   s    : the syndrome H * y_b (bch_syndrome)
// It writes the network input v = [s, |y|] (81 elements, FXP-3.5, a syndrome
// bit of 1 entered as 1.0) into the first ping-pong buffer and pushes y_b into
// the hard-decision FIFO that feeds post-processing.
//
// Element e of v goes to lane e mod LANES, row e / LANES of the buffer, the
// same banking the first layer reads. |y_i| is written as sample i arrives,
// at element M + i. After the last sample the syndrome is written LANES
// elements per cycle, ceil(M/LANES) cycles. Then y_b is pushed and the buffer
// half committed together. A word takes N + ceil(M/LANES) + 1 cycles at
// full input rate. Input is accepted only while the buffer has a free half.
// The pre-processing function follows the design description. The stream
// format, the 0/1.0 syndrome encoding and the write schedule are this
// design's choices.
module sdld_preproc
#(
  parameter int N     = sdld_pkg::N,
  parameter int M     = sdld_pkg::M,
  parameter int LANES = 16,
  localparam int DEPTH = (N + M + LANES - 1) / LANES,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int LW    = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int SROWS = (M + LANES - 1) / LANES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reliability stream
  input  logic                 s_valid,
  input  logic [sdld_pkg::DATA_W-1:0]    s_data,
  output logic                 s_ready,
  // first ping-pong buffer, write side
  input  logic                 wr_ready,
  output logic [LANES-1:0]     wr_en,
  output logic [AW-1:0]        wr_addr,
  output logic [sdld_pkg::DATA_W-1:0]    wr_data [LANES],
  output logic                 wr_commit,
  // hard-decision FIFO push
  output logic                 hd_valid,
  output logic [N-1:0]         hd_data,
  input  logic                 hd_ready
);
  typedef enum logic [1:0] {S_RECV, S_SYN, S_PUSH} state_e;
  state_e            state;
  logic [5:0]        i;        // sample index
  logic [LW-1:0]     lane;     // bank of element M + i
  logic [AW-1:0]     row;      // row of element M + i
  logic [AW-1:0]     c;        // syndrome row being written
  logic [N-1:0]      yb;
  logic [M-1:0]      syn;
  logic              accept;
  logic [sdld_pkg::DATA_W-1:0] mag;

  bch_syndrome #(.N(N), .M(M)) u_syn (.yb(yb), .s(syn));

  always_comb begin
    s_ready   = (state == S_RECV) && wr_ready;
    accept    = s_valid && s_ready;
    mag       = s_data[sdld_pkg::DATA_W-1] ? (~s_data + 1'b1) : s_data;
    wr_en     = '0;
    wr_addr   = row;
    for (int l = 0; l < LANES; l++) wr_data[l] = mag;
    if (state == S_RECV) begin
      wr_en[lane] = accept;
    end else if (state == S_SYN) begin
      wr_addr = c;
      for (int l = 0; l < LANES; l++) begin
        if (int'(c) * LANES + l < M) begin
          wr_en[l]   = 1'b1;
          wr_data[l] = syn[int'(c) * LANES + l] ? sdld_pkg::DATA_W'(1 << sdld_pkg::IN_FRAC) : '0;
        end
      end
    end
    hd_valid  = (state == S_PUSH);
    hd_data   = yb;
    wr_commit = hd_valid && hd_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RECV;
      i     <= '0;
      lane  <= LW'(M % LANES);
      row   <= AW'(M / LANES);
      c     <= '0;
      yb    <= '0;
    end else begin
      case (state)
        S_RECV: if (accept) begin
          yb[i] <= s_data[sdld_pkg::DATA_W-1];
          if (lane == LW'(LANES - 1)) begin
            lane <= '0;
            row  <= row + 1'b1;
          end else begin
            lane <= lane + 1'b1;
          end
          if (i == 6'(N - 1)) begin
            i     <= '0;
            c     <= '0;
            state <= S_SYN;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_SYN: begin
          if (c == AW'(SROWS - 1)) state <= S_PUSH;
          else                     c <= c + 1'b1;
        end
        S_PUSH: if (hd_ready) begin
          lane  <= LW'(M % LANES);
          row   <= AW'(M / LANES);
          state <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule
