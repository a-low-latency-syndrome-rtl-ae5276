// sc_fetch_ctrl: input fetch and control unit of a sparsely connected layer.
//
// The layer computes its matrix-vector product column by column. That lets it
// skip the zeros in its input vector as well as those in the weights: after a
// RELU layer about half of the inputs are zero.
// The unit runs three phases per vector:
//   FETCH : once the input ping-pong buffer holds a vector, look at element j
//           each cycle. A zero is skipped at once. A non-zero (j, u_j) is
//           broadcast to the input FIFOs of all P PEs when every FIFO has
//           room, and otherwise the unit waits (stall). After the last
//           element the input half is released.
//   DRAIN : wait until every PE has emptied its FIFO and finished its
//           column, and until the output ping-pong buffer has a free half.
//   ACT   : for local row r = 0..ROWS-1, every PE presents accumulator+bias of
//           row r; the activation units write lane p, row r of the output
//           buffer and the accumulators are cleared. The last row also
//           commits the output half.
// The next vector's FETCH starts in the cycle after the commit.
// pe_val is in_data passed straight on: the buffer read is combinational, so
// the value reaches the PE FIFOs in the cycle it is read.
// The unit's role (feeding the PE input FIFOs and managing the PEs) follows
// the design description. The phase structure and the one-element-per-cycle
// scan are this design's choices.
module sc_fetch_ctrl
  import sdld_pkg::*;
#(
  parameter int N_IN  = 300,
  parameter int ROWS  = 19,
  parameter int P     = 16,
  localparam int COL_W = $clog2(N_IN),
  localparam int ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input ping-pong buffer, read side
  input  logic                 in_valid,
  output logic [COL_W-1:0]     in_idx,
  input  logic [DATA_W-1:0]    in_data,
  output logic                 in_release,
  // broadcast to the PE input FIFOs
  output logic                 pe_push,
  output logic [COL_W-1:0]     pe_col,
  output logic [DATA_W-1:0]    pe_val,
  input  logic [P-1:0]         pe_ready,
  input  logic [P-1:0]         pe_idle,
  // output ping-pong buffer and activation sequencing
  input  logic                 out_ready,
  output logic                 act_en,
  output logic [ROW_W-1:0]     act_row,
  output logic                 out_commit,
  // events
  output logic                 ev_skip,
  output logic                 ev_stall,
  output logic                 ev_out_wait
);
  typedef enum logic [1:0] {S_FETCH, S_DRAIN, S_ACT} state_e;
  state_e           state;
  logic [COL_W-1:0] j;
  logic [ROW_W-1:0] r;
  logic             advance, last_col;

  always_comb begin
    in_idx      = j;
    pe_col      = j;
    pe_val      = in_data;
    last_col    = (j == COL_W'(N_IN - 1));
    ev_skip     = (state == S_FETCH) && in_valid && (in_data == '0);
    pe_push     = (state == S_FETCH) && in_valid && (in_data != '0) && (&pe_ready);
    ev_stall    = (state == S_FETCH) && in_valid && (in_data != '0) && !(&pe_ready);
    advance     = ev_skip || pe_push;
    in_release  = advance && last_col;
    ev_out_wait = (state == S_DRAIN) && (&pe_idle) && !out_ready;
    act_en      = (state == S_ACT);
    act_row     = r;
    out_commit  = (state == S_ACT) && (r == ROW_W'(ROWS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FETCH;
      j     <= '0;
      r     <= '0;
    end else begin
      case (state)
        S_FETCH: if (advance) begin
          if (last_col) begin
            j     <= '0;
            state <= S_DRAIN;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_DRAIN: if ((&pe_idle) && out_ready) begin
          r     <= '0;
          state <= S_ACT;
        end
        S_ACT: begin
          if (out_commit) begin
            r     <= '0;
            state <= S_FETCH;
          end else begin
            r <= r + 1'b1;
          end
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pe_push |-> (&pe_ready));
  assert property (@(posedge clk) disable iff (!rst_n) in_release |-> in_valid);

endmodule
