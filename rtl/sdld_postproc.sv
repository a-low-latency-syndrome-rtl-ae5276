// sdld_postproc: post-processing stage, correction of the hard decisions.
//
// The network output z_i estimates whether received bit i is in error: z_i < 0
// means in error. The corrected word is y_b XOR (z < 0), the binary form of
// x_s = y_s * sign(z). The stage waits until both the output ping-pong buffer
// of the last layer and the hard-decision FIFO hold an entry for the same
// codeword. It reads the N outputs one per cycle, taking the sign bit of each
// FXP-1.7 value, and then offers the corrected word on out_*. When the word is
// accepted, the hard decision is popped and the buffer half released. A word
// takes N + 1 cycles when the output side is ready.
// The correction rule follows the design description, and z = 0 keeps the bit.
// The serial read-out is this design's choice.
module sdld_postproc
#(
  parameter int N  = sdld_pkg::N,
  localparam int IW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // last ping-pong buffer, read side
  input  logic                 rd_valid,
  output logic [IW-1:0]        rd_idx,
  input  logic [sdld_pkg::DATA_W-1:0]    rd_data,
  output logic                 rd_release,
  // hard-decision FIFO head
  input  logic                 hd_valid,
  input  logic [N-1:0]         hd_data,
  output logic                 hd_pop,
  // corrected codeword
  output logic                 out_valid,
  output logic [N-1:0]         out_data,
  input  logic                 out_ready,
  // events
  output logic                 ev_flip
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_OUT} state_e;
  state_e       state;
  logic [IW-1:0] i;
  logic [N-1:0]  err;

  always_comb begin
    rd_idx     = i;
    out_valid  = (state == S_OUT);
    out_data   = hd_data ^ err;
    hd_pop     = out_valid && out_ready;
    rd_release = hd_pop;
    ev_flip    = (state == S_READ) && rd_data[sdld_pkg::DATA_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      err   <= '0;
    end else begin
      case (state)
        S_IDLE: if (rd_valid && hd_valid) begin
          i     <= '0;
          state <= S_READ;
        end
        S_READ: begin
          err[i] <= rd_data[sdld_pkg::DATA_W-1];
          if (i == IW'(N - 1)) state <= S_OUT;
          else                 i <= i + 1'b1;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (state != S_IDLE) |-> (rd_valid && hd_valid));

endmodule
