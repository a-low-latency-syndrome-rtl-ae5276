// pingpong_buf: double buffer for one activation vector between two stages.
//
// Consecutive decoder stages exchange whole vectors through a ping-pong
// buffer, so a stage can fill the next vector while its consumer still reads
// the previous one. The buffer has two halves. The producer writes the half
// it owns and pulses wr_commit, which hands that half to the consumer. The
// consumer reads it and pulses rd_release, which frees it again. wr_ready
// means a free half exists and rd_valid means a full half exists. Once
// wr_ready is seen it stays high until the commit, and the same holds for
// rd_valid until the release.
//
// A half is stored as LANES banks of DEPTH words. Element e sits in bank
// e mod LANES at row e / LANES. This is how a sparsely connected layer with
// LANES processing elements produces its outputs: PE p owns the rows
// i = r*LANES + p, so all PEs write row r of their own bank in the same cycle.
// Reads take one element per cycle by element index and are combinational.
// Banking and read timing are this design's choice; the use of ping-pong
// buffers between the pipeline stages follows the design description.
module pingpong_buf #(
  parameter int LANES  = 16,
  parameter int DEPTH  = 19,
  parameter int DATA_W = 8,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int IW    = $clog2(LANES * DEPTH),
  localparam int LW    = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // producer side
  output logic                   wr_ready,
  input  logic [LANES-1:0]       wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic [DATA_W-1:0]      wr_data [LANES],
  input  logic                   wr_commit,
  // consumer side
  output logic                   rd_valid,
  input  logic [IW-1:0]          rd_idx,
  output logic [DATA_W-1:0]      rd_data,
  input  logic                   rd_release
);
  logic [DATA_W-1:0] mem [2][DEPTH][LANES];
  logic              wsel, rsel;
  logic [1:0]        full;   // number of committed halves

  assign wr_ready = (full != 2'd2);
  assign rd_valid = (full != 2'd0);
  assign rd_data  = mem[rsel][AW'(rd_idx / IW'(LANES))][LW'(rd_idx % IW'(LANES))];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (wr_en[l]) mem[wsel][wr_addr][l] <= wr_data[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0;
      rsel <= 1'b0;
      full <= 2'd0;
    end else begin
      if (wr_commit)  wsel <= ~wsel;
      if (rd_release) rsel <= ~rsel;
      case ({wr_commit, rd_release})
        2'b10:   full <= full + 2'd1;
        2'b01:   full <= full - 2'd1;
        default: ;
      endcase
    end
  end

  // Handshake rules: commit only into a free half, release only a full one.
  assert property (@(posedge clk) disable iff (!rst_n) wr_commit |-> wr_ready);
  assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_valid);
  assert property (@(posedge clk) disable iff (!rst_n) (wr_en != '0) |-> wr_ready);

endmodule
