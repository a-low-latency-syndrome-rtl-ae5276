// tb_sc_layer: runs a RELU hidden layer (40 -> 22) and a hard-tanh output
// layer (30 -> 13), with 2 and 4 PEs, against the integer reference. Zero
// skipping, FIFO stalls and saturation must all occur.
module tb_sc_layer;
  import sdld_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c0, f0, k0, s0, t0, c1, f1, k1, s1, t1;
  bit d0, d1;

  sc_layer_harness #(.NI(40), .NO(22), .P(2), .ACT(ACT_RELU), .NNZ_ROW(12))  h_relu (.clk, .rst_n, .checks(c0), .failures(f0), .skips(k0), .stalls(s0), .sats(t0), .done(d0));
  sc_layer_harness #(.NI(30), .NO(13), .P(4), .ACT(ACT_HTANH)) h_tanh (.clk, .rst_n, .checks(c1), .failures(f1), .skips(k1), .stalls(s1), .sats(t1), .done(d1));

  initial begin
    repeat (60000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1);
    checks = c0 + c1 + 3;
    failures = f0 + f1;
    if (k0 == 0 || k1 == 0) begin failures++; $display("FAIL: no zero input skipped"); end
    if (s0 + s1 == 0) begin failures++; $display("FAIL: no PE FIFO stall"); end
    if (t0 + t1 == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("skips %0d/%0d stalls %0d/%0d saturations %0d/%0d", k0, k1, s0, s1, t0, t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
