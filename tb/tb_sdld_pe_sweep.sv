// tb_sdld_pe_sweep: runs the end-to-end decoder test with 4 and 8 PEs per
// layer, the two smaller configurations of the evaluation. Each must meet
// that configuration's measured figures at 200 MHz:
//   4 PEs: latency <= 154 us (30800 cycles), 2.7 Mbit/s (<= 4666 cycles/word)
//   8 PEs: latency <= 111 us (22200 cycles), 3.7 Mbit/s (<= 3405 cycles/word)
module tb_sdld_pe_sweep;
  int c4, f4, c8, f8;
  bit d4, d8;

  sdld_sweep_harness #(.P(4), .LAT_MAX(30800), .INTERVAL_MAX(4666)) h4 (.checks(c4), .failures(f4), .done(d4));
  sdld_sweep_harness #(.P(8), .LAT_MAX(22200), .INTERVAL_MAX(3405)) h8 (.checks(c8), .failures(f8), .done(d8));

  initial begin
    wait (d4 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8, f4 + f8);
    $finish;
  end
endmodule
