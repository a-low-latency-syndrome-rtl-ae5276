// tb_sdld_postproc: feeds network outputs z and hard decisions and checks that
// exactly the bits with z < 0 are flipped (z = 0 keeps its bit). Also checks
// that each word takes N + 1 cycles, that the buffer half and the FIFO entry
// are released together, and that back-pressure on the output holds the word.
module tb_sdld_postproc;
  localparam int N = 63;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_valid = 0, rd_release, hd_valid = 0, hd_pop, out_valid, out_ready = 0, ev_flip;
  logic [5:0] rd_idx;
  logic [7:0] rd_data;
  logic [N-1:0] hd_data = '0, out_data;
  logic [7:0] z [N];

  sdld_postproc dut (.*);
  assign rd_data = z[rd_idx];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (z[i]) z[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      logic [N-1:0] exp_word;
      int t0, t1, flips;
      @(negedge clk);
      hd_data = {$urandom, $urandom};
      flips = 0;
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(3))
          0: z[i] = 8'h00;
          1: z[i] = 8'($urandom_range(127));
          default: z[i] = 8'(-int'($urandom_range(128)));
        endcase
        if (z[i] == 0 && w == 0) z[i] = 8'h80;
      end
      exp_word = hd_data;
      for (int i = 0; i < N; i++) if ($signed(z[i]) < 0) begin exp_word[i] = ~exp_word[i]; flips++; end
      rd_valid = 1; hd_valid = 1;
      out_ready = (w % 2 == 0);
      t0 = $time / 10;
      while (!out_valid) @(negedge clk);
      t1 = $time / 10;
      check(t1 - t0 == N + 1, $sformatf("word ready after N+1 cycles, got %0d", t1 - t0));
      if (!out_ready) begin
        repeat (5) begin
          check(out_valid && !hd_pop && !rd_release, "held under back-pressure");
          @(negedge clk);
        end
        out_ready = 1;
      end
      #1;
      check(out_data == exp_word, "corrected word");
      check(hd_pop && rd_release, "release together");
      @(negedge clk);
      rd_valid = 0; hd_valid = 0; out_ready = 0;
      check(!out_valid, "one word per entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
