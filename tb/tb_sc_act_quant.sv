// tb_sc_act_quant: compares RELU and hard-tanh quantization against real
// arithmetic: q = clamp(floor(sum / 2^(22 - out_frac))).
module tb_sc_act_quant;
  import sdld_pkg::*;
  logic signed [32:0] sum;
  logic [3:0] out_frac;
  logic [7:0] q_relu, q_tanh;
  logic sat_relu, sat_tanh;
  int checks = 0, failures = 0, n_sat = 0, n_neg = 0;

  sc_act_quant #(.ACT(ACT_RELU))  dut_relu (.sum(sum), .out_frac(out_frac), .q(q_relu), .sat(sat_relu));
  sc_act_quant #(.ACT(ACT_HTANH)) dut_tanh (.sum(sum), .out_frac(4'd7),    .q(q_tanh), .sat(sat_tanh));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s sum=%0d frac=%0d", msg, sum, out_frac); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      real x, xt;
      int er, et;
      int r;
      case (t % 3)
        0: r = int'($urandom);
        1: r = int'($urandom_range(1 << 25)) - (1 << 24);
        default: r = int'($urandom_range(1 << 20)) - (1 << 19);
      endcase
      sum = 33'(r);
      out_frac = 4'($urandom_range(8));
      #1;
      x  = $floor(real'(sum) / real'(1 << (22 - int'(out_frac))));
      xt = $floor(real'(sum) / 32768.0);
      er = (x > 255.0) ? 255 : (x < 0.0) ? 0 : int'(x);
      et = (xt > 127.0) ? 127 : (xt < -128.0) ? -128 : int'(xt);
      check(int'(q_relu) == er, "relu");
      check(int'($signed(q_tanh)) == et, "hard tanh");
      check(sat_relu == (x > 255.0), "relu saturation flag");
      check(sat_tanh == (xt > 127.0 || xt < -128.0), "tanh saturation flag");
      if (sat_relu) n_sat++;
      if (x < 0.0) n_neg++;
    end
    check(n_sat > 0 && n_neg > 0, "both clipping cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
