// sc_act_quant: activation and 8-bit quantization of one accumulated sum.
//
// The sum is accumulator plus bias in FXP-10.22, with one extra bit so the
// bias add cannot overflow. It is shifted right arithmetically by
// 22 - out_frac, which truncates toward minus infinity. The result is then
// clipped:
//   ACT_RELU  : hidden layers, output unsigned 0..255 with out_frac fraction bits
//   ACT_HTANH : output layer, hard tanh, output signed FXP-1.7 clamped to
//               [-1, 127/128] (out_frac is 7 there)
// sat is high when clipping changed a value that the activation would have
// passed, so it excludes RELU's clipping of negatives to zero.
// The activations and the 8-bit outputs follow the design description. The
// truncation and the unsigned RELU output range are this design's choices.
// The unit is purely combinational.
module sc_act_quant
  import sdld_pkg::*;
#(
  parameter act_e ACT = ACT_RELU
) (
  input  logic signed [ACC_W:0] sum,
  input  logic [3:0]            out_frac,
  output logic [DATA_W-1:0]     q,
  output logic                  sat
);
  logic signed [ACC_W:0] shifted;

  always_comb begin
    shifted = sum >>> (ACC_FRAC - int'(out_frac));
    sat     = 1'b0;
    if (ACT == ACT_RELU) begin
      if (shifted < 0) begin
        q = '0;
      end else if (shifted > 255) begin
        q   = 8'hFF;
        sat = 1'b1;
      end else begin
        q = shifted[7:0];
      end
    end else begin
      if (shifted < -128) begin
        q   = 8'h80;
        sat = 1'b1;
      end else if (shifted > 127) begin
        q   = 8'h7F;
        sat = 1'b1;
      end else begin
        q = shifted[7:0];
      end
    end
  end
endmodule
