// bch_syndrome: syndrome s = H * y_b of a 63-bit hard decision (BCH(63,45)).
//
// Column i of the parity-check matrix H is the remainder x^i mod g(x), where
// g(x) is the generator polynomial of the code. So s is the remainder of the
// received polynomial y_b(x) = sum y_b[i] x^i divided by g(x), and s is zero
// exactly for codewords. The logic is one XOR tree per syndrome bit. The
// columns are constants worked out at elaboration, so there is no clock.
// The description gives s = H * y_b but not H; this choice of H is the usual
// one for a cyclic code, and a trained network must be trained with the same H.
module bch_syndrome
#(
  parameter int N = sdld_pkg::N,
  parameter int M = sdld_pkg::M
) (
  input  logic [N-1:0] yb,
  output logic [M-1:0] s
);
  always_comb begin
    s = '0;
    for (int i = 0; i < N; i++) begin
      if (yb[i]) s ^= M'(sdld_pkg::bch_col(i));
    end
  end
endmodule
