// ecc_encoder: inputs of the redundant FFTs of the Hamming-coded FFT array.
//
// Each redundant FFT j (j = 0..2, i.e. FFTs 5..7) transforms the sum of the
// original inputs that take part in Hamming check C(j+1):
//   X5 = X1 + X2 + X3,   X6 = X1 + X2 + X4,   X7 = X1 + X3 + X4.
// Because the DFT is linear, the output of redundant FFT j then equals the
// same sum of the original outputs, which is what the checks and the
// correction rely on. Which inputs enter which sum is taken from the
// parity-check matrix in ft_pkg.
//
// The block is combinational and works on one sample of each stream (real
// and imaginary parts alike). Sums are two's-complement and exact: RED_W must
// hold the sum of three IN_W-bit values (IN_W + 2 bits, 14 by default, the
// redundant input width of the reference design).
module ecc_encoder #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned RED_W = IN_W + 2
) (
  input  logic signed [IN_W-1:0]  x_re [ft_pkg::N_ORIG],
  input  logic signed [IN_W-1:0]  x_im [ft_pkg::N_ORIG],
  output logic signed [RED_W-1:0] r_re [ft_pkg::N_RED],
  output logic signed [RED_W-1:0] r_im [ft_pkg::N_RED]
);

  always_comb begin
    for (int c = 0; c < ft_pkg::N_RED; c++) begin
      r_re[c] = '0;
      r_im[c] = '0;
      for (int i = 0; i < ft_pkg::N_ORIG; i++) begin
        if (ft_pkg::in_check(i, c)) begin
          r_re[c] = r_re[c] + RED_W'(x_re[i]);
          r_im[c] = r_im[c] + RED_W'(x_im[i]);
        end
      end
    end
  end

endmodule
