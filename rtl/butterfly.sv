// butterfly - input stage of the even-odd decomposition of an N-point DCT.
//
// Folds N samples into N/2 sums a_i = x_i + x_{N-1-i} (fed to the N/2-point DCT that gives
// the even coefficients) and N/2 differences b_i = x_i - x_{N-1-i} (fed to the odd block that
// gives the odd coefficients).  Purely combinational; outputs are one bit wider than the
// inputs so nothing overflows.  The equations are the standard HEVC partial butterfly.
module butterfly #(
  parameter int unsigned N = 16,   // transform size (even)
  parameter int unsigned W = 9     // input sample width, two's complement
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W:0]   a [N/2],
  output logic signed [W:0]   b [N/2]
);
  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      a[i] = (W + 1)'(x[i]) + (W + 1)'(x[N - 1 - i]);
      b[i] = (W + 1)'(x[i]) - (W + 1)'(x[N - 1 - i]);
    end
  end
endmodule
