// dct8_core - 8-point HEVC integer DCT giving one coefficient per evaluation.
//
// y = Y_step = sum_j T8[step][j] * x_j.  A 4-point butterfly folds the input into sums
// a_j = x_j + x_{7-j} and differences b_j = x_j - x_{7-j}; even rows of T8 act on a, odd rows
// on b (both with the first four columns of the row).  Four configurable constant
// multipliers, one per column, each hold the eight magnitudes of their column of T8 and are
// switched by step; a 2:1 mux per lane picks a or b, and a 3-node add/subtract tree applies
// the signs.  The published 16-point design uses an 8-point DCT but does not
// detail it; this column-multiplexed structure is this design's simple choice, in the same
// configurable-multiplier style.  Combinational; 8 evaluations (step 0..7) give all outputs.
module dct8_core
  import dct_pkg::*;
#(
  parameter int unsigned W  = 11,          // input width (signed)
  parameter int unsigned OW = W + 10       // output width
) (
  input  logic signed [W-1:0]  x [8],
  input  logic        [2:0]    step,
  output logic signed [OW-1:0] y
);
  logic signed [W:0]    a [4];
  logic signed [W:0]    b [4];
  logic signed [W:0]    lane [4];
  logic signed [OW-1:0] prod [4];
  logic        [3:0]    neg;
  logic        [3:0]    rom_neg [8];

  butterfly #(.N(8), .W(W)) u_bfly (.x(x), .a(a), .b(b));

  for (genvar k = 0; k < 8; k++) begin : g_sign
    for (genvar j = 0; j < 4; j++) begin : g_col
      assign rom_neg[k][j] = (hevc_coef(8, k, j) < 0);
    end
  end
  assign neg = rom_neg[step];

  for (genvar j = 0; j < 4; j++) begin : g_lane
    assign lane[j] = step[0] ? b[j] : a[j];
    mux_mcm #(
      .W(W + 1), .OW(OW), .NC(8),
      .CONSTS({8'(hevc_abs(8, 7, j)), 8'(hevc_abs(8, 6, j)), 8'(hevc_abs(8, 5, j)),
               8'(hevc_abs(8, 4, j)), 8'(hevc_abs(8, 3, j)), 8'(hevc_abs(8, 2, j)),
               8'(hevc_abs(8, 1, j)), 8'(hevc_abs(8, 0, j))})
    ) u_mcm (
      .x(lane[j]), .sel(step), .y(prod[j])
    );
  end

  sign_adder_tree #(.M(4), .OW(OW)) u_tree (.p(prod), .neg(neg), .y(y));
endmodule
