// odd_block - M-point odd block built from configurable constant multipliers.
//
// Computes one odd coefficient per evaluation: y = sum_j O[k][j] * b_j, where O is the
// odd-row matrix of the 2M-point HEVC transform and k the row chosen by the control inputs.
// Structure (as in the published 16-point design, generalised to M = 16):
//   * M input multiplexers, all switched by C1, route butterfly differences b_j to lanes;
//   * M configurable constant multipliers (mux_mcm), two constants each, all switched by C2;
//   * an adder tree of M-1 add/subtract units that also applies the product signs.
// The routing tables and constant pairs come from dct_pkg.  Combinational; the caller
// (dct16_core / dct32_core) gets C1, C2 and the signs from odd_ctrl.
module odd_block
  import dct_pkg::*;
#(
  parameter int unsigned M   = 8,                    // odd block size (N/2)
  parameter int unsigned W   = 10,                   // width of the b inputs
  parameter int unsigned OW  = W + 7 + $clog2(M),    // output width
  parameter int unsigned C1W = $clog2(odd_npat(M))
) (
  input  logic signed [W-1:0]   b [M],
  input  logic        [C1W-1:0] c1,
  input  logic                  c2,
  input  logic        [M-1:0]   neg,
  output logic signed [OW-1:0]  y
);
  localparam int NP = odd_npat(M);

  logic signed [W-1:0]  lane [M];
  logic signed [OW-1:0] prod [M];

  for (genvar i = 0; i < M; i++) begin : g_lane
    logic signed [W-1:0] cand [NP];
    for (genvar p = 0; p < NP; p++) begin : g_in
      assign cand[p] = b[odd_muxin(M, i, p)];
    end
    assign lane[i] = cand[c1];

    mux_mcm #(
      .W(W), .OW(OW), .NC(2),
      .CONSTS({8'(odd_pair(M, i, 1)), 8'(odd_pair(M, i, 0))})
    ) u_mcm (
      .x(lane[i]), .sel(c2), .y(prod[i])
    );
  end

  sign_adder_tree #(.M(M), .OW(OW)) u_tree (.p(prod), .neg(neg), .y(y));
endmodule
