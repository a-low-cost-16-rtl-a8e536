// odd_ctrl - control unit of an M-point odd block (M = 8 for the 16-point DCT, 16 for the
// 32-point DCT).
//
// For output step k (the odd coefficient Y_{2k+1}) it gives C1, the input permutation of
// the odd block's multiplexers, C2, the constant select shared by all configurable
// multipliers, and the sign of each of the M products.  It is a small ROM built at
// elaboration from the schedules in dct_pkg.  That the two selects C1 and C2 come from a
// control unit follows the published design; the sign output is this design's addition
// (the signs are applied in the adder tree).  Combinational.
module odd_ctrl
  import dct_pkg::*;
#(
  parameter int unsigned M   = 8,
  parameter int unsigned SW  = $clog2(M),          // step width
  parameter int unsigned C1W = $clog2(odd_npat(M)) // C1 width
) (
  input  logic [SW-1:0]  step,
  output logic [C1W-1:0] c1,
  output logic           c2,
  output logic [M-1:0]   neg
);
  logic [C1W-1:0] rom_c1  [M];
  logic           rom_c2  [M];
  logic [M-1:0]   rom_neg [M];

  for (genvar k = 0; k < M; k++) begin : g_row
    assign rom_c1[k] = C1W'(odd_c1(M, k));
    assign rom_c2[k] = 1'(odd_c2(M, k));
    for (genvar i = 0; i < M; i++) begin : g_bit
      assign rom_neg[k][i] = odd_neg(M, k, i);
    end
  end

  assign c1  = rom_c1[step];
  assign c2  = rom_c2[step];
  assign neg = rom_neg[step];
endmodule
