// dct16_core - proposed 16-point HEVC integer DCT: two coefficients per evaluation.
//
// A 16-point butterfly splits the input into sums a (8 values) and differences b (8 values).
// The 8-point DCT of a gives the even coefficients, Y_{2k} = DCT8(a)_k; the O8 odd block,
// with its 8 input muxes (C1), 8 two-constant configurable multipliers (C2) and 7-adder tree,
// gives the odd coefficients Y_{2k+1}.  Evaluation step k (0..7) yields the pair
// (Y_{2k}, Y_{2k+1}), so a 16-point transform takes 8 evaluations, two coefficients each, as
// in the published design.  odd_ctrl turns the step into C1, C2 and the product signs.
// Combinational.
module dct16_core #(
  parameter int unsigned W  = 9,           // input width (signed)
  parameter int unsigned OW = W + 11       // output width
) (
  input  logic signed [W-1:0]  x [16],
  input  logic        [2:0]    step,
  output logic signed [OW-1:0] y_even,     // Y_{2*step}
  output logic signed [OW-1:0] y_odd       // Y_{2*step+1}
);
  logic signed [W:0] a [8];
  logic signed [W:0] b [8];
  logic [1:0]        c1;
  logic              c2;
  logic [7:0]        neg;

  butterfly #(.N(16), .W(W)) u_bfly (.x(x), .a(a), .b(b));

  dct8_core #(.W(W + 1), .OW(OW)) u_even (.x(a), .step(step), .y(y_even));

  odd_ctrl #(.M(8)) u_ctrl (.step(step), .c1(c1), .c2(c2), .neg(neg));

  odd_block #(.M(8), .W(W + 1), .OW(OW)) u_odd (
    .b(b), .c1(c1), .c2(c2), .neg(neg), .y(y_odd)
  );
endmodule
