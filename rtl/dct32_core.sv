// dct32_core - proposed 32-point HEVC integer DCT: two coefficients per evaluation.
//
// A 32-point butterfly splits the input into sums a (16 values) and differences b (16).
// The even coefficients are the 16-point DCT of a, Y_{2k} = DCT16(a)_k, taken from the
// embedded dct16_core; the odd coefficients Y_{2k+1} come from a 16-point odd block with
// 16 input muxes, 16 two-constant configurable multipliers and a 15-adder tree.  Step k
// (0..15) yields (Y_{2k}, Y_{2k+1}), so the throughput stays at two coefficients per cycle
// and a 32-point transform takes 16 evaluations, as published.  The embedded
// 16-point core produces a pair per evaluation; at step k it is evaluated at k/2 and the
// member of its pair given by the parity of k is used.  Combinational.
module dct32_core #(
  parameter int unsigned W  = 9,           // input width (signed)
  parameter int unsigned OW = W + 12       // output width
) (
  input  logic signed [W-1:0]  x [32],
  input  logic        [3:0]    step,
  output logic signed [OW-1:0] y_even,     // Y_{2*step}
  output logic signed [OW-1:0] y_odd       // Y_{2*step+1}
);
  logic signed [W:0]    a [16];
  logic signed [W:0]    b [16];
  logic signed [OW-1:0] e16_even;
  logic signed [OW-1:0] e16_odd;
  logic [2:0]           c1;
  logic                 c2;
  logic [15:0]          neg;

  butterfly #(.N(32), .W(W)) u_bfly (.x(x), .a(a), .b(b));

  dct16_core #(.W(W + 1), .OW(OW)) u_even (
    .x(a), .step(step[3:1]), .y_even(e16_even), .y_odd(e16_odd)
  );
  assign y_even = step[0] ? e16_odd : e16_even;

  odd_ctrl #(.M(16)) u_ctrl (.step(step), .c1(c1), .c2(c2), .neg(neg));

  odd_block #(.M(16), .W(W + 1), .OW(OW)) u_odd (
    .b(b), .c1(c1), .c2(c2), .neg(neg), .y(y_odd)
  );
endmodule
