// sign_adder_tree - adds M products, each with its own sign: y = sum_i (neg[i] ? -p[i] : p[i]).
//
// A balanced binary tree of M-1 add/subtract units.  Each node carries a pending sign: two
// operands with equal pending signs are added, otherwise subtracted, and the node inherits
// the left operand's sign; one conditional negation at the root applies the final sign.
// This realises the adder tree of the odd block while the multipliers stay unsigned in the
// constant, so no per-product negation is needed.  Using add/subtract nodes for the signs is
// this design's choice.  Combinational; M must be a power of two.  All values are OW bits.
module sign_adder_tree #(
  parameter int unsigned M  = 8,
  parameter int unsigned OW = 20
) (
  input  logic signed [OW-1:0] p   [M],
  input  logic        [M-1:0]  neg,
  output logic signed [OW-1:0] y
);
  localparam int LV = $clog2(M);

  logic signed [OW-1:0] v [LV+1][M];
  logic                 s [LV+1][M];

  always_comb begin
    for (int i = 0; i < M; i++) begin
      v[0][i] = p[i];
      s[0][i] = neg[i];
    end
    for (int l = 1; l <= LV; l++) begin
      for (int i = 0; i < M; i++) begin
        if (i < (M >> l)) begin
          v[l][i] = (s[l-1][2*i] == s[l-1][2*i+1]) ? (v[l-1][2*i] + v[l-1][2*i+1])
                                                    : (v[l-1][2*i] - v[l-1][2*i+1]);
          s[l][i] = s[l-1][2*i];
        end else begin
          v[l][i] = '0;
          s[l][i] = 1'b0;
        end
      end
    end
    y = s[LV][0] ? -v[LV][0] : v[LV][0];
  end

  initial assert ((1 << LV) == M) else $error("sign_adder_tree: M must be a power of two");
endmodule
