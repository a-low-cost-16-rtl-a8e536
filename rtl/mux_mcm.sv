// mux_mcm - configurable (time-multiplexed) constant multiplier: y = x * c[sel].
//
// Instead of one shift-add network per constant, a single chain of K-1 add/subtract units
// is shared by all constants of the set; only the shift applied to x at each term and the
// add/subtract choice change with sel, through small multiplexers.  K is the largest number
// of non-zero digits among the canonical signed digit (CSD) forms of the constants.  Term 0
// is the most significant CSD digit, always positive, so the chain starts without a
// negation; a constant with fewer digits gets zero terms.
//
// The idea of one shared adder network reconfigured by a select signal is the published one;
// deriving the network from CSD digits is this design's own simple rule (the published
// graphs come from a time-multiplexed MCM optimiser, and their adder counts may differ).
// The default constant set {11, 21} is the published worked example.
// CONSTS packs the constants 8 bits each, constant n in bits [8n +: 8].
// Combinational; sel outside 0..NC-1 gives 0.
module mux_mcm
  import dct_pkg::*;
#(
  parameter int unsigned W    = 10,                       // input width (signed)
  parameter int unsigned OW   = W + 8,                    // product width (signed)
  parameter int unsigned NC   = 2,                        // number of constants
  parameter int unsigned SELW = (NC > 1) ? $clog2(NC) : 1,
  // constant n (1..255) sits in bits [8n +: 8]
  parameter logic [8*NC-1:0] CONSTS = {8'd21, 8'd11}
) (
  input  logic signed [W-1:0]  x,
  input  logic        [SELW-1:0] sel,
  output logic signed [OW-1:0] y
);
  function automatic int unsigned cst(int n);
    return int'(CONSTS[8*n +: 8]);
  endfunction

  function automatic int max_terms();
    int m;
    m = 1;
    for (int n = 0; n < NC; n++)
      if (csd_count(cst(n)) > m) m = csd_count(cst(n));
    return m;
  endfunction

  localparam int K = max_terms();

  logic signed [OW-1:0] xs;
  logic signed [OW-1:0] mag [K];
  logic                 neg [K];
  logic signed [OW-1:0] acc [K];

  assign xs = OW'(x);

  for (genvar t = 0; t < K; t++) begin : g_term
    logic signed [OW-1:0] cand  [NC];
    logic                 cneg  [NC];
    for (genvar n = 0; n < NC; n++) begin : g_const
      localparam int  P  = csd_pos(cst(n), t);
      localparam int  PS = (P < 0) ? 0 : P;
      localparam bit  S  = csd_neg(cst(n), t);
      assign cand[n] = (P < 0) ? '0 : (xs <<< PS);
      assign cneg[n] = S;
    end
    // term multiplexer: shift (and sign) of term t for the selected constant
    assign mag[t] = (32'(sel) < NC) ? cand[sel] : '0;
    assign neg[t] = (32'(sel) < NC) ? cneg[sel] : 1'b0;
  end

  // shared add/subtract chain
  always_comb begin
    acc[0] = mag[0];
    for (int t = 1; t < K; t++)
      acc[t] = neg[t] ? (acc[t-1] - mag[t]) : (acc[t-1] + mag[t]);
  end

  assign y = acc[K-1];
endmodule
