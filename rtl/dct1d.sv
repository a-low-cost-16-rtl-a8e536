// dct1d - registered 1-D HEVC integer DCT, N = 16 or 32 points, two coefficients per cycle.
//
// A block of N samples is taken in parallel through a valid/ready handshake and held in an
// input register while the combinational core (dct16_core or dct32_core) is stepped
// k = 0 .. N/2-1.  Each step registers one output pair (Y_{2k}, Y_{2k+1}), so a transform
// takes N/2 cycles, and the next block is accepted in the cycle the last pair is produced:
// back-to-back blocks give two coefficients every cycle with no gap, which is the rate the
// published design gives.  The handshake, the input register and the single output register stage
// are this design's choices; the published 1-D unit only has enable and clock.
//
// Scaling: each coefficient is optionally rounded and shifted right by SHIFT bits,
// (y + 2^(SHIFT-1)) >>> SHIFT, as HEVC does between and after the two transform stages.
//
// Interface: in_valid/in_ready/in_data; out_valid/out_ready hold out_coef stable while
// stalled; out_idx = k gives the coefficient indices 2k and 2k+1; out_last marks k = N/2-1.
// Latency: the first pair appears one cycle after the block is accepted.
module dct1d #(
  parameter int unsigned N      = 32,                              // 16 or 32
  parameter int unsigned IN_W   = 9,                               // sample width
  parameter int unsigned SHIFT  = 0,                               // output right shift
  parameter int unsigned CORE_W = IN_W + 7 + $clog2(N),            // full-precision width
  parameter int unsigned OUT_W  = CORE_W - SHIFT + ((SHIFT > 0) ? 1 : 0),
  parameter int unsigned KW     = $clog2(N / 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data  [N],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_coef [2],   // [0] = Y_{2k}, [1] = Y_{2k+1}
  output logic        [KW-1:0]    out_idx,
  output logic                    out_last
);
  localparam logic [KW-1:0] LAST = KW'(N / 2 - 1);

  logic signed [IN_W-1:0]   xr [N];
  logic                     busy;
  logic [KW-1:0]            step;
  logic signed [CORE_W-1:0] y_even;
  logic signed [CORE_W-1:0] y_odd;
  logic                     advance;
  logic                     in_fire;

  if (N == 32) begin : g_core32
    dct32_core #(.W(IN_W), .OW(CORE_W)) u_core (
      .x(xr), .step(step), .y_even(y_even), .y_odd(y_odd));
  end else begin : g_core16
    dct16_core #(.W(IN_W), .OW(CORE_W)) u_core (
      .x(xr), .step(step), .y_even(y_even), .y_odd(y_odd));
  end

  function automatic logic signed [OUT_W-1:0] scale(logic signed [CORE_W-1:0] v);
    logic signed [CORE_W:0] r;
    r = (CORE_W + 1)'(v);
    if (SHIFT > 0) r = r + (CORE_W + 1)'(1 << (SHIFT - 1));
    r = r >>> SHIFT;
    return OUT_W'(r);
  endfunction

  assign advance  = busy && (!out_valid || out_ready);
  assign in_ready = !busy || (advance && step == LAST);
  assign in_fire  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_last  <= 1'b0;
      out_coef  <= '{default: '0};
      xr        <= '{default: '0};
    end else begin
      if (advance) begin
        out_coef[0] <= scale(y_even);
        out_coef[1] <= scale(y_odd);
        out_idx     <= step;
        out_last    <= (step == LAST);
        out_valid   <= 1'b1;
        step        <= step + 1'b1;
        if (step == LAST) busy <= 1'b0;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (in_fire) begin
        xr   <= in_data;
        busy <= 1'b1;
        step <= '0;
      end
    end
  end

  initial begin
    assert (N == 16 || N == 32) else $error("dct1d: N must be 16 or 32");
  end

  // a stalled output pair must not change
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_coef[0]) && $stable(out_coef[1]);
  endproperty
  assert property (p_hold);
endmodule
