// dct2d - unfolded row-column 2-D HEVC integer DCT (N x N, N = 32 by default, or 16).
//
// Top level.  A block of N x N residual samples enters one row (N samples) per handshake.
// The row 1-D DCT transforms each row, two coefficients per cycle, into the transposition
// memory; once a whole block is in, the column 1-D DCT reads it back column by column and
// produces the final coefficients, two per cycle.  While the columns of one block are
// being transformed, the rows of the next block are transformed and written into the
// locations already read, so both 1-D units stay busy and a block takes N*N/2 cycles in
// steady state.  This structure is the published one; the handshakes are this design's.
//
// Scaling between and after the stages follows the HEVC forward transform: the row stage
// result is rounded and shifted right by SHIFT1 = log2(N) - 1 + (bit depth - 8) and the
// column stage result by SHIFT2 = log2(N) + 6, with bit depth = IN_W - 1 (a residual of a
// B-bit video signal needs B+1 bits).  No clipping is applied.
//
// Output: out_coef[0] = Y[v][u] and out_coef[1] = Y[v+1][u] where u = out_u is the
// horizontal frequency (the column being transformed) and v = 2*out_k the vertical one.
// out_last marks the final pair of a block.  row_ack / col_ack are the transposition memory
// status pulses (block written / block read).
module dct2d #(
  parameter int unsigned N      = 32,
  parameter int unsigned IN_W   = 9,
  parameter int unsigned SHIFT1 = $clog2(N) - 1 + (IN_W - 1) - 8,
  parameter int unsigned SHIFT2 = $clog2(N) + 6,
  parameter int unsigned MID_W  = IN_W + 7 + $clog2(N) - SHIFT1 + 1,
  parameter int unsigned OUT_W  = MID_W + 7 + $clog2(N) - SHIFT2 + 1,
  parameter int unsigned KW     = $clog2(N / 2),
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_row   [N],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_coef [2],
  output logic        [AW-1:0]    out_u,
  output logic        [KW-1:0]    out_k,
  output logic                    out_last,
  output logic                    row_ack,
  output logic                    col_ack
);
  logic                    r_valid;
  logic                    r_ready;
  logic signed [MID_W-1:0] r_coef [2];
  logic [KW-1:0]           r_idx;
  logic                    r_last;

  logic                    t_valid;
  logic                    t_ready;
  logic signed [MID_W-1:0] t_col [N];
  logic [AW-1:0]           t_colidx;

  logic                    c_last;
  logic [AW-1:0]           u_cnt;

  dct1d #(.N(N), .IN_W(IN_W), .SHIFT(SHIFT1), .OUT_W(MID_W)) u_row (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_row),
    .out_valid(r_valid), .out_ready(r_ready), .out_coef(r_coef),
    .out_idx(r_idx), .out_last(r_last)
  );

  transpose_mem #(.N(N), .W(MID_W)) u_tmem (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(r_valid), .wr_ready(r_ready), .wr_data(r_coef), .wr_idx(r_idx),
    .wr_last(r_last),
    .rd_valid(t_valid), .rd_ready(t_ready), .rd_data(t_col), .rd_col(t_colidx),
    .row_ack(row_ack), .col_ack(col_ack)
  );

  dct1d #(.N(N), .IN_W(MID_W), .SHIFT(SHIFT2), .OUT_W(OUT_W)) u_col (
    .clk(clk), .rst_n(rst_n),
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_col),
    .out_valid(out_valid), .out_ready(out_ready), .out_coef(out_coef),
    .out_idx(out_k), .out_last(c_last)
  );

  // Columns leave the memory in order 0..N-1, so the column stage's outputs are numbered by
  // counting its completed transforms.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_cnt <= '0;
    else if (out_valid && out_ready && c_last) u_cnt <= u_cnt + 1'b1;
  end

  assign out_u    = u_cnt;
  assign out_last = c_last && (u_cnt == AW'(N - 1));
endmodule
