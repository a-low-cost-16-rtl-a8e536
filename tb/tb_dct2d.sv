// tb_dct2d - end-to-end test of the 32x32 row-column 2-D DCT at the default parameters (the full-size design).
//
// Four blocks of random 9-bit residuals (the first one an extreme +255/-256 pattern) are
// sent row by row.  Every output pair is compared with the HEVC forward transform computed
// directly: Z[r][u] = round(sum_j T[u][j] X[r][j] >> SHIFT1), then
// Y[v][u] = round(sum_r T[v][r] Z[r][u] >> SHIFT2).  Blocks 0 and 1 run with no stalls and
// must come out exactly N*N/2 cycles apart (two coefficients per cycle, both 1-D units busy
// at once); blocks 2 and 3 run with random input gaps and output stalls.  The testbench
// counts each mechanism and fails if one never happened: rows of a later block accepted
// while the coefficients of an earlier block are leaving (both 1-D units and the
// transposition memory working on two blocks at once), input back-pressure, an output
// stall, and the row_ack / col_ack status pulses.
module tb_dct2d;
  import tb_ref_pkg::*;
  localparam int N      = 32;
  localparam int IN_W   = 9;
  localparam int SHIFT1 = $clog2(N) - 1 + (IN_W - 1) - 8;
  localparam int SHIFT2 = $clog2(N) + 6;
  localparam int MID_W  = IN_W + 7 + $clog2(N) - SHIFT1 + 1;
  localparam int OUT_W  = MID_W + 7 + $clog2(N) - SHIFT2 + 1;
  localparam int NB     = 4;

  int checks = 0, failures = 0;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic                    in_ready;
  logic signed [IN_W-1:0]  in_row [N];
  logic                    out_valid;
  logic                    out_ready = 1'b1;
  logic signed [OUT_W-1:0] out_coef [2];
  logic [$clog2(N)-1:0]    out_u;
  logic [$clog2(N/2)-1:0]  out_k;
  logic                    out_last;
  logic                    row_ack, col_ack;

  dct2d dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_row(in_row),
    .out_valid(out_valid), .out_ready(out_ready), .out_coef(out_coef), .out_u(out_u),
    .out_k(out_k), .out_last(out_last), .row_ack(row_ack), .col_ack(col_ack));

  always #5 clk = ~clk;

  longint X [NB][N][N];
  longint Y [NB][N][N];     // [v][u]
  longint cyc = 0;
  int     blk_out = 0, u_exp = 0, k_exp = 0;
  longint last_cyc [NB];
  longint first_in = -1, first_out = -1;
  int     blk_in = 0;
  int     n_overlap = 0, n_ostall = 0, n_istall = 0, n_rowack = 0, n_colack = 0;
  logic   stress = 1'b0;

  task automatic make_block(int b);
    longint z [N][N];
    for (int r = 0; r < N; r++)
      for (int j = 0; j < N; j++)
        X[b][r][j] = (b == 0) ? (((coef(N, 1, j) < 0) == (coef(N, 1, r) < 0)) ? 255 : -256)
                              : rnd(255);
    for (int r = 0; r < N; r++)
      for (int u = 0; u < N; u++) begin
        longint s = 0;
        for (int j = 0; j < N; j++) s += longint'(coef(N, u, j)) * X[b][r][j];
        z[r][u] = rshift(s, SHIFT1);
      end
    for (int v = 0; v < N; v++)
      for (int u = 0; u < N; u++) begin
        longint s = 0;
        for (int r = 0; r < N; r++) s += longint'(coef(N, v, r)) * z[r][u];
        Y[b][v][u] = rshift(s, SHIFT2);
      end
  endtask

  initial begin
    for (int j = 0; j < N; j++) in_row[j] = '0;
    for (int b = 0; b < NB; b++) make_block(b);
  end

  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog: %0d blocks out", blk_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // row driver
  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        while (stress && $urandom_range(7) == 0) @(negedge clk);
        in_valid = 1'b1;
        blk_in   = b;
        for (int j = 0; j < N; j++) in_row[j] = IN_W'(X[b][r][j]);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
        #1;
        in_valid = 1'b0;
      end
  end

  always @(negedge clk) out_ready <= stress ? ($urandom_range(3) != 0) : 1'b1;

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && out_valid && out_ready && blk_in > blk_out)
      n_overlap <= n_overlap + 1;
    if (out_valid && !out_ready) n_ostall <= n_ostall + 1;
    if (in_valid && !in_ready) n_istall <= n_istall + 1;
    if (row_ack) n_rowack <= n_rowack + 1;
    if (col_ack) n_colack <= n_colack + 1;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready && blk_out < NB) begin
      if (first_out < 0) first_out = cyc;
      checks = checks + 4;
      if (32'(out_u) != u_exp || 32'(out_k) != k_exp) begin
        failures = failures + 1;
        $display("order: got u=%0d k=%0d, expected u=%0d k=%0d", out_u, out_k, u_exp, k_exp);
      end
      if (longint'(out_coef[0]) != Y[blk_out][2 * k_exp][u_exp]) begin
        failures = failures + 1;
        if (failures < 10) $display("blk %0d Y[%0d][%0d] = %0d, expected %0d", blk_out,
                                    2 * k_exp, u_exp, out_coef[0], Y[blk_out][2 * k_exp][u_exp]);
      end
      if (longint'(out_coef[1]) != Y[blk_out][2 * k_exp + 1][u_exp]) begin
        failures = failures + 1;
        if (failures < 10) $display("blk %0d Y[%0d][%0d] = %0d, expected %0d", blk_out,
                                    2 * k_exp + 1, u_exp, out_coef[1],
                                    Y[blk_out][2 * k_exp + 1][u_exp]);
      end
      if (out_last != (u_exp == N - 1 && k_exp == N / 2 - 1)) failures = failures + 1;
      if (k_exp == N / 2 - 1) begin
        k_exp = 0;
        if (u_exp == N - 1) begin
          u_exp = 0;
          last_cyc[blk_out] = cyc;
          blk_out = blk_out + 1;
          if (blk_out == 2) stress = 1'b1;
        end else begin
          u_exp = u_exp + 1;
        end
      end else begin
        k_exp = k_exp + 1;
      end
    end
  end

  initial begin
    wait (blk_out == NB);
    repeat (5) @(posedge clk);
    checks += 6;
    $display("latency first row in -> first coefficients out: %0d cycles", first_out - first_in);
    $display("block period without stalls: %0d cycles (N*N/2 = %0d)", last_cyc[1] - last_cyc[0],
             N * N / 2);
    $display("rows taken while an earlier block leaves=%0d output stalls=%0d input stalls=%0d",
             n_overlap, n_ostall, n_istall);
    $display("row_ack=%0d col_ack=%0d", n_rowack, n_colack);
    if (last_cyc[1] - last_cyc[0] != N * N / 2) failures++;
    if (n_overlap == 0) failures++;
    if (n_ostall == 0) failures++;
    if (n_istall == 0) failures++;
    if (n_rowack != NB) failures++;
    if (n_colack != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
