// tb_dct1d_env - stimulus and checking for one dct1d instance (used by tb_dct1d).
//
// Phase 1 sends NB blocks back to back with the output always ready and checks the rate:
// the NB*N coefficients must leave in exactly NB*N/2 consecutive cycles, the first one
// registered on the clock edge after the first block is accepted.  Phase 2 sends NB more blocks with random input
// gaps and random output stalls.  Every output pair is compared with the rounded, shifted
// matrix-vector product of the HEVC matrix.
module tb_dct1d_env #(
  parameter int N     = 16,
  parameter int SHIFT = 0,
  parameter int NB    = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  import tb_ref_pkg::*;
  localparam int IN_W   = 9;
  localparam int CORE_W = IN_W + 7 + $clog2(N);
  localparam int OUT_W  = CORE_W - SHIFT + ((SHIFT > 0) ? 1 : 0);
  localparam int KW     = $clog2(N / 2);

  logic                    in_valid = 1'b0;
  logic                    in_ready;
  logic signed [IN_W-1:0]  in_data [N];
  logic                    out_valid;
  logic                    out_ready = 1'b1;
  logic signed [OUT_W-1:0] out_coef [2];
  logic [KW-1:0]           out_idx;
  logic                    out_last;

  dct1d #(.N(N), .IN_W(IN_W), .SHIFT(SHIFT)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_coef(out_coef), .out_idx(out_idx),
    .out_last(out_last));

  vec_t   yref [2*NB];
  int     blk_out = 0;
  int     k_exp   = 0;
  longint cyc     = 0;
  longint first_in_cyc = -1, first_out_cyc = -1, last_p1_cyc = -1;
  int     n_out   = 0;
  logic   phase2  = 1'b0;

  initial begin
    checks = 0;
    failures = 0;
    stalls = 0;
    done = 1'b0;
    for (int j = 0; j < N; j++) in_data[j] = '0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // driver
  initial begin
    vec_t xv;
    @(posedge rst_n);
    for (int b = 0; b < 2 * NB; b++) begin
      if (b == NB) begin
        // let phase 1 drain so its rate is measured alone
        wait (blk_out == NB);
        phase2 = 1'b1;
      end
      for (int j = 0; j < 32; j++) xv[j] = (j < N) ? rnd(255) : 0;
      if (b == 0) for (int j = 0; j < N; j++) xv[j] = (coef(N, 1, j) < 0) ? -256 : 255;
      yref[b] = ref_dct(N, xv);
      @(negedge clk);
      while (phase2 && ($urandom_range(3) == 0)) @(negedge clk);
      in_valid = 1'b1;
      for (int j = 0; j < N; j++) in_data[j] = IN_W'(xv[j]);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      if (first_in_cyc < 0) first_in_cyc = cyc;
      #1;
      in_valid = 1'b0;
    end
  end

  // random output stalls in phase 2
  always @(negedge clk) out_ready <= phase2 ? ($urandom_range(2) != 0) : 1'b1;

  // monitor
  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls <= stalls + 1;
    if (rst_n && out_valid && out_ready && blk_out < 2 * NB) begin
      checks = checks + 3;
      if (first_out_cyc < 0) first_out_cyc = cyc;
      if (32'(out_idx) != k_exp) failures = failures + 1;
      if (longint'(out_coef[0]) != rshift(yref[blk_out][2 * k_exp], SHIFT)) begin
        failures = failures + 1;
        $display("N=%0d blk %0d Y%0d: %0d != %0d", N, blk_out, 2 * k_exp, out_coef[0],
                 rshift(yref[blk_out][2 * k_exp], SHIFT));
      end
      if (longint'(out_coef[1]) != rshift(yref[blk_out][2 * k_exp + 1], SHIFT)) begin
        failures = failures + 1;
        $display("N=%0d blk %0d Y%0d: %0d != %0d", N, blk_out, 2 * k_exp + 1, out_coef[1],
                 rshift(yref[blk_out][2 * k_exp + 1], SHIFT));
      end
      checks = checks + 1;
      if (out_last != (k_exp == N / 2 - 1)) failures = failures + 1;
      n_out = n_out + 1;
      if (k_exp == N / 2 - 1) begin
        k_exp = 0;
        blk_out = blk_out + 1;
        if (blk_out == NB) begin
          last_p1_cyc = cyc;
          // rate: NB*N/2 output cycles in a row.  Latency: the pair is registered on the edge
          // after acceptance and taken by the consumer on the edge after that.
          checks = checks + 2;
          if (last_p1_cyc - first_out_cyc + 1 != NB * N / 2) begin
            failures = failures + 1;
            $display("N=%0d rate: %0d cycles for %0d blocks", N,
                     last_p1_cyc - first_out_cyc + 1, NB);
          end
          if (first_out_cyc - first_in_cyc != 2) begin
            failures = failures + 1;
            $display("N=%0d latency %0d", N, first_out_cyc - first_in_cyc);
          end
        end
        if (blk_out == 2 * NB) done = 1'b1;
      end else begin
        k_exp = k_exp + 1;
      end
    end
  end
endmodule
