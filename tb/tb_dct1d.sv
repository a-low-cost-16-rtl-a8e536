// tb_dct1d - runs the registered 1-D DCT at N = 16 (no scaling) and N = 32 (rounding shift
// of 4, the HEVC first-stage shift for 8-bit video), checking values, the rate of two
// coefficients per cycle, the one-cycle latency and correct behaviour under output stalls.
module tb_dct1d;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c16, f16, s16, c32, f32, s32;
  logic d16, d32;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  tb_dct1d_env #(.N(16), .SHIFT(0)) e16 (.clk(clk), .rst_n(rst_n), .checks(c16),
                                         .failures(f16), .stalls(s16), .done(d16));
  tb_dct1d_env #(.N(32), .SHIFT(4)) e32 (.clk(clk), .rst_n(rst_n), .checks(c32),
                                         .failures(f32), .stalls(s32), .done(d32));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    int checks, failures;
    fork
      wait (d16 && d32);
      wait (cyc == 5000);
    join_any
    checks   = c16 + c32 + 2;
    failures = f16 + f32;
    if (!(d16 && d32)) failures++;
    if (s16 == 0 || s32 == 0) failures++;   // the stall path must have been exercised
    $display("output stall cycles: N=16 %0d, N=32 %0d", s16, s32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
