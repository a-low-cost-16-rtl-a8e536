// tb_dct16_core - checks the 16-point DCT core: for random and extreme 9-bit inputs, every
// step's output must equal the matching rows of the 16-point HEVC matrix applied to the
// input, computed as a plain matrix-vector product.
module tb_dct16_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [8:0]  x [16];
  logic        [2:0]  step;
  logic signed [19:0] ye, yo;

  dct16_core #(.W(9)) dut (.x(x), .step(step), .y_even(ye), .y_odd(yo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t xv, yv;
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 32; j++) xv[j] = 0;
      for (int j = 0; j < 16; j++) begin
        xv[j] = rnd((longint'(1) << 8) - 1);
        if (t == 0) xv[j] = (coef(16, 1, j) < 0) ? -(longint'(1) << 8) : (longint'(1) << 8) - 1;
        if (t == 1) xv[j] = -(longint'(1) << 8);
        x[j] = 9'(xv[j]);
      end
      yv = ref_dct(16, xv);
      for (int k = 0; k < 8; k++) begin
        step = 3'(k);
        #1;
        checks += 2;
        if (longint'(ye) != yv[2 * k]) begin
          failures++;
          $display("Y%0d: %0d != %0d", 2 * k, ye, yv[2 * k]);
        end
        if (longint'(yo) != yv[2 * k + 1]) begin
          failures++;
          $display("Y%0d: %0d != %0d", 2 * k + 1, yo, yv[2 * k + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
