// tb_dct8_core - checks the 8-point DCT core: for random and extreme 11-bit inputs, every
// step's output must equal the matching rows of the 8-point HEVC matrix applied to the
// input, computed as a plain matrix-vector product.
module tb_dct8_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [10:0]  x [8];
  logic        [2:0]  step;
  logic signed [20:0] y;

  dct8_core #(.W(11)) dut (.x(x), .step(step), .y(y));

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
      for (int j = 0; j < 8; j++) begin
        xv[j] = rnd((longint'(1) << 10) - 1);
        if (t == 0) xv[j] = (coef(8, 1, j) < 0) ? -(longint'(1) << 10) : (longint'(1) << 10) - 1;
        if (t == 1) xv[j] = -(longint'(1) << 10);
        x[j] = 11'(xv[j]);
      end
      yv = ref_dct(8, xv);
      for (int k = 0; k < 8; k++) begin
        step = 3'(k);
        #1;
        checks++;
        if (longint'(y) != yv[k]) begin
          failures++;
          $display("Y%0d: %0d != %0d", k, y, yv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
