// tb_odd_block - checks the 8-point (16-point DCT) and 16-point (32-point DCT) odd blocks.
// The control unit drives C1, C2 and the signs for each step k; the output must equal
// sum_j O[k][j] * b_j computed directly from the odd matrix, for random and extreme inputs.
module tb_odd_block;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [9:0]  b8 [8];
  logic [2:0]         s8;
  logic [1:0]         c1_8;
  logic               c2_8;
  logic [7:0]         n8;
  logic signed [19:0] y8;

  logic signed [10:0] b16 [16];
  logic [3:0]         s16;
  logic [2:0]         c1_16;
  logic               c2_16;
  logic [15:0]        n16;
  logic signed [21:0] y16;

  odd_ctrl  #(.M(8)) uc8 (.step(s8), .c1(c1_8), .c2(c2_8), .neg(n8));
  odd_block #(.M(8), .W(10)) ub8 (.b(b8), .c1(c1_8), .c2(c2_8), .neg(n8), .y(y8));
  odd_ctrl  #(.M(16)) uc16 (.step(s16), .c1(c1_16), .c2(c2_16), .neg(n16));
  odd_block #(.M(16), .W(11)) ub16 (.b(b16), .c1(c1_16), .c2(c2_16), .neg(n16), .y(y16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < 8; j++)
        b8[j] = (t == 0) ? ((ocoef(16, 0, j) < 0) ? -10'sd512 : 10'sd511) : 10'($urandom);
      for (int j = 0; j < 16; j++) b16[j] = (t == 1) ? -11'sd1024 : 11'($urandom);
      for (int k = 0; k < 16; k++) begin
        s8  = 3'(k);
        s16 = 4'(k);
        #1;
        if (k < 8) begin
          e = 0;
          for (int j = 0; j < 8; j++) e += longint'(ocoef(16, k, j)) * b8[j];
          checks++;
          if (longint'(y8) != e) begin
            failures++;
            $display("O8 row %0d: %0d != %0d", k, y8, e);
          end
        end
        e = 0;
        for (int j = 0; j < 16; j++) e += longint'(ocoef(32, k, j)) * b16[j];
        checks++;
        if (longint'(y16) != e) begin
          failures++;
          $display("O16 row %0d: %0d != %0d", k, y16, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
