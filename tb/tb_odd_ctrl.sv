// tb_odd_ctrl - checks the odd-block control units (M = 8 and M = 16).  For every step k the
// C1/C2/sign outputs, applied through the lane routing and constant pairs, must realise row
// k of the odd matrix exactly: every column used once, each with the right signed constant.
// The 16-point case is also checked against the published odd matrix row 0 and the
// C1 input groups {b0,b3,b4,b7} / {b1,b2,b5,b6}.
module tb_odd_ctrl;
  import tb_ref_pkg::*;
  import dct_pkg::odd_muxin;
  import dct_pkg::odd_pair;
  int checks = 0, failures = 0;

  logic [2:0]  s8;
  logic [1:0]  c1_8;
  logic        c2_8;
  logic [7:0]  n8;
  logic [3:0]  s16;
  logic [2:0]  c1_16;
  logic        c2_16;
  logic [15:0] n16;

  odd_ctrl #(.M(8))  u8  (.step(s8),  .c1(c1_8),  .c2(c2_8),  .neg(n8));
  odd_ctrl #(.M(16)) u16 (.step(s16), .c1(c1_16), .c2(c2_16), .neg(n16));

  task automatic check_row(int m, int k, int c1, int c2, logic [15:0] neg);
    int used [16];
    for (int j = 0; j < 16; j++) used[j] = 0;
    for (int i = 0; i < m; i++) begin
      int col, val;
      col = odd_muxin(m, i, c1);
      val = neg[i] ? -int'(odd_pair(m, i, c2)) : int'(odd_pair(m, i, c2));
      used[col]++;
      checks++;
      if (val != ocoef(2 * m, k, col)) begin
        failures++;
        $display("M=%0d row %0d lane %0d: %0d != %0d", m, k, i, val, ocoef(2 * m, k, col));
      end
    end
    for (int j = 0; j < m; j++) begin
      checks++;
      if (used[j] != 1) failures++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o8_row0 [8] = '{90, 87, 80, 70, 57, 43, 25, 9};
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (ocoef(16, 0, j) != o8_row0[j]) failures++;
    end
    for (int k = 0; k < 8; k++) begin
      s8 = 3'(k);
      #1;
      check_row(8, k, c1_8, c2_8, 16'(n8));
      for (int i = 0; i < 8; i++) begin
        int col;
        col = odd_muxin(8, i, c1_8);
        checks++;
        if ((i < 4) != (col == 0 || col == 3 || col == 4 || col == 7)) failures++;
      end
    end
    for (int k = 0; k < 16; k++) begin
      s16 = 4'(k);
      #1;
      check_row(16, k, c1_16, c2_16, n16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
