// tb_sign_adder_tree - checks the signed adder tree (M = 8 and M = 16) against a direct sum
// of +/- operands, with random signs and random operands.
module tb_sign_adder_tree;
  int checks = 0, failures = 0;

  logic signed [21:0] p8 [8];
  logic [7:0]         n8;
  logic signed [21:0] y8;
  logic signed [21:0] p16 [16];
  logic [15:0]        n16;
  logic signed [21:0] y16;

  sign_adder_tree #(.M(8), .OW(22))  u8  (.p(p8), .neg(n8), .y(y8));
  sign_adder_tree #(.M(16), .OW(22)) u16 (.p(p16), .neg(n16), .y(y16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 8; i++) p8[i] = 22'($signed(17'($urandom)));
      for (int i = 0; i < 16; i++) p16[i] = 22'($signed(17'($urandom)));
      n8  = (t == 0) ? 8'hff : 8'($urandom);
      n16 = (t == 0) ? 16'hffff : 16'($urandom);
      #1;
      e = 0;
      for (int i = 0; i < 8; i++) e += n8[i] ? -longint'(p8[i]) : longint'(p8[i]);
      checks++;
      if (longint'(y8) != e) failures++;
      e = 0;
      for (int i = 0; i < 16; i++) e += n16[i] ? -longint'(p16[i]) : longint'(p16[i]);
      checks++;
      if (longint'(y16) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
