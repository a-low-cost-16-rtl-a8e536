// tb_butterfly - checks the 16- and 32-point butterflies against a_i = x_i + x_{N-1-i} and
// b_i = x_i - x_{N-1-i} on random full-range inputs, including the extreme values.
module tb_butterfly;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [8:0]  x16 [16];
  logic signed [9:0]  a16 [8], b16 [8];
  logic signed [9:0]  x32 [32];
  logic signed [10:0] a32 [16], b32 [16];

  butterfly #(.N(16), .W(9))  u16 (.x(x16), .a(a16), .b(b16));
  butterfly #(.N(32), .W(10)) u32 (.x(x32), .a(a32), .b(b32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) x16[i] = (t == 0) ? -9'sd256 : (t == 1) ? 9'sd255 : 9'(rnd(256));
      for (int i = 0; i < 32; i++) x32[i] = (t == 0) ? -10'sd512 : (t == 1) ? 10'sd511 : 10'(rnd(512));
      if (t == 2) begin x16[0] = 9'sd255; x16[15] = -9'sd256; end
      #1;
      for (int i = 0; i < 8; i++) begin
        checks += 2;
        if (longint'(a16[i]) != longint'(x16[i]) + longint'(x16[15 - i])) failures++;
        if (longint'(b16[i]) != longint'(x16[i]) - longint'(x16[15 - i])) failures++;
      end
      for (int i = 0; i < 16; i++) begin
        checks += 2;
        if (longint'(a32[i]) != longint'(x32[i]) + longint'(x32[31 - i])) failures++;
        if (longint'(b32[i]) != longint'(x32[i]) - longint'(x32[31 - i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
