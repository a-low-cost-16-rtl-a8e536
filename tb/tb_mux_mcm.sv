// tb_mux_mcm - checks configurable constant multipliers: the two-constant example {11, 21},
// an eight-constant set (first column of the 8-point HEVC matrix, with a repeated 64) and a
// pair from the 32-point odd block, for every select value and random full-range inputs.
module tb_mux_mcm;
  int checks = 0, failures = 0;

  logic signed [9:0]  x;
  logic               sel2;
  logic [2:0]         sel8;
  logic signed [17:0] y_a, y_c;
  logic signed [17:0] y_b;

  localparam int unsigned C8 [8] = '{64, 89, 83, 75, 64, 50, 36, 18};

  mux_mcm #(.W(10), .OW(18)) u_a (.x(x), .sel(sel2), .y(y_a));
  mux_mcm #(.W(10), .OW(18), .NC(8),
            .CONSTS({8'd18, 8'd36, 8'd50, 8'd64, 8'd75, 8'd83, 8'd89, 8'd64})) u_b (
    .x(x), .sel(sel8), .y(y_b));
  mux_mcm #(.W(10), .OW(18), .CONSTS({8'd67, 8'd90})) u_c (.x(x), .sel(sel2), .y(y_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      x    = (t == 0) ? -10'sd512 : (t == 1) ? 10'sd511 : 10'($urandom);
      sel2 = 1'($urandom);
      sel8 = 3'($urandom);
      #1;
      checks += 3;
      if (longint'(y_a) != longint'(x) * (sel2 ? 21 : 11)) begin
        failures++;
        $display("mismatch {11,21}: x=%0d sel=%0d y=%0d", x, sel2, y_a);
      end
      if (longint'(y_b) != longint'(x) * C8[sel8]) begin
        failures++;
        $display("mismatch T8 col0: x=%0d sel=%0d y=%0d", x, sel8, y_b);
      end
      if (longint'(y_c) != longint'(x) * (sel2 ? 67 : 90)) begin
        failures++;
        $display("mismatch {90,67}: x=%0d sel=%0d y=%0d", x, sel2, y_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
