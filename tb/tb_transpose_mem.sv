// tb_transpose_mem - checks the transposition memory at N = 8 with a row writer and a column
// reader that run concurrently.  Six blocks are written row by row; every column read must
// hold the block's values in row order, in the right block order, under random gaps on both
// sides.  Blocks 0-2 use a fast reader, blocks 3-5 a slow one, so that both mechanisms are
// exercised: writing the next block while the previous one is read (overlap) and a write
// held back until the column it would overwrite has been read (write wait).  row_ack and
// col_ack must pulse once per block.
module tb_transpose_mem;
  localparam int N  = 8;
  localparam int W  = 12;
  localparam int NB = 6;
  int checks = 0, failures = 0;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                wr_valid = 1'b0;
  logic                wr_ready;
  logic signed [W-1:0] wr_data [2];
  logic [1:0]          wr_idx = '0;
  logic                wr_last = 1'b0;
  logic                rd_valid;
  logic                rd_ready = 1'b0;
  logic signed [W-1:0] rd_data [N];
  logic [2:0]          rd_col;
  logic                row_ack, col_ack;

  transpose_mem #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_data(wr_data),
    .wr_idx(wr_idx), .wr_last(wr_last), .rd_valid(rd_valid), .rd_ready(rd_ready),
    .rd_data(rd_data), .rd_col(rd_col), .row_ack(row_ack), .col_ack(col_ack));

  always #5 clk = ~clk;

  function automatic int val(int b, int r, int c);
    return ((b * 67 + r * 8 + c) % 2048) - 1024;
  endfunction

  int blk_rd = 0, col_exp = 0, n_row_ack = 0, n_col_ack = 0;
  int overlap = 0, wr_wait = 0, cyc = 0;
  logic writer_done = 1'b0;

  initial begin
    wr_data[0] = '0;
    wr_data[1] = '0;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  end

  // writer
  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N / 2; k++) begin
          @(negedge clk);
          while ($urandom_range(7) == 0) @(negedge clk);
          wr_valid   = 1'b1;
          wr_idx     = 2'(k);
          wr_last    = (k == N / 2 - 1);
          wr_data[0] = W'(val(b, r, 2 * k));
          wr_data[1] = W'(val(b, r, 2 * k + 1));
          #1;
          while (!wr_ready) begin
            @(negedge clk);
            #1;
          end
          @(posedge clk);
          #1;
          wr_valid = 1'b0;
        end
    writer_done = 1'b1;
  end

  // reader: fast for the first half of the blocks, slow afterwards
  always @(negedge clk) rd_ready <= (blk_rd < NB / 2) ? ($urandom_range(3) != 0)
                                                       : ($urandom_range(15) == 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (row_ack) n_row_ack <= n_row_ack + 1;
    if (col_ack) n_col_ack <= n_col_ack + 1;
    if (wr_valid && wr_ready && rd_valid) overlap <= overlap + 1;
    if (wr_valid && !wr_ready) wr_wait <= wr_wait + 1;
    if (rst_n && rd_valid && rd_ready) begin
      checks = checks + 1;
      if (32'(rd_col) != col_exp) failures = failures + 1;
      for (int i = 0; i < N; i++) begin
        checks = checks + 1;
        if (int'(rd_data[i]) != val(blk_rd, i, col_exp)) begin
          failures = failures + 1;
          $display("blk %0d col %0d row %0d: %0d != %0d", blk_rd, col_exp, i, rd_data[i],
                   val(blk_rd, i, col_exp));
        end
      end
      if (col_exp == N - 1) begin
        col_exp = 0;
        blk_rd  = blk_rd + 1;
      end else begin
        col_exp = col_exp + 1;
      end
    end
  end

  initial begin
    wait (blk_rd == NB);
    repeat (3) @(posedge clk);
    checks += 5;
    if (!writer_done) failures++;
    if (n_row_ack != NB) failures++;
    if (n_col_ack != NB) failures++;
    if (overlap == 0) failures++;
    if (wr_wait == 0) failures++;
    $display("overlapped writes=%0d write-wait cycles=%0d row_ack=%0d col_ack=%0d",
             overlap, wr_wait, n_row_ack, n_col_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
