// transpose_mem - N x N transposition memory between the row and column 1-D DCTs.
//
// The row DCT writes a block row by row, two coefficients per cycle; when all N rows are in,
// the column DCT reads it one whole column (N values) per read.  A single N x N register array
// is used, and the orientation alternates from block to block: if block n is written along
// the physical rows, its logical column c is physical column c, and block n+1 is written
// along the physical columns - logical row r of block n+1 goes into physical column r, which
// is free as soon as column r of block n has been read.  So the next block is written while
// the previous one is read, without a second memory; a write of row r waits only until
// column r of the block being read is read (it may share that cycle).  This concurrency is as published;
// the handshakes and the flow control are this design's choices.
//
// row_ack pulses for one cycle when the last row of a block has been written (block ready
// for column reading); col_ack pulses when its last column has been read.
// Write port: wr_valid/wr_ready, wr_data[0..1] are the coefficients 2*wr_idx and 2*wr_idx+1
// of the current row, wr_last marks the last pair of a row.  Read port: rd_valid/rd_ready,
// rd_data is column rd_col; it is combinational from the array.
module transpose_mem #(
  parameter int unsigned N  = 32,
  parameter int unsigned W  = 18,
  parameter int unsigned KW = $clog2(N / 2),
  parameter int unsigned AW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  // write side (row 1-D DCT)
  input  logic                wr_valid,
  output logic                wr_ready,
  input  logic signed [W-1:0] wr_data [2],
  input  logic [KW-1:0]       wr_idx,
  input  logic                wr_last,
  // read side (column 1-D DCT)
  output logic                rd_valid,
  input  logic                rd_ready,
  output logic signed [W-1:0] rd_data [N],
  output logic [AW-1:0]       rd_col,
  // status
  output logic                row_ack,
  output logic                col_ack
);
  localparam logic [AW-1:0] LASTA = AW'(N - 1);

  logic signed [W-1:0] mem [N][N];    // [line][position]
  logic [AW-1:0]       wr_row;
  logic                wr_orient;
  logic                full;          // a complete block is waiting for / under column reads
  logic                rd_orient;
  logic                wr_fire;
  logic                rd_fire;
  logic [AW-1:0]       c0;
  logic [AW-1:0]       c1;

  // A row may go into a line whose column is being read in this same cycle: the read is
  // combinational from the old contents and the write lands on the clock edge.
  assign wr_ready = !full || (rd_col > wr_row) || (rd_col == wr_row && rd_ready);
  assign wr_fire  = wr_valid && wr_ready;
  assign rd_valid = full;
  assign rd_fire  = rd_valid && rd_ready;
  assign c0       = {wr_idx, 1'b0};
  assign c1       = {wr_idx, 1'b1};

  always_comb begin
    for (int i = 0; i < N; i++)
      rd_data[i] = rd_orient ? mem[rd_col][i] : mem[i][rd_col];
  end

  always_ff @(posedge clk) begin
    if (wr_fire) begin
      if (!wr_orient) begin
        mem[wr_row][c0] <= wr_data[0];
        mem[wr_row][c1] <= wr_data[1];
      end else begin
        mem[c0][wr_row] <= wr_data[0];
        mem[c1][wr_row] <= wr_data[1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row    <= '0;
      wr_orient <= 1'b0;
      full      <= 1'b0;
      rd_orient <= 1'b0;
      rd_col    <= '0;
      row_ack   <= 1'b0;
      col_ack   <= 1'b0;
    end else begin
      row_ack <= 1'b0;
      col_ack <= 1'b0;
      if (rd_fire) begin
        rd_col <= rd_col + 1'b1;
        if (rd_col == LASTA) begin
          full    <= 1'b0;
          col_ack <= 1'b1;
        end
      end
      if (wr_fire && wr_last) begin
        wr_row <= wr_row + 1'b1;
        if (wr_row == LASTA) begin
          full      <= 1'b1;
          rd_orient <= wr_orient;
          rd_col    <= '0;
          wr_orient <= ~wr_orient;
          row_ack   <= 1'b1;
        end
      end
    end
  end

  // The last row of a block can only be written once the previous block is fully read.
  property p_no_overwrite;
    @(posedge clk) disable iff (!rst_n)
      wr_fire && wr_last && (wr_row == LASTA) |-> !full;
  endproperty
  assert property (p_no_overwrite);
endmodule
