// transpose_bank: 4x4 transposing register bank between the two 1-D passes.
//
// The first pass delivers its result block column by column (wr_col = column
// c of T, i.e. T[0..3][c]); the second pass needs it row by row (rd_row = row
// r of T, i.e. T[r][0..3]). After the fourth column of a block has been
// written, the bank streams the four rows out on the next four clk cycles
// (rd_valid high, rows 0..3 in order, rd_tid = the block's identifier).
//
// A single 16-entry bank is enough for a full-rate stream: the direction in
// which the bank is addressed alternates from block to block. Reading row r
// of the stored block frees exactly the cells that the next block's column r
// is written into, one cycle or more later, so a new block may follow the
// previous one without a gap while it is still being read out. Input columns
// may also arrive with idle cycles between them. Writes are accepted whenever
// wr_valid is high; the writer must not start a block more often than every
// four cycles (true for a 1-column-per-cycle source); an assertion checks
// this. The alternating-direction
// scheme is this design's choice. Reset is asynchronous, active low.
module transpose_bank
  import amt_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_valid,
  input  tr_id_t         wr_tid,
  input  data_t [N-1:0]  wr_col,
  output logic           rd_valid,
  output tr_id_t         rd_tid,
  output data_t [N-1:0]  rd_row
);

  data_t      mem [N][N];      // mem[a][b], addressed per wr_dir / rd_dir
  logic [1:0] wr_cnt;          // next column of the block being written
  logic       wr_dir;          // 0: column c -> mem[*][c], 1: -> mem[c][*]
  logic [1:0] rd_cnt;          // row being read
  logic       rd_dir;          // direction the block being read was written in
  tr_id_t     blk_tid;         // identifier of the block being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt   <= '0;
      wr_dir   <= 1'b0;
      rd_cnt   <= '0;
      rd_dir   <= 1'b0;
      rd_valid <= 1'b0;
      rd_tid   <= TR_DCT2;
      blk_tid  <= TR_DCT2;
      for (int a = 0; a < int'(N); a++)
        for (int b = 0; b < int'(N); b++) mem[a][b] <= '0;
    end else begin
      // read side: four rows after each completed block
      if (rd_valid) begin
        rd_cnt <= rd_cnt + 2'd1;
        if (rd_cnt == 2'd3) rd_valid <= 1'b0;
      end
      // write side
      if (wr_valid) begin
        for (int r = 0; r < int'(N); r++) begin
          if (wr_dir) mem[wr_cnt][r] <= wr_col[r];
          else        mem[r][wr_cnt] <= wr_col[r];
        end
        if (wr_cnt == 2'd0) blk_tid <= wr_tid;
        wr_cnt <= wr_cnt + 2'd1;
        if (wr_cnt == 2'd3) begin
          wr_dir   <= ~wr_dir;
          rd_dir   <= wr_dir;
          rd_cnt   <= '0;
          rd_valid <= 1'b1;
          rd_tid   <= blk_tid;
        end
      end
    end
  end

  // A block may complete only once the previous one is on its last row (or
  // gone): the writer must not start blocks more often than every 4 cycles.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_valid && wr_cnt == 2'd3) |-> (!rd_valid || rd_cnt == 2'd3))
    else $error("transpose_bank: block completed while the previous one was being read");

  always_comb begin
    for (int c = 0; c < int'(N); c++)
      rd_row[c] = rd_dir ? mem[c][rd_cnt] : mem[rd_cnt][c];
  end

endmodule
