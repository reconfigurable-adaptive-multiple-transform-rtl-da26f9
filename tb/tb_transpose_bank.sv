// tb_transpose_bank: writes random 4x4 blocks column by column, sometimes
// back to back (the next block's first column right after the previous
// block's last) and sometimes with idle cycles, and checks that every block
// comes out as its four rows on exactly the four cycles after its last column
// was written, with the block's identifier, and that rd_valid is low
// otherwise. Back-to-back blocks and both bank addressing directions must
// each occur several times.
module tb_transpose_bank;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  typedef struct {
    int cyc;
    int tid;
    int row [4];
  } exp_t;

  int checks = 0, failures = 0;
  logic clk, clk_fast, rst_n;
  logic          wr_valid;
  tr_id_t        wr_tid;
  data_t [3:0]   wr_col;
  logic          rd_valid;
  tr_id_t        rd_tid;
  data_t [3:0]   rd_row;

  tb_clkgen u_clk (.clk(clk), .clk_fast(clk_fast));

  transpose_bank dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_tid(wr_tid), .wr_col(wr_col),
    .rd_valid(rd_valid), .rd_tid(rd_tid), .rd_row(rd_row));

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  exp_t q [$];
  int blk [4][4];     // blk[r][c] of the block being written
  int col = 0, btid = 0, nblocks = 0, n_b2b = 0, last_done = -10;

  initial begin
    rst_n    = 1'b0;
    wr_valid = 1'b0;
    wr_tid   = TR_DCT2;
    wr_col   = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit v;
      @(posedge clk);
      // stretches of full-rate input alternate with sparse input
      v = ((cyc / 64) % 2 == 0) ? 1'b1 : ($urandom_range(3) == 0);
      if (v) begin
        if (col == 0) begin
          btid = int'($urandom_range(4));
          if (last_done == cyc - 1) n_b2b++;
        end
        for (int r = 0; r < 4; r++) blk[r][col] = rand_sample();
        for (int r = 0; r < 4; r++) wr_col[r] <= data_t'(blk[r][col]);
        wr_tid <= tr_id_t'((col == 0) ? btid : int'($urandom_range(7)));
        if (col == 3) begin
          for (int i = 0; i < 4; i++) begin
            exp_t e;
            e.cyc = cyc + 1 + i;
            e.tid = btid;
            for (int c = 0; c < 4; c++) e.row[c] = blk[i][c];
            q.push_back(e);
          end
          nblocks++;
          last_done = cyc;
        end
        col = (col + 1) % 4;
      end
      wr_valid <= v;
      #15;
      checks++;
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        e = q.pop_front();
        if (!rd_valid || int'(rd_tid) != e.tid) begin
          failures++;
          $display("FAIL cyc %0d valid %0b tid %0d exp tid %0d", cyc, rd_valid, rd_tid, e.tid);
        end
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(rd_row[c]) != e.row[c]) begin
            failures++;
            $display("FAIL cyc %0d col %0d got %0d exp %0d", cyc, c, rd_row[c], e.row[c]);
          end
        end
      end else if (rd_valid) begin
        failures++;
        $display("FAIL cyc %0d unexpected rd_valid", cyc);
      end
    end
    checks++;
    if (n_b2b < 4 || nblocks < 8) begin
      failures++;
      $display("FAIL coverage: %0d blocks, %0d back to back", nblocks, n_b2b);
    end
    $display("blocks %0d, back-to-back %0d", nblocks, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
