// tb_amt_top: end-to-end test of the whole design: all five multiplier
// organisations (MCM_PAR, MCM_MUX, MCM_MIX0, MCM_MIX1, MCM_MIX2) and the five
// single-transform circuits, at their default sizes, fed with one stream of
// random 4x4 blocks (the single-transform circuits are checked against their
// own transform). Every transform of
// the AMT set and the unused identifier codes, full-rate back-to-back blocks,
// idle cycles inside blocks, transform switches between blocks and
// extreme-value blocks are applied, and every variant's result rows are
// compared with a 2-D reference (recomputed coefficients, same inter-pass
// rounding) on the exact cycle they must appear. The run counts how often
// each mechanism happened and fails if one never did, including both
// addressing directions of the transposing bank and all four quarter phases
// of the overclocked MCM_MIX2 blocks.
module tb_amt_top;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  localparam int NA = 5;
  typedef struct {
    int cyc;
    int tid;
    longint row [4];
    longint sa [5][4];   // the standalone circuits' rows
  } exp_t;

  int checks = 0, failures = 0;
  logic clk, clk_fast, rst_n;
  logic          in_valid;
  tr_id_t        in_tid;
  data_t [3:0]   in_col;
  logic  [NA-1:0]      out_valid;
  tr_id_t [NA-1:0]     out_tid;
  sum_t  [NA-1:0][3:0] out_row;
  logic  [4:0]         sa_out_valid;
  sum_t  [4:0][3:0]    sa_out_row;

  tb_clkgen u_clk (.clk(clk), .clk_fast(clk_fast));

  amt_top dut (
    .clk(clk), .clk_fast(clk_fast), .rst_n(rst_n),
    .in_valid(in_valid), .in_tid(in_tid), .in_col(in_col),
    .out_valid(out_valid), .out_tid(out_tid), .out_row(out_row),
    .sa_out_valid(sa_out_valid), .sa_out_row(sa_out_row));

  // coverage of internal mechanisms
  int n_dir [2];
  int n_quarter [4];
  initial begin
    n_dir = '{0, 0};
    n_quarter = '{0, 0, 0, 0};
  end
  always @(posedge clk)
    if (rst_n && dut.g_arch[0].u_amt.u_bank.rd_valid)
      n_dir[dut.g_arch[0].u_amt.u_bank.rd_dir]++;
  always @(posedge clk_fast)
    if (rst_n) n_quarter[dut.g_arch[4].u_amt.u_pass1.g_mix2.column_idx]++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 2-D reference of one block with the same inter-pass rounding
  function automatic void ref_block(input int tr, input int s [4][4], output longint d [4][4]);
    int t [4][4];
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++)
        t[k][c] = int'(ref_round(ref_t(tr, k, s[0][c], s[1][c], s[2][c], s[3][c])));
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++)
        d[i][k] = ref_t(tr, k, t[i][0], t[i][1], t[i][2], t[i][3]);
  endfunction

  exp_t q [$];
  int blk [4][4];
  int col = 0, btid = 0, prev_tid = -1, nblocks = 0, last_done = -10, row_seen = 0;
  int n_tr [8];
  int n_b2b = 0, n_gap_inside = 0, n_switch = 0, n_extreme = 0;
  bit in_block_gap;

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_tid   = TR_DCT2;
    in_col   = '0;
    foreach (n_tr[i]) n_tr[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit v;
      @(posedge clk);
      v = ((cyc / 48) % 2 == 0) ? 1'b1 : ($urandom_range(2) == 0);
      if (v) begin
        if (col == 0) begin
          btid = (nblocks < 8) ? (nblocks % 8) :
                 ($urandom_range(15) == 0) ? 5 + int'($urandom_range(2)) : int'($urandom_range(4));
          if (last_done == cyc - 1) n_b2b++;
          if (prev_tid >= 0 && prev_tid != btid) n_switch++;
          n_tr[btid]++;
          in_block_gap = 1'b0;
        end
        for (int r = 0; r < 4; r++)
          blk[r][col] = (nblocks % 16 == 3) ? (((r + col) % 2 == 0) ? 511 : -512) :
                        (nblocks % 16 == 7) ? -512 : rand_sample();
        for (int r = 0; r < 4; r++) in_col[r] <= data_t'(blk[r][col]);
        in_tid <= tr_id_t'(btid);
        if (col == 3) begin
          longint d [4][4];
          longint dsa [5][4][4];
          ref_block(btid, blk, d);
          for (int t = 0; t < 5; t++) ref_block(t, blk, dsa[t]);
          for (int i = 0; i < 4; i++) begin
            exp_t e;
            for (int t = 0; t < 5; t++)
              for (int k = 0; k < 4; k++) e.sa[t][k] = dsa[t][i][k];
            e.cyc = cyc + 3 + i;
            e.tid = btid;
            for (int k = 0; k < 4; k++) e.row[k] = d[i][k];
            q.push_back(e);
          end
          if (in_block_gap) n_gap_inside++;
          if (nblocks % 16 == 3 || nblocks % 16 == 7) n_extreme++;
          nblocks++;
          last_done = cyc;
          prev_tid = btid;
        end
        col = (col + 1) % 4;
      end else if (col != 0) begin
        in_block_gap = 1'b1;
      end
      in_valid <= v;
      #15;
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        e = q.pop_front();
        row_seen++;
        for (int a = 0; a < NA; a++) begin
          checks++;
          if (!out_valid[a] || int'(out_tid[a]) != e.tid) begin
            failures++;
            $display("FAIL arch %0d cyc %0d valid %0b tid %0d exp %0d", a, cyc,
                     out_valid[a], out_tid[a], e.tid);
          end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (longint'(out_row[a][k]) != e.row[k]) begin
              failures++;
              $display("FAIL arch %0d cyc %0d tid %0d k %0d got %0d exp %0d", a, cyc, e.tid, k,
                       longint'(out_row[a][k]), e.row[k]);
            end
          end
        end
        for (int t = 0; t < 5; t++) begin
          checks++;
          if (!sa_out_valid[t]) begin
            failures++;
            $display("FAIL standalone %0d cyc %0d missing valid", t, cyc);
          end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (longint'(sa_out_row[t][k]) != e.sa[t][k]) begin
              failures++;
              $display("FAIL standalone %0d cyc %0d k %0d got %0d exp %0d", t, cyc, k,
                       longint'(sa_out_row[t][k]), e.sa[t][k]);
            end
          end
        end
      end else begin
        checks++;
        if (sa_out_valid != '0) begin
          failures++;
          $display("FAIL cyc %0d unexpected standalone valid", cyc);
        end
        for (int a = 0; a < NA; a++) begin
          checks++;
          if (out_valid[a]) begin
            failures++;
            $display("FAIL arch %0d cyc %0d unexpected out_valid", a, cyc);
          end
        end
      end

    end
    // every mechanism must have happened
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (n_tr[t] == 0) begin failures++; $display("FAIL transform %0d never used", t); end
    end
    checks++; if (n_tr[5] + n_tr[6] + n_tr[7] == 0) begin failures++; $display("FAIL no unused code"); end
    checks++; if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back blocks"); end
    checks++; if (n_gap_inside == 0) begin failures++; $display("FAIL no idle cycle inside a block"); end
    checks++; if (n_switch == 0)     begin failures++; $display("FAIL no transform switch"); end
    checks++; if (n_extreme == 0)    begin failures++; $display("FAIL no extreme-value block"); end
    checks++; if (row_seen != 4 * nblocks - int'(q.size())) begin failures++; $display("FAIL rows lost"); end
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("FAIL bank direction %0d never used", d); end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_quarter[p] == 0) begin failures++; $display("FAIL quarter %0d never seen", p); end
    end
    $display("bank rows read per direction %0d %0d, MIX2 quarters %0d %0d %0d %0d",
             n_dir[0], n_dir[1], n_quarter[0], n_quarter[1], n_quarter[2], n_quarter[3]);
    $display("blocks %0d rows %0d: per transform %0d %0d %0d %0d %0d (unused codes %0d), back-to-back %0d, idle inside block %0d, switches %0d, extreme %0d",
             nblocks, row_seen, n_tr[0], n_tr[1], n_tr[2], n_tr[3], n_tr[4], n_tr[5] + n_tr[6] + n_tr[7],
             n_b2b, n_gap_inside, n_switch, n_extreme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
