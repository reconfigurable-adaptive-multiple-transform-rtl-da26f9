// amt_2d: reconfigurable two-dimensional 4x4 AMT transform.
//
// Computes D = DTT * S * DTT^T for a 4x4 residual block S with the matrix DTT
// picked by the transform identifier (DCT-II, DCT-V, DCT-VIII, DST-I or
// DST-VII), as two cascaded, identical 1-D circuits with a transposing
// register bank between them:
//   pass 1   column c of S        -> column c of T = DTT * S
//   scaling  T is rounded back to DATA_W bits: (t + 512) >>> 10
//   bank     columns of T in, rows of T out
//   pass 2   row i of T           -> row i of D (D[i][k] = sum_j DTT[k][j] T[i][j])
// The same identifier is used by both passes; it travels with the block.
//
// Interface: one column of S per clk cycle (in_valid, in_col[r] = S[r][c],
// in_tid held for the four columns of a block, read with column 0). Blocks
// may follow each other without gaps. Results leave as four consecutive rows,
// out_row[k] = D[i][k] for i = 0..3, with out_valid and out_tid.
// Latency: row 0 of D appears 6 clk cycles after column 0 of S was taken (one
// block every four cycles at full rate). ARCH selects the multiplier
// organisation of both 1-D circuits; clk_fast (4 x clk, edge-aligned) is used
// only by ARCH_MCM_MIX2. With ARCH_STANDALONE the circuit computes transform
// FIXED_TR whatever in_tid says. Reset is asynchronous, active low.
module amt_2d
  import amt_pkg::*;
#(
  parameter arch_t  ARCH     = ARCH_MCM_PAR,
  parameter tr_id_t FIXED_TR = TR_DCT2     // ARCH_STANDALONE only
) (
  input  logic           clk,
  input  logic           clk_fast,
  input  logic           rst_n,
  input  logic           in_valid,
  input  tr_id_t         in_tid,
  input  data_t [N-1:0]  in_col,
  output logic           out_valid,
  output tr_id_t         out_tid,
  output sum_t  [N-1:0]  out_row
);

  logic          t_valid;
  tr_id_t        t_tid;
  sum_t  [N-1:0] t_col;
  data_t [N-1:0] t_col_rnd;

  logic          r_valid;
  tr_id_t        r_tid;
  data_t [N-1:0] r_row;

  amt_1d #(.ARCH(ARCH), .FIXED_TR(FIXED_TR)) u_pass1 (
    .clk       (clk),
    .clk_fast  (clk_fast),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_tid    (in_tid),
    .in_vec    (in_col),
    .out_valid (t_valid),
    .out_tid   (t_tid),
    .out_vec   (t_col)
  );

  always_comb begin
    for (int k = 0; k < int'(N); k++) t_col_rnd[k] = mid_round(t_col[k]);
  end

  transpose_bank u_bank (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (t_valid),
    .wr_tid   (t_tid),
    .wr_col   (t_col_rnd),
    .rd_valid (r_valid),
    .rd_tid   (r_tid),
    .rd_row   (r_row)
  );

  amt_1d #(.ARCH(ARCH), .FIXED_TR(FIXED_TR)) u_pass2 (
    .clk       (clk),
    .clk_fast  (clk_fast),
    .rst_n     (rst_n),
    .in_valid  (r_valid),
    .in_tid    (r_tid),
    .in_vec    (r_row),
    .out_valid (out_valid),
    .out_tid   (out_tid),
    .out_vec   (out_row)
  );

endmodule
