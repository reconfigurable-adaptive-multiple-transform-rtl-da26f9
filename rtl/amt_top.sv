// amt_top: the five reconfigurable 4x4 AMT transform architectures side by
// side.
//
// All five variants of the 2-D transform (amt_2d with MCM_PAR, MCM_MUX,
// MCM_MIX0, MCM_MIX1 and MCM_MIX2 multiplier organisations) receive the same
// input stream and produce the same numbers on the same cycles; they differ
// only in how the reconfigurable constant multiplications are built, which is
// what a designer chooses between. Output index a of out_valid/out_tid/out_row
// is variant a in arch_t order (0 MCM_PAR, 1 MCM_MUX, 2 MCM_MIX0, 3 MCM_MIX1,
// 4 MCM_MIX2).
//
// Next to them sit the five single-transform (standalone) circuits the
// reconfigurable ones are derived from, one per AMT transform, each built
// from four unmodified MCM-parallel blocks per 1-D pass. They see the same
// stream and always apply their own transform: sa_out_row index t computes
// transform t (0 DCT-II, 1 DCT-V, 2 DCT-VIII, 3 DST-I, 4 DST-VII).
//
// Interface and timing as amt_2d: one 4-sample column per clk cycle with a
// transform identifier per block, four result rows per block, first row 6
// cycles after the first column. clk_fast must run at four times clk with
// every fourth rising edge aligned to a rising edge of clk; only the MCM_MIX2
// variant uses it. Reset is asynchronous, active low.
module amt_top
  import amt_pkg::*;
(
  input  logic                          clk,
  input  logic                          clk_fast,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  tr_id_t                        in_tid,
  input  data_t [N-1:0]                 in_col,
  output logic  [NUM_ARCH-1:0]          out_valid,
  output tr_id_t [NUM_ARCH-1:0]         out_tid,
  output sum_t  [NUM_ARCH-1:0][N-1:0]   out_row,
  output logic  [NUM_TR-1:0]            sa_out_valid,
  output sum_t  [NUM_TR-1:0][N-1:0]     sa_out_row
);

  for (genvar a = 0; a < NUM_ARCH; a++) begin : g_arch
    amt_2d #(.ARCH(arch_t'(a))) u_amt (
      .clk       (clk),
      .clk_fast  (clk_fast),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_tid    (in_tid),
      .in_col    (in_col),
      .out_valid (out_valid[a]),
      .out_tid   (out_tid[a]),
      .out_row   (out_row[a])
    );
  end

  for (genvar t = 0; t < NUM_TR; t++) begin : g_sa
    amt_2d #(.ARCH(ARCH_STANDALONE), .FIXED_TR(tr_id_t'(t))) u_amt (
      .clk       (clk),
      .clk_fast  (clk_fast),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_tid    (in_tid),
      .in_col    (in_col),
      .out_valid (sa_out_valid[t]),
      .out_tid   (),          // always the block's in_tid
      .out_row   (sa_out_row[t])
    );
  end

endmodule
