// amt_1d: reconfigurable one-dimensional 4-point AMT transform circuit.
//
// Each clk cycle one 4-sample column s[0..3] enters together with a transform
// identifier, and the circuit forms t[k] = sum_j DTT_tid[k][j] * s[j] for
// k = 0..3: sample j is multiplied by the four coefficients of column j of
// the selected matrix and the products are summed along each output. The
// constant multiplications are multiplierless and reconfigurable; ARCH picks
// one of the five organisations of them:
//   ARCH_MCM_PAR   4 x amt_mult_par    (five MCM-parallel blocks, output mux)
//   ARCH_MCM_MUX   16 x mcm_mux_core   (one product of five per block)
//   ARCH_MCM_MIX0  16 x amt_mix0_block (five parallel products, inner mux)
//   ARCH_MCM_MIX1  4 x amt_mix1_block  (four of twenty products at once)
//   ARCH_MCM_MIX2  4 x amt_mix2_block  (one of twenty per clk_fast cycle)
//   ARCH_STANDALONE 4 x mcm_par_core   (transform FIXED_TR only, in_tid is
//                                      carried along but not used)
//
// Timing: in_vec/in_tid are taken at a clk edge while in_valid is high and the
// result appears on out_vec/out_tid with out_valid one clk cycle later; a new
// column may enter every cycle. For ARCH_MCM_MIX2 the inputs must be held
// stable through the whole clk period (they normally come from registers on
// clk), the products are built in the four quarters of that period on
// clk_fast = 4 x clk, and the output register is loaded on the clk_fast edge
// that ends the first quarter of the next period - so out_vec changes a
// quarter period after out_valid but is stable when the next clk edge samples
// it. clk_fast is used only by ARCH_MCM_MIX2. Reset is asynchronous, active
// low, and clears valid and the data registers.
module amt_1d
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
  input  data_t [N-1:0]  in_vec,
  output logic           out_valid,
  output tr_id_t         out_tid,
  output sum_t  [N-1:0]  out_vec
);

  // prod[j][k] = in_vec[j] * DTT_tid[k][j]
  prod_t [N-1:0] prod [N];

  if (ARCH == ARCH_MCM_PAR) begin : g_par
    for (genvar j = 0; j < N; j++) begin : g_j
      amt_mult_par #(.J(j)) u_blk (.s(in_vec[j]), .tid(in_tid), .p(prod[j]));
    end
  end else if (ARCH == ARCH_MCM_MUX) begin : g_mux
    logic [2:0] sel;
    assign sel = 3'(in_tid);
    for (genvar j = 0; j < N; j++) begin : g_j
      for (genvar k = 0; k < N; k++) begin : g_k
        mcm_mux_core #(
          .NSEL  (NUM_TR),
          .SEL_W (3),
          .COEF  (pos_coefs(k, j))
        ) u_blk (
          .s   (in_vec[j]),
          .sel (sel),
          .p   (prod[j][k])
        );
      end
    end
  end else if (ARCH == ARCH_MCM_MIX0) begin : g_mix0
    for (genvar j = 0; j < N; j++) begin : g_j
      for (genvar k = 0; k < N; k++) begin : g_k
        amt_mix0_block #(.K(k), .J(j)) u_blk (
          .s(in_vec[j]), .tid(in_tid), .p(prod[j][k]));
      end
    end
  end else if (ARCH == ARCH_MCM_MIX1) begin : g_mix1
    for (genvar j = 0; j < N; j++) begin : g_j
      amt_mix1_block #(.J(j)) u_blk (.s(in_vec[j]), .tid(in_tid), .p(prod[j]));
    end
  end else if (ARCH == ARCH_STANDALONE) begin : g_sa
    for (genvar j = 0; j < N; j++) begin : g_j
      mcm_par_core #(
        .NOUT (N),
        .COEF (col_coefs(int'(FIXED_TR), j))
      ) u_blk (
        .s (in_vec[j]),
        .p (prod[j])
      );
    end
  end else begin : g_mix2
    logic [1:0] column_idx;
    quarter_phase u_phase (
      .clk        (clk),
      .clk_fast   (clk_fast),
      .rst_n      (rst_n),
      .column_idx (column_idx)
    );
    for (genvar j = 0; j < N; j++) begin : g_j
      amt_mix2_block #(.J(j)) u_blk (
        .clk_fast   (clk_fast),
        .rst_n      (rst_n),
        .s          (in_vec[j]),
        .tid        (in_tid),
        .column_idx (column_idx),
        .p          (prod[j])
      );
    end
  end

  // Accumulate the products of each output along the column.
  sum_t [N-1:0] sums;
  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      sums[k] = '0;
      for (int j = 0; j < int'(N); j++) sums[k] = sums[k] + sum_t'(prod[j][k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tid   <= TR_DCT2;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_tid <= in_tid;
    end
  end

  if (ARCH == ARCH_MCM_MIX2) begin : g_out_fast
    // Products of the previous period are complete once its last quarter has
    // ended; capture their sums at the end of the following first quarter.
    always_ff @(posedge clk_fast or negedge rst_n) begin
      if (!rst_n)                       out_vec <= '0;
      else if (g_mix2.column_idx == 2'd0) out_vec <= sums;
    end
  end else begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        out_vec <= '0;
      else if (in_valid) out_vec <= sums;
    end
  end

endmodule
