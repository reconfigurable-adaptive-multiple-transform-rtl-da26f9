// amt_mix2_block: reconfigurable 1-input 4-output multiplication block of the
// MCM_MIX2 architecture (overclocked).
//
// A single one-of-twenty MCM-multiplexed shift-add block computes one product
// per cycle of clk_fast, a clock four times faster than the datapath clock and
// edge-aligned with it. The selector is {transform identifier, column_idx}:
// in quarter q of a datapath period (column_idx = q) the block forms
// s * DTT_tid[q][J] and the clk_fast edge that ends the quarter stores it in
// register q of a 4 x PROD_W = 76-bit bank. After the fourth quarter all four
// products of the sample are held in p[0..3], where they stay until the same
// quarter of the next period overwrites them (p[q] changes at the end of
// quarter q). The sample and identifier must be stable over the whole
// datapath period. The generated block itself is used unmodified; the bank
// and the quarter counter (supplied from outside as column_idx) are the only
// additions. Identifiers 5..7 select DCT-II. The bank is reset to zero.
module amt_mix2_block
  import amt_pkg::*;
#(
  parameter int unsigned J = 0   // which sample of the column (0..3)
) (
  input  logic           clk_fast,
  input  logic           rst_n,
  input  data_t          s,
  input  tr_id_t         tid,
  input  logic [1:0]     column_idx,
  output prod_t [N-1:0]  p
);

  localparam int unsigned NSEL = N * NUM_TR;

  logic [4:0] sel;
  always_comb begin
    unique case (tid)
      TR_DCT5: sel = 5'd4;
      TR_DCT8: sel = 5'd8;
      TR_DST1: sel = 5'd12;
      TR_DST7: sel = 5'd16;
      default: sel = 5'd0;
    endcase
    sel = sel + 5'(column_idx);
  end

  prod_t prod;

  mcm_mux_core #(
    .NSEL  (NSEL),
    .SEL_W (5),
    .COEF  (all_coefs(int'(J)))
  ) u_mux (
    .s   (s),
    .sel (sel),
    .p   (prod)
  );

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p[column_idx] <= prod;
  end

endmodule
