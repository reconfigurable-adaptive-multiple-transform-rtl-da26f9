// const_mult: multiplierless product of a sample by one constant.
//
// The constant C is written in canonical signed digit (CSD) form at
// elaboration time and the product is the chain sum of the sample shifted to
// every non-zero digit position, each term added or subtracted by the sign of
// its digit (e.g. 117 = 128 - 8 - 4 + 1 uses three adders/subtractors). No
// multiplier is inferred. Purely combinational: p = s * C, exact for every
// DATA_W sample and |C| < 2^9; the arithmetic runs modulo 2^PROD_W, which is
// exact because the final product fits in PROD_W bits.
module const_mult
  import amt_pkg::*;
#(
  parameter int C = 117
) (
  input  data_t s,   // sample
  output prod_t p    // s * C
);

  localparam int W = csd_weight(C);

  prod_t s_ext;
  assign s_ext = prod_t'(s);

  if (W == 0) begin : g_zero
    assign p = '0;
  end else begin : g_chain
    prod_t acc [W+1];
    assign acc[0] = '0;
    for (genvar n = 0; n < W; n++) begin : g_term
      localparam int  SH  = csd_shift(C, n);
      localparam bit  NEG = csd_neg(C, n);
      if (NEG) begin : g_sub
        assign acc[n+1] = acc[n] - (s_ext <<< SH);
      end else begin : g_add
        assign acc[n+1] = acc[n] + (s_ext <<< SH);
      end
    end
    assign p = acc[W];
  end

endmodule
