// amt_mult_par: reconfigurable 1-input 4-output multiplication block of the
// MCM_PAR architecture.
//
// Sample s_J of the current input column must be multiplied by the four
// coefficients DTT[0..3][J] of whichever transform is selected. This block
// holds one complete MCM-parallel block per AMT transform (five of them, each
// producing its four products at once) and a 5-way output multiplexer driven
// by the transform identifier picks one group of four. The five blocks are
// kept unmodified; all reconfiguration is outside them. Purely combinational:
// p[k] = s * DTT_tid[k][J]; identifiers 5..7 select DCT-II.
module amt_mult_par
  import amt_pkg::*;
#(
  parameter int unsigned J = 0   // which sample of the column (0..3)
) (
  input  data_t          s,
  input  tr_id_t         tid,
  output prod_t [N-1:0]  p
);

  prod_t [N-1:0] grp [NUM_TR];

  for (genvar tr = 0; tr < NUM_TR; tr++) begin : g_tr
    mcm_par_core #(
      .NOUT (N),
      .COEF (col_coefs(tr, int'(J)))
    ) u_blk (
      .s (s),
      .p (grp[tr])
    );
  end

  always_comb begin
    unique case (tid)
      TR_DCT5: p = grp[1];
      TR_DCT8: p = grp[2];
      TR_DST1: p = grp[3];
      TR_DST7: p = grp[4];
      default: p = grp[0];
    endcase
  end

endmodule
