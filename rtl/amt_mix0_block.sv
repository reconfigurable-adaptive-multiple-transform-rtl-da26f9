// amt_mix0_block: reconfigurable 1-input 1-output multiplication block of the
// MCM_MIX0 architecture.
//
// The block serves matrix position (K, J): it forms, with one MCM-parallel
// shift-add network, the five products of sample s by DTT_tr[K][J] of all five
// AMT transforms at once, and an internal 5-way multiplexer driven by the
// transform identifier passes one of them on. Sixteen such blocks make a 1-D
// circuit. Purely combinational: p = s * DTT_tid[K][J]; identifiers 5..7
// select DCT-II.
module amt_mix0_block
  import amt_pkg::*;
#(
  parameter int unsigned K = 0,  // output (matrix row) served
  parameter int unsigned J = 0   // input sample (matrix column) served
) (
  input  data_t   s,
  input  tr_id_t  tid,
  output prod_t   p
);

  prod_t [NUM_TR-1:0] all_p;

  mcm_par_core #(
    .NOUT (NUM_TR),
    .COEF (pos_coefs(int'(K), int'(J)))
  ) u_par (
    .s (s),
    .p (all_p)
  );

  always_comb begin
    unique case (tid)
      TR_DCT5: p = all_p[1];
      TR_DCT8: p = all_p[2];
      TR_DST1: p = all_p[3];
      TR_DST7: p = all_p[4];
      default: p = all_p[0];
    endcase
  end

endmodule
