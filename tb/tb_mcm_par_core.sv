// tb_mcm_par_core: checks the MCM-parallel block in its two uses - four
// products of one DCT-VIII column (the worked example 336/296/219/117) and of
// a DCT-II column, and five products of one matrix position across the five
// transforms - against products with coefficients recomputed from the kernel
// formulas, for extreme and random samples.
module tb_mcm_par_core;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t s;
  prod_t [3:0] p_dct8, p_dct2;
  prod_t [4:0] p_pos;

  mcm_par_core #(.NOUT(4), .COEF(col_coefs(int'(TR_DCT8), 0))) u_dct8 (.s(s), .p(p_dct8));
  mcm_par_core #(.NOUT(4), .COEF(col_coefs(int'(TR_DCT2), 1))) u_dct2 (.s(s), .p(p_dct2));
  mcm_par_core #(.NOUT(5), .COEF(pos_coefs(1, 3)))             u_pos  (.s(s), .p(p_pos));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s s=%0d got %0d exp %0d", what, s, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      case (it)
        0: s = -512;
        1: s = 511;
        2: s = 0;
        3: s = 1;
        4: s = -1;
        default: s = data_t'(rand_sample());
      endcase
      #1;
      for (int k = 0; k < 4; k++) begin
        check("dct8 col0", longint'(p_dct8[k]), longint'(s) * ref_coef(2, k, 0));
        check("dct2 col1", longint'(p_dct2[k]), longint'(s) * ref_coef(0, k, 1));
      end
      for (int tr = 0; tr < 5; tr++)
        check("pos(1,3)", longint'(p_pos[tr]), longint'(s) * ref_coef(tr, 1, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
