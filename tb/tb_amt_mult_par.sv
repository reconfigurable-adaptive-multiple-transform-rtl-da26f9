// tb_amt_mult_par: checks the MCM_PAR reconfigurable 4-output block for samples 0 and 2 of a column, for all eight transform identifier codes (5..7 must act as DCT-II), against products with recomputed coefficients.
module tb_amt_mult_par;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t  s;
  tr_id_t tid;
  prod_t [3:0] p0, p2;
  amt_mult_par #(.J(0)) u_j0 (.s(s), .tid(tid), .p(p0));
  amt_mult_par #(.J(2)) u_j2 (.s(s), .tid(tid), .p(p2));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s s=%0d tid=%0d got %0d exp %0d", what, s, tid, got, exp);
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
    for (int it = 0; it < 300; it++) begin
      case (it)
        0: s = -512;
        1: s = 511;
        2: s = 0;
        default: s = data_t'(rand_sample());
      endcase
      for (int t = 0; t < 8; t++) begin
        tid = tr_id_t'(t);
        #1;
        for (int k = 0; k < 4; k++) begin
          check("j0", longint'(p0[k]), longint'(s) * ref_coef(t, k, 0));
          check("j2", longint'(p2[k]), longint'(s) * ref_coef(t, k, 2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
