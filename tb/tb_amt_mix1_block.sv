// tb_amt_mix1_block: checks the MCM_MIX1 4-of-20 block for samples 1 and 3 of a column (column 1 holds the zero of DCT-VIII), for all eight transform identifier codes (5..7 must act as DCT-II), against products with recomputed coefficients.
module tb_amt_mix1_block;
  import amt_pkg::*;
  import tb_amt_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t  s;
  tr_id_t tid;
  prod_t [3:0] p1, p3;
  amt_mix1_block #(.J(1)) u_j1 (.s(s), .tid(tid), .p(p1));
  amt_mix1_block #(.J(3)) u_j3 (.s(s), .tid(tid), .p(p3));

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
          check("j1", longint'(p1[k]), longint'(s) * ref_coef(t, k, 1));
          check("j3", longint'(p3[k]), longint'(s) * ref_coef(t, k, 3));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
